// trng_core: the synthesizable part of the PLL-jitter TRNG peripheral.
//
// Data path: the 33.570 MHz output of the second PLL is divided by 3 to form
// CLJ (F_CLJ = F_CLK * K_M/K_D, K_M = 1120, K_D = 3333).  CLJ is sampled by a
// D flip-flop on the system clock CLK (33.3 MHz, also the processor clock);
// because K_M and K_D are coprime the CLJ edges step past the CLK edges in
// steps of T_CLK*GCD(2K_M,K_D)/(4K_M), about 6.7 ps, which is smaller than the
// PLL jitter (sigma >= 15 ps), so some samples in every period T_Q = K_D*T_CLK
// are decided by jitter.  An XOR decimator folds the K_D samples of one T_Q
// into a bit, giving 1/T_Q = 10 kbit/s.  A clock checker counts the sample
// toggles per T_Q to derive status bit C, and the register block packs the
// bits into DATA_W-bit words for the processor (data, status, control, IRQ).
//
// Clocks: clk is CLK; pll_clk is the second PLL's output and only drives the
// divider.  Everything else, bus included, is in the clk domain.  rst_n is an
// asynchronous active-low reset for both domains.
// Outputs rnd_bit/rnd_valid expose the raw bit stream (one strobe per T_Q),
// for statistical testing of the generator.  The data path (divider, single
// sampling flop, XOR decimator) and the register contents follow the original
// design; the way C is computed and the bus timing are this design's own.
module trng_core #(
  parameter int unsigned DATA_W  = trng_pkg::DATA_W_DEFAULT,
  parameter int unsigned K_M     = trng_pkg::K_M_DEFAULT,
  parameter int unsigned K_D     = trng_pkg::K_D_DEFAULT,
  parameter int unsigned CLK_TOL = 4
) (
  input  logic              clk,
  input  logic              pll_clk,
  input  logic              rst_n,
  input  logic              chipselect,
  input  logic              address,
  input  logic              read,
  input  logic              write,
  input  logic [DATA_W-1:0] writedata,
  output logic [DATA_W-1:0] readdata,
  output logic              irq,
  output logic              rnd_bit,
  output logic              rnd_valid,
  output logic              clj
);

  timeunit 1ns;
  timeprecision 1fs;

  logic q;
  logic clk_ok;

  clk_div3 u_div3 (
    .clk_in (pll_clk),
    .rst_n  (rst_n),
    .clk_out(clj)
  );

  jitter_sampler u_sampler (
    .clk  (clk),
    .rst_n(rst_n),
    .clj  (clj),
    .q    (q)
  );

  xor_decimator #(.K_D(K_D)) u_decim (
    .clk    (clk),
    .rst_n  (rst_n),
    .q_in   (q),
    .x_out  (rnd_bit),
    .x_valid(rnd_valid)
  );

  clock_checker #(.K_M(K_M), .TOL(CLK_TOL)) u_check (
    .clk       (clk),
    .rst_n     (rst_n),
    .q_in      (q),
    .window_end(rnd_valid),
    .clk_ok    (clk_ok)
  );

  trng_regs #(.DATA_W(DATA_W)) u_regs (
    .clk       (clk),
    .rst_n     (rst_n),
    .bit_in    (rnd_bit),
    .bit_valid (rnd_valid),
    .clk_ok    (clk_ok),
    .chipselect(chipselect),
    .address   (address),
    .read      (read),
    .write     (write),
    .writedata (writedata),
    .readdata  (readdata),
    .irq       (irq)
  );

endmodule
