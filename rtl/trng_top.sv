// trng_top: the complete PLL-jitter true random number generator peripheral.
//
// Clocking (main configuration, F_EXT = 33.3 MHz):
//   PLL2  clk1 = F_EXT*14/14  = 33.3 MHz   -> CLK, system and sampling clock
//         clk0 = F_EXT*14/101 = 4.616 MHz  -> reference of PLL4
//   PLL4  clk1 = 4.616 MHz*80/11 = 33.570 MHz -> divided by 3 in the core
//   CLJ   = 33.570/3 = 11.19 MHz = F_CLK * 1120/3333
// Two cascaded PLLs are needed because one PLL cannot reach the large
// coprime factors K_M = 1120 and K_D = 3333 by itself.  The core samples CLJ
// with CLK, XOR-decimates 3333 samples per bit (10 kbit/s) and offers 16-bit
// words through a data register, a status register (V, C), a control register
// (IE) and an interrupt line to the processor, which runs on CLK (sys_clk).
//
// The PLLs are behavioural models (see pll_model) with the intrinsic jitter
// set by JITTER_RMS_PS; everything else is synthesizable.  Bus signals are
// synchronous to sys_clk.  rst_n is asynchronous, active low; the processor
// should hold it until pll_locked is high.  PLL4's unused output clk0 is not
// brought out.  CLJ is brought out only as a test point, so that its
// frequency can be measured against sys_clk.  The clock plan and the PLL
// factors are those of the original design; the bus timing, the reset and the
// test-point ports are this design's own choices.
module trng_top #(
  parameter int unsigned DATA_W        = trng_pkg::DATA_W_DEFAULT,
  parameter real         JITTER_RMS_PS = 15.0
) (
  input  logic              clk_ext,     // external clock, F_EXT
  input  logic              rst_n,
  output logic              sys_clk,     // CLK: processor and TRNG clock
  output logic              pll_locked,  // both PLLs locked
  // processor bus
  input  logic              chipselect,
  input  logic              address,
  input  logic              read,
  input  logic              write,
  input  logic [DATA_W-1:0] writedata,
  output logic [DATA_W-1:0] readdata,
  output logic              irq,
  // raw bit stream for statistical testing
  output logic              rnd_bit,
  output logic              rnd_valid,
  output logic              clj          // CLJ, as a test point
);

  timeunit 1ns;
  timeprecision 1fs;

  logic ref_4m6;     // PLL2 clk0, 4.616 MHz
  logic clk_33m57;   // PLL4 clk1, 33.570 MHz
  logic lock2, lock4;

  pll_model #(
    .CLK0_MUL(14), .CLK0_DIV(101),
    .CLK1_MUL(14), .CLK1_DIV(14),
    .JITTER_RMS_PS(JITTER_RMS_PS)
  ) u_pll2 (
    .inclk (clk_ext),
    .clk0  (ref_4m6),
    .clk1  (sys_clk),
    .locked(lock2)
  );

  pll_model #(
    .CLK0_MUL(1),  .CLK0_DIV(1),
    .CLK1_MUL(80), .CLK1_DIV(11),
    .JITTER_RMS_PS(JITTER_RMS_PS)
  ) u_pll4 (
    .inclk (ref_4m6),
    .clk0  (),
    .clk1  (clk_33m57),
    .locked(lock4)
  );

  assign pll_locked = lock2 && lock4;

  trng_core #(
    .DATA_W (DATA_W),
    .K_M    (trng_pkg::K_M_DEFAULT),
    .K_D    (trng_pkg::K_D_DEFAULT)
  ) u_core (
    .clk       (sys_clk),
    .pll_clk   (clk_33m57),
    .rst_n     (rst_n),
    .chipselect(chipselect),
    .address   (address),
    .read      (read),
    .write     (write),
    .writedata (writedata),
    .readdata  (readdata),
    .irq       (irq),
    .rnd_bit   (rnd_bit),
    .rnd_valid (rnd_valid),
    .clj       (clj)
  );

endmodule
