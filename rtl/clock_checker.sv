// clock_checker: drives status bit C ("proper clocks").
//
// Over one decimation period T_Q = K_D*T_CLK = K_M*T_CLJ, CLJ has exactly
// K_M rising and K_M falling edges, so the sampled signal q toggles 2*K_M
// times (give or take the edges that jitter moves across a window border).
// The checker counts toggles of q between two window strobes of the
// decimator and reports the clocks as proper when the count is within TOL of
// 2*K_M.  A stopped CLJ, a missing CLK-derived pattern or a PLL locked to the
// wrong ratio all move the count far from 2*K_M.
//
// Interface: clk = CLK, q_in = sampler output, window_end = one-cycle strobe
// at the end of each T_Q window (x_valid of the decimator), clk_ok = C.
// Timing: clk_ok is updated one cycle after each window_end and is 0 from
// reset until the first full window has been judged.  The way C is worked out
// is this design's own: only its meaning is given for the original.
module clock_checker #(
  parameter int unsigned K_M = trng_pkg::K_M_DEFAULT,
  parameter int unsigned TOL = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic q_in,
  input  logic window_end,
  output logic clk_ok
);

  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned EXPECTED = 2 * K_M;
  localparam int unsigned CMAX     = 2 * EXPECTED + 1;   // saturation value
  localparam int unsigned CW       = $clog2(CMAX + 1);

  logic [CW-1:0] toggles;
  logic [CW-1:0] toggles_next;
  logic          q_prev;
  logic          started;  // first window after reset is partial

  always_comb begin
    toggles_next = toggles;
    if ((q_in != q_prev) && (toggles != CW'(CMAX))) toggles_next = toggles + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      toggles <= '0;
      q_prev  <= 1'b0;
      started <= 1'b0;
      clk_ok  <= 1'b0;
    end else begin
      q_prev <= q_in;
      if (window_end) begin
        started <= 1'b1;
        clk_ok  <= started &&
                   (toggles_next >= CW'(EXPECTED - TOL)) &&
                   (toggles_next <= CW'(EXPECTED + TOL));
        toggles <= '0;
      end else begin
        toggles <= toggles_next;
      end
    end
  end

endmodule
