// jitter_sampler: the harvesting flip-flop of the TRNG.
//
// A single D flip-flop, clocked by the system clock CLK, samples the jittery
// synthesized clock CLJ.  Because F_CLJ/F_CLK = K_M/K_D with coprime factors,
// the edges of CLJ sweep across the CLK edges with a resolution far below the
// intrinsic PLL jitter; the samples taken close to a CLJ edge are therefore
// decided by that jitter, which is the source of randomness.  The output
// q(n*T_CLK) feeds the XOR decimator.
//
// Interface: clk = CLK, clj = CLJ (asynchronous to clk by design), q = sample.
// Timing: q changes one CLK edge after the sampled value of clj.
// The single sampling stage is the structure of the design; the D input is
// intentionally asynchronous, so metastability settles in the following
// decimator stage.  The asynchronous active-low reset is this design's choice.
module jitter_sampler (
  input  logic clk,
  input  logic rst_n,
  input  logic clj,
  output logic q
);

  timeunit 1ns;
  timeprecision 1fs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= clj;
  end

endmodule
