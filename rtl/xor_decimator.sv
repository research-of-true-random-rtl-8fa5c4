// xor_decimator: folds K_D consecutive samples into one random bit.
//
// The sampled sequence q(n*T_CLK) is periodic with period T_Q = K_D*T_CLK
// apart from the jitter-decided samples.  XOR-ing all K_D samples of one
// period T_Q cancels the deterministic pattern and keeps the parity of the
// random decisions, giving one bit X(n*T_Q) per T_Q.
//
// Interface: clk = CLK, q_in = sample from the sampler, x_out / x_valid =
// random bit and a one-cycle strobe.  Timing: x_valid pulses once every K_D
// cycles of clk; while it is high, x_out holds the XOR of the K_D values of
// q_in seen at the K_D clock edges before it, and keeps that value until the
// next strobe.  The counter is a plain
// modulo-K_D counter (the original used a vendor adder macro for it).
module xor_decimator #(
  parameter int unsigned K_D = trng_pkg::K_D_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic q_in,
  output logic x_out,
  output logic x_valid
);

  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned CW = (K_D > 1) ? $clog2(K_D) : 1;

  logic [CW-1:0] cnt;
  logic          acc;
  logic          last;

  assign last = (cnt == CW'(K_D - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      acc     <= 1'b0;
      x_out   <= 1'b0;
      x_valid <= 1'b0;
    end else begin
      x_valid <= last;
      if (last) begin
        cnt   <= '0;
        acc   <= 1'b0;
        x_out <= acc ^ q_in;
      end else begin
        cnt   <= cnt + 1'b1;
        acc   <= acc ^ q_in;
      end
    end
  end

endmodule
