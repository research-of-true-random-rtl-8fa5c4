// clk_div3: divide-by-3 clock divider with 50 % duty cycle, forming CLJ.
//
// The second PLL synthesizes 33.570 MHz; dividing it by three gives
// CLJ = F_EXT * (80*14)/(11*101*3), i.e. F_CLK * 1120/3333.  A mod-3 counter
// runs on the rising edge; a flop on the rising edge is high for one of the
// three periods, and a copy of it taken on the falling edge stretches the
// high phase by half a period.  The OR of the two flops is high for 1.5 of 3
// periods, so both edges of CLJ are evenly spaced, as the edge-spacing
// analysis of the sampler (both CLJ edges, factor 2*K_M) presumes.
//
// Interface: clk_in = PLL output, rst_n = asynchronous active-low reset,
// clk_out = CLJ.  Both inputs to the final OR come from flops and never change
// on the same edge, so clk_out is glitch free.  The phase of clk_out after
// reset is not significant.  The 50 % duty cycle is this design's choice.
module clk_div3 (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);

  timeunit 1ns;
  timeprecision 1fs;

  logic [1:0] cnt;
  logic       q_pos;  // high for one clk_in period out of three
  logic       q_neg;  // q_pos delayed by half a period

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= 2'd0;
      q_pos <= 1'b0;
    end else begin
      cnt   <= (cnt == 2'd2) ? 2'd0 : cnt + 2'd1;
      q_pos <= (cnt == 2'd2);
    end
  end

  always_ff @(negedge clk_in or negedge rst_n) begin
    if (!rst_n) q_neg <= 1'b0;
    else        q_neg <= q_pos;
  end

  assign clk_out = q_pos | q_neg;

endmodule
