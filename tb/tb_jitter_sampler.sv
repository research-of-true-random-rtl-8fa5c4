// tb_jitter_sampler: checks that the sampler flop captures CLJ on each rising
// CLK edge and that reset clears it.  CLJ changes at random times between
// clock edges; the expected value is the CLJ level held by the testbench at
// the edge.
module tb_jitter_sampler;
  timeunit 1ns;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0, clj = 1'b0, q;
  int checks = 0, failures = 0;

  jitter_sampler dut (.clk(clk), .rst_n(rst_n), .clj(clj), .q(q));

  always #15 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    clj = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (q !== 1'b0) begin failures++; $display("q not cleared by reset"); end
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      // change clj somewhere in the middle of the cycle
      @(negedge clk);
      #($urandom_range(1, 13));
      clj = 1'($urandom);
      @(posedge clk);
      expected = clj;
      #1;
      checks++;
      if (q !== expected) begin
        failures++;
        if (failures < 5) $display("cycle %0d: q=%0b expected %0b", i, q, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
