// tb_clock_checker: gives the checker windows of K_D = 3333 cycles in which
// the sampled signal toggles a chosen number of times, and checks status C
// after each window: 1 only when the count is within TOL (4) of 2*K_M = 2240,
// and 0 after the first, partial window following reset.
module tb_clock_checker;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned K_D = 3333;
  localparam int unsigned EXPECTED = 2240;

  logic clk = 1'b0, rst_n = 1'b0, q_in = 1'b0, window_end = 1'b0, clk_ok;
  int checks = 0, failures = 0;

  clock_checker dut (.clk(clk), .rst_n(rst_n), .q_in(q_in), .window_end(window_end), .clk_ok(clk_ok));

  always #15 clk = ~clk;

  initial begin
    #(30.0 * K_D * 20);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One window: toggle q_in n_toggles times starting at cycle 100, strobe
  // window_end in the last cycle, then check clk_ok against expect_ok.
  task automatic window(input int n_toggles, input bit expect_ok);
    for (int c = 0; c < K_D; c++) begin
      @(negedge clk);
      if (c >= 100 && c < 100 + n_toggles) q_in = ~q_in;
      window_end = (c == K_D - 1);
    end
    @(negedge clk);
    window_end = 1'b0;
    checks++;
    if (clk_ok !== expect_ok) begin
      failures++;
      $display("%0d toggles: clk_ok=%0b expected %0b", n_toggles, clk_ok, expect_ok);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    checks++; if (clk_ok !== 1'b0) begin failures++; $display("clk_ok set in reset"); end
    rst_n = 1'b1;
    window(EXPECTED, 1'b0);       // first window after reset is never trusted
    window(EXPECTED, 1'b1);
    window(EXPECTED + 4, 1'b1);
    window(EXPECTED - 4, 1'b1);
    window(EXPECTED + 5, 1'b0);
    window(EXPECTED, 1'b1);
    window(EXPECTED - 5, 1'b0);
    window(0, 1'b0);              // CLJ stopped
    window(EXPECTED + 1, 1'b1);
    window(1120, 1'b0);           // wrong frequency ratio
    window(3000, 1'b0);
    window(EXPECTED - 1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
