// tb_clk_div3: drives 33.570 MHz into the divider and measures the output:
// its period must be three input periods and its high time one and a half.
module tb_clk_div3;
  timeunit 1ns;
  timeprecision 1fs;

  localparam real T_IN = 1000.0 / 33.570;  // ns
  logic clk_in = 1'b0, rst_n = 1'b0, clk_out;
  int checks = 0, failures = 0;
  realtime t_rise, t_prev_rise, t_fall;
  int n_rise = 0;

  clk_div3 dut (.clk_in(clk_in), .rst_n(rst_n), .clk_out(clk_out));

  always #(T_IN / 2.0) clk_in = ~clk_in;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit close(real a, real b);
    return (a - b < 0.001) && (b - a < 0.001);
  endfunction

  always @(posedge clk_out) begin
    t_prev_rise = t_rise;
    t_rise = $realtime;
    n_rise++;
    if (n_rise > 1) begin
      checks++;
      if (!close(t_rise - t_prev_rise, 3.0 * T_IN)) begin
        failures++;
        $display("period %f ns, expected %f", t_rise - t_prev_rise, 3.0 * T_IN);
      end
    end
  end

  always @(negedge clk_out) begin
    t_fall = $realtime;
    if (n_rise > 0) begin
      checks++;
      if (!close(t_fall - t_rise, 1.5 * T_IN)) begin
        failures++;
        $display("high time %f ns, expected %f", t_fall - t_rise, 1.5 * T_IN);
      end
    end
  end

  initial begin
    #100;
    checks++; if (clk_out !== 1'b0) begin failures++; $display("output not low in reset"); end
    rst_n = 1'b1;
    wait (n_rise == 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
