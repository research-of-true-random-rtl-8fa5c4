// tb_xor_decimator: feeds random samples (with changing bias) to the
// decimator at its default K_D and checks every output bit against the XOR of
// the K_D samples it covers, and that strobes come exactly every K_D cycles.
module tb_xor_decimator;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned K_D = 3333;
  localparam int unsigned N_WIN = 12;

  logic clk = 1'b0, rst_n = 1'b0, q_in = 1'b0, x_out, x_valid;
  int checks = 0, failures = 0;

  xor_decimator dut (.clk(clk), .rst_n(rst_n), .q_in(q_in), .x_out(x_out), .x_valid(x_valid));

  always #15 clk = ~clk;

  initial begin
    #(30.0 * K_D * (N_WIN + 4));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive q_in on falling edges; the bias changes from window to window
  int unsigned thresh = 50;
  always @(negedge clk) q_in <= ($urandom_range(0, 99) < thresh);

  longint unsigned edge_n = 0;
  bit acc = 1'b0, expected = 1'b0, pending = 1'b0;
  int n_strobes = 0, ones = 0;
  longint unsigned last_strobe_edge = 0;

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    forever begin
      @(posedge clk);
      // values before this edge: previous outputs, current input
      if (pending) begin
        pending = 1'b0;
      end
      acc ^= q_in;
      if (edge_n % K_D == K_D - 1) begin
        expected = acc;
        acc = 1'b0;
        pending = 1'b1;
        thresh = $urandom_range(0, 100);
      end
      edge_n++;
      #1;
      checks++;
      if (x_valid !== pending) begin
        failures++;
        if (failures < 5) $display("edge %0d: x_valid=%0b expected %0b", edge_n, x_valid, pending);
      end
      if (pending) begin
        checks++;
        if (x_out !== expected) begin
          failures++;
          if (failures < 5) $display("window %0d: x_out=%0b expected %0b", n_strobes, x_out, expected);
        end
        if (n_strobes > 0) begin
          checks++;
          if (edge_n - last_strobe_edge != K_D) begin
            failures++;
            $display("strobe interval %0d, expected %0d", edge_n - last_strobe_edge, K_D);
          end
        end
        last_strobe_edge = edge_n;
        ones += int'(x_out);
        n_strobes++;
        if (n_strobes == N_WIN) begin
          // both output values must have occurred for the check to mean anything
          checks++;
          if (ones == 0 || ones == N_WIN) begin
            failures++;
            $display("all %0d output bits equal", N_WIN);
          end
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule
