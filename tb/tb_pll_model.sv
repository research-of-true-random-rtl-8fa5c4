// tb_pll_model: drives the PLL model with a clean 33.3 MHz reference and
// checks, after lock, that
//  - clk1 (14/14) and clk0 (14/101) rise on the ideal grids t0 + k*T_in*DIV/MUL
//    anchored at the first reference edge, i.e. frequency and phase lock;
//  - the rms deviation from those grids equals the set jitter (15 ps) within
//    25 %, and no edge is off by more than 8 sigma;
//  - the high time of clk1 is half its period within the jitter.
module tb_pll_model;
  timeunit 1ns;
  timeprecision 1fs;

  localparam real T_EXT = 1000.0 / 33.3;   // ns
  localparam real SIGMA = 0.015;           // ns

  logic inclk = 1'b0, clk0, clk1, locked;
  int checks = 0, failures = 0;
  realtime t0 = -1.0;

  pll_model #(.CLK0_MUL(14), .CLK0_DIV(101), .CLK1_MUL(14), .CLK1_DIV(14),
              .JITTER_RMS_PS(15.0)) dut (
    .inclk(inclk), .clk0(clk0), .clk1(clk1), .locked(locked));

  initial begin
    #(T_EXT);
    forever begin
      if (t0 < 0.0) t0 = $realtime;
      inclk = 1'b1;
      #(T_EXT / 2.0);
      inclk = 1'b0;
      #(T_EXT / 2.0);
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // deviation of an edge from the nearest point of a grid with period tp
  function automatic real dev(real t, real tp);
    real k;
    k = $floor((t - t0) / tp + 0.5);
    return t - t0 - k * tp;
  endfunction

  real sum2_0 = 0.0, sum2_1 = 0.0, max_dev = 0.0;
  int n0 = 0, n1 = 0, n_hi = 0;
  realtime t_rise1;

  always @(posedge clk0) if (locked) begin
    real d;
    d = dev($realtime, T_EXT * 101.0 / 14.0);
    sum2_0 += d * d; n0++;
    if (d > max_dev) max_dev = d;
    if (-d > max_dev) max_dev = -d;
  end

  always @(posedge clk1) if (locked) begin
    real d;
    d = dev($realtime, T_EXT);
    sum2_1 += d * d; n1++;
    if (d > max_dev) max_dev = d;
    if (-d > max_dev) max_dev = -d;
    t_rise1 = $realtime;
  end

  always @(negedge clk1) if (locked && n1 > 0) begin
    real hi;
    hi = $realtime - t_rise1;
    checks++;
    if (hi < T_EXT / 2.0 - 8.0 * SIGMA || hi > T_EXT / 2.0 + 8.0 * SIGMA) begin
      failures++;
      if (failures < 5) $display("clk1 high time %f ns", hi);
    end
    n_hi++;
  end

  initial begin
    real rms0, rms1;
    checks++;
    if (locked !== 1'b0) begin failures++; $display("locked before any reference edge"); end
    wait (locked);
    wait (n1 >= 3000);
    rms0 = $sqrt(sum2_0 / n0);
    rms1 = $sqrt(sum2_1 / n1);
    $display("clk0 edges %0d rms %f ps, clk1 edges %0d rms %f ps, max %f ps",
             n0, rms0 * 1000.0, n1, rms1 * 1000.0, max_dev * 1000.0);
    checks++;
    if (n0 < 400) begin failures++; $display("too few clk0 edges: %0d", n0); end
    checks++;
    if (rms0 < 0.75 * SIGMA || rms0 > 1.25 * SIGMA) begin failures++; $display("clk0 jitter off"); end
    checks++;
    if (rms1 < 0.75 * SIGMA || rms1 > 1.25 * SIGMA) begin failures++; $display("clk1 jitter off"); end
    checks++;
    if (max_dev > 8.0 * SIGMA) begin failures++; $display("edge off grid by %f ns", max_dev); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
