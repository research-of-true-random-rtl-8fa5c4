// tb_trng_stats: statistical test of the raw output of the TRNG core at its
// default parameters, with CLK (33.3 MHz) and the PLL4 clock (33.570 MHz)
// generated on a common phase grid with 15 ps rms Gaussian jitter per edge.
// It collects N_BITS raw bits and applies two tests of the NIST SP 800-22
// suite at significance level alpha = 0.01:
//   frequency (monobit): s = |#ones - #zeros| / sqrt(n); pass if
//                        erfc(s/sqrt(2)) >= 0.01, i.e. s <= 2.5758;
//   runs:                pi = #ones/n, V = number of runs;
//                        pass if |pi - 1/2| < 2/sqrt(n) and
//                        |V - 2n pi(1-pi)| / (2 sqrt(2n) pi(1-pi)) <= 1.8214;
//   block frequency:     blocks of M = 100 bits, N = n/M blocks,
//                        chi2 = 4M * sum((ones_i/M - 1/2)^2); pass if
//                        igamc(N/2, chi2/2) >= 0.01, i.e. for N = 20
//                        chi2 <= 37.566 (chi-square, 20 degrees of freedom).
// It also checks the bit rate: exactly one bit per 3333 CLK cycles.
// As a control, a second core gets the same two clocks without jitter: its
// sampled pattern then repeats exactly every T_Q, so every bit after the
// first must be the same.  Its PLL clock is shifted by 3.35 ps, half the
// 6.7 ps step of the edge sweep, so that no two edges coincide exactly and
// time rounding cannot decide a sample.  This shows that the randomness comes from the
// jitter and not from the structure of the logic.
module tb_trng_stats;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int N_BITS = 2000;
  localparam int unsigned K_D = 3333;
  localparam real T_CLK = 1000.0 / 33.3;
  localparam real T_PLL = T_CLK * 1111.0 / 1120.0;
  localparam real SIGMA = 0.015;

  logic clk = 1'b0, pll_clk = 1'b0, rst_n = 1'b0;
  logic clk_nj = 1'b0, pll_clk_nj = 1'b0;
  logic [15:0] rdata_nj;
  logic irq_nj, rnd_bit_nj, rnd_valid_nj, clj_nj;
  logic [15:0] rdata;
  logic irq, rnd_bit, rnd_valid, clj;
  int checks = 0, failures = 0;

  trng_core dut (
    .clk(clk), .pll_clk(pll_clk), .rst_n(rst_n),
    .chipselect(1'b0), .address(1'b0), .read(1'b0), .write(1'b0),
    .writedata(16'h0000), .readdata(rdata), .irq(irq),
    .rnd_bit(rnd_bit), .rnd_valid(rnd_valid), .clj(clj));

  trng_core ctrl (
    .clk(clk_nj), .pll_clk(pll_clk_nj), .rst_n(rst_n),
    .chipselect(1'b0), .address(1'b0), .read(1'b0), .write(1'b0),
    .writedata(16'h0000), .readdata(rdata_nj), .irq(irq_nj),
    .rnd_bit(rnd_bit_nj), .rnd_valid(rnd_valid_nj), .clj(clj_nj));

  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  // which: 0 CLK, 1 PLL clock, 2 CLK without jitter, 3 PLL clock without jitter
  task automatic gen_clock(input real tp, input int which);
    longint unsigned k;
    real target, d;
    k = 1;
    forever begin
      target = 10.0 + real'(k) * tp / 2.0 + ((which < 2) ? gauss() * SIGMA : 0.0)
               + ((which == 3) ? 0.00335 : 0.0);
      d = target - $realtime;
      if (d < 0.0) d = 0.0;
      #(d);
      case (which)
        0: clk        = (k % 2 == 0);
        1: pll_clk    = (k % 2 == 0);
        2: clk_nj     = (k % 2 == 0);
        default: pll_clk_nj = (k % 2 == 0);
      endcase
      k++;
    end
  endtask

  initial fork
    gen_clock(T_CLK, 0);
    gen_clock(T_PLL, 1);
    gen_clock(T_CLK, 2);
    gen_clock(T_PLL, 3);
  join

  int n_nj = 0, changes_nj = 0;
  bit prev_nj;
  always @(posedge clk_nj) if (rst_n && rnd_valid_nj) begin
    if (n_nj >= 2 && rnd_bit_nj != prev_nj) changes_nj++;
    prev_nj = rnd_bit_nj;
    n_nj++;
  end

  initial begin
    #(T_CLK * K_D * (N_BITS + 10));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int M_BLK = 100;
  int n = 0, ones = 0, runs = 0;
  int blk_ones [N_BITS / M_BLK];
  bit prev;
  int unsigned cyc = 0, last_cyc = 0;
  int bad_interval = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && rnd_valid) begin
      if (n > 0 && cyc - last_cyc != K_D) bad_interval++;
      last_cyc = cyc;
      if (n == 0 || rnd_bit != prev) runs++;
      prev = rnd_bit;
      ones += int'(rnd_bit);
      if (n < N_BITS) blk_ones[n / M_BLK] += int'(rnd_bit);
      n++;
    end
  end

  initial begin
    real s_obs, pi, x_runs, chi2;
    foreach (blk_ones[i]) blk_ones[i] = 0;
    repeat (10) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (n == N_BITS);
    s_obs = ((ones > n - ones) ? real'(2 * ones - n) : real'(n - 2 * ones)) / $sqrt(real'(n));
    pi = real'(ones) / real'(n);
    x_runs = (real'(runs) - 2.0 * n * pi * (1.0 - pi));
    if (x_runs < 0.0) x_runs = -x_runs;
    x_runs = x_runs / (2.0 * $sqrt(2.0 * n) * pi * (1.0 - pi));
    $display("%0d bits: %0d ones, %0d runs; monobit s = %f (limit 2.5758), runs x = %f (limit 1.8214)",
             n, ones, runs, s_obs, x_runs);
    chi2 = 0.0;
    foreach (blk_ones[i]) chi2 += (real'(blk_ones[i]) / M_BLK - 0.5) * (real'(blk_ones[i]) / M_BLK - 0.5);
    chi2 = chi2 * 4.0 * M_BLK;
    $display("block frequency chi2 = %f over %0d blocks (limit 37.566)", chi2, N_BITS / M_BLK);
    checks++;
    if (chi2 > 37.566) begin failures++; $display("block frequency test failed"); end
    checks++;
    if (bad_interval != 0) begin failures++; $display("%0d wrong bit intervals", bad_interval); end
    checks++;
    if (s_obs > 2.5758) begin failures++; $display("frequency test failed"); end
    checks++;
    if ((pi - 0.5 >= 2.0 / $sqrt(real'(n))) || (0.5 - pi >= 2.0 / $sqrt(real'(n)))) begin
      failures++; $display("runs test prerequisite failed");
    end
    checks++;
    if (x_runs > 1.8214) begin failures++; $display("runs test failed"); end
    $display("jitter-free control: %0d bits, %0d changes after the second bit", n_nj, changes_nj);
    checks++;
    if (n_nj < N_BITS - 2 || changes_nj != 0) begin failures++; $display("jitter-free control not constant"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
