// tb_trng_core: runs the synthesizable TRNG core at its default parameters
// (K_M = 1120, K_D = 3333, 16-bit data) with two testbench clocks that stand
// in for the PLLs: CLK at 33.3 MHz and the PLL4 output at
// 33.3 MHz * 1111/1120 = 33.570 MHz, both phase-locked to a common origin and
// each edge jittered by 15 ps rms.  The testbench samples the CLJ output on
// every CLK edge itself and checks:
//  - each raw bit is the XOR of the K_D samples of its window;
//  - one bit every K_D = 3333 CLK cycles (10 kbit/s at 33.3 MHz);
//  - CLJ has K_M = 1120 rising edges per window (F_CLJ = F_CLK*1120/3333);
//  - C = 1 once the clocks run, V/IE/irq behave, and each 16-bit word read
//    over the bus equals the last 16 raw bits;
//  - C drops to 0 when the PLL clock stops and returns when it restarts;
//  - the bits are not constant (both values occur in reasonable numbers).
module tb_trng_core;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned K_D = 3333;
  localparam int unsigned K_M = 1120;
  localparam int unsigned W   = 16;
  localparam real T_CLK = 1000.0 / 33.3;
  localparam real T_PLL = T_CLK * 1111.0 / 1120.0;
  localparam real SIGMA = 0.015;

  logic clk = 1'b0, pll_clk = 1'b0, rst_n = 1'b0;
  logic cs = 1'b0, address = 1'b0, rd = 1'b0, wr = 1'b0;
  logic [W-1:0] wdata = '0, rdata;
  logic irq, rnd_bit, rnd_valid, clj;
  int checks = 0, failures = 0;
  bit pll_run = 1'b1;

  trng_core dut (
    .clk(clk), .pll_clk(pll_clk), .rst_n(rst_n),
    .chipselect(cs), .address(address), .read(rd), .write(wr),
    .writedata(wdata), .readdata(rdata), .irq(irq),
    .rnd_bit(rnd_bit), .rnd_valid(rnd_valid), .clj(clj));

  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  // jittered clock on the grid t = 10 + k*T/2
  task automatic gen_clock(input real tp, input bit which);
    longint unsigned k;
    real target, d;
    k = 1;
    forever begin
      target = 10.0 + real'(k) * tp / 2.0 + gauss() * SIGMA;
      d = target - $realtime;
      if (d < 0.0) d = 0.0;
      #(d);
      if (which) begin
        if (pll_run) pll_clk = (k % 2 == 0);
      end else begin
        clk = (k % 2 == 0);
      end
      k++;
    end
  endtask

  initial fork
    gen_clock(T_CLK, 1'b0);
    gen_clock(T_PLL, 1'b1);
  join

  initial begin
    #(T_CLK * K_D * 80);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model of sampler + decimator, and stream bookkeeping ----
  bit par [0:(1 << 20) - 1];    // par[n] = XOR of CLJ samples at edges 0..n
  int unsigned n_edge = 0;
  int unsigned last_strobe = 0;
  int n_bits = 0, n_ones = 0;
  logic [W-1:0] last_bits = '0;
  bit check_stream = 1'b1;

  always @(posedge clk) if (rst_n) begin
    // outputs seen here are those after the previous edge n_edge-1
    if (rnd_valid) begin
      if (check_stream && n_edge >= K_D + 2 && n_bits > 0) begin
        checks++;
        if (rnd_bit !== (par[n_edge - 2] ^ par[n_edge - 2 - K_D])) begin
          failures++;
          if (failures < 5) $display("bit %0d differs from reference", n_bits);
        end
        checks++;
        if (n_edge - last_strobe != K_D) begin
          failures++;
          $display("bit interval %0d cycles, expected %0d", n_edge - last_strobe, K_D);
        end
      end
      last_strobe = n_edge;
      n_bits++;
      n_ones += int'(rnd_bit);
      last_bits = {last_bits[W-2:0], rnd_bit};
    end
    par[n_edge] = ((n_edge == 0) ? 1'b0 : par[n_edge - 1]) ^ clj;
    n_edge++;
  end

  // CLJ rising edges per window
  int clj_rises = 0;
  int n_ratio_checks = 0;
  always @(posedge clj) clj_rises++;
  always @(posedge clk) if (rnd_valid && check_stream) begin
    if (n_bits >= 2) begin
      checks++;
      n_ratio_checks++;
      if (clj_rises < K_M - 1 || clj_rises > K_M + 1) begin
        failures++;
        $display("CLJ rising edges per window %0d, expected %0d", clj_rises, K_M);
      end
    end
    clj_rises = 0;
  end

  // ---- bus master ----
  task automatic bus_read(input logic a, output logic [W-1:0] d);
    @(negedge clk);
    cs = 1'b1; rd = 1'b1; address = a;
    #1 d = rdata;
    @(negedge clk);
    cs = 1'b0; rd = 1'b0;
  endtask

  task automatic bus_write(input logic a, input logic [W-1:0] d);
    @(negedge clk);
    cs = 1'b1; wr = 1'b1; address = a; wdata = d;
    @(negedge clk);
    cs = 1'b0; wr = 1'b0;
  endtask

  task automatic check(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wait_bits(input int n);
    int target;
    target = n_bits + n;
    while (n_bits < target) @(posedge clk);
  endtask

  logic [W-1:0] d, expect_word;
  int words = 0;

  initial begin
    repeat (20) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    bus_read(1'b1, d); check("status after reset", d, 16'h0000);

    // enable interrupts, collect three words through the interrupt
    bus_write(1'b1, 16'h0001);
    repeat (3) begin
      @(posedge irq);
      @(negedge clk);
      expect_word = last_bits;
      bus_read(1'b1, d); check("status V=1 C=1", d, 16'h0005);
      bus_read(1'b0, d); check("data word", d, expect_word);
      $display("word %0d = %h", words + 1, d);
      @(negedge clk);
      check("irq cleared", {15'b0, irq}, 16'h0);
      bus_read(1'b1, d); check("V cleared", d & 16'h0001, 16'h0000);
      words++;
    end

    // stop the PLL clock: C must fall
    check_stream = 1'b0;
    pll_run = 1'b0;
    wait_bits(2);
    @(negedge clk);
    bus_read(1'b1, d); check("C with PLL clock stopped", d & 16'h0004, 16'h0000);
    pll_run = 1'b1;
    wait_bits(2);
    @(negedge clk);
    bus_read(1'b1, d); check("C after restart", d & 16'h0004, 16'h0004);

    checks++;
    if (n_ratio_checks < 40) begin failures++; $display("too few ratio checks"); end
    checks++;
    if (n_ones < n_bits / 5 || n_ones > n_bits - n_bits / 5) begin
      failures++;
      $display("bit balance suspicious: %0d ones of %0d", n_ones, n_bits);
    end
    $display("%0d bits, %0d ones", n_bits, n_ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
