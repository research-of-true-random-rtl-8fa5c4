// tb_trng_top: end-to-end test of the complete TRNG at its default
// parameters, from a clean 33.3 MHz external clock through both PLL models,
// the divider, sampler, decimator, clock checker and registers, with the
// testbench acting as the processor on sys_clk.
// Mechanisms exercised and counted (each must occur at least once):
//   PLL lock, random-bit strobe, word completion with polling (IE = 0,
//   interrupt masked), interrupt (IE = 1), V cleared by a data read, C = 0
//   before the first window has been judged, C = 1, and an unread word
//   replaced by the next one.
// Rates checked: one bit every 3333 sys_clk cycles, i.e. T_Q = 100.09 us
// (about 10 kbit/s); 1120 CLJ rising edges per T_Q; sys_clk period 30.03 ns.
// Words read over the bus must equal the last 16 bits of the raw stream.
module tb_trng_top;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned W   = 16;
  localparam int unsigned K_D = 3333;
  localparam int unsigned K_M = 1120;
  localparam real T_EXT = 1000.0 / 33.3;
  localparam real T_Q   = T_EXT * 3333.0;

  logic clk_ext = 1'b0, rst_n = 1'b0;
  logic sys_clk, pll_locked;
  logic cs = 1'b0, address = 1'b0, rd = 1'b0, wr = 1'b0;
  logic [W-1:0] wdata = '0, rdata;
  logic irq, rnd_bit, rnd_valid, clj;
  int checks = 0, failures = 0;

  trng_top dut (
    .clk_ext(clk_ext), .rst_n(rst_n), .sys_clk(sys_clk), .pll_locked(pll_locked),
    .chipselect(cs), .address(address), .read(rd), .write(wr),
    .writedata(wdata), .readdata(rdata), .irq(irq),
    .rnd_bit(rnd_bit), .rnd_valid(rnd_valid), .clj(clj));

  always #(T_EXT / 2.0) clk_ext = ~clk_ext;

  initial begin
    #(T_Q * 120.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_lock = 0, n_strobe = 0, n_poll_word = 0, n_masked = 0, n_irq = 0;
  int n_v_clear = 0, n_c_ok = 0, n_c_zero = 0, n_overwrite = 0;

  // raw stream bookkeeping and rate checks
  logic [W-1:0] last_bits = '0;
  int unsigned cyc = 0, last_cyc = 0;
  realtime t_last_strobe = 0.0;
  int clj_rises = 0;
  int n_ones = 0;

  always @(posedge clj) clj_rises++;

  always @(posedge sys_clk) begin
    cyc++;
    if (rst_n && rnd_valid) begin
      if (n_strobe > 0) begin
        checks++;
        if (cyc - last_cyc != K_D) begin
          failures++;
          $display("bit interval %0d sys_clk cycles", cyc - last_cyc);
        end
        checks++;
        if ($realtime - t_last_strobe < T_Q - 1.0 || $realtime - t_last_strobe > T_Q + 1.0) begin
          failures++;
          $display("T_Q = %f ns, expected %f", $realtime - t_last_strobe, T_Q);
        end
        checks++;
        if (clj_rises < K_M - 1 || clj_rises > K_M + 1) begin
          failures++;
          $display("CLJ rises per T_Q %0d", clj_rises);
        end
      end
      clj_rises = 0;
      last_cyc = cyc;
      t_last_strobe = $realtime;
      n_strobe++;
      n_ones += int'(rnd_bit);
      last_bits = {last_bits[W-2:0], rnd_bit};
    end
  end

  task automatic bus_read(input logic a, output logic [W-1:0] d);
    @(negedge sys_clk);
    cs = 1'b1; rd = 1'b1; address = a;
    #1 d = rdata;
    @(negedge sys_clk);
    cs = 1'b0; rd = 1'b0;
  endtask

  task automatic bus_write(input logic a, input logic [W-1:0] d);
    @(negedge sys_clk);
    cs = 1'b1; wr = 1'b1; address = a; wdata = d;
    @(negedge sys_clk);
    cs = 1'b0; wr = 1'b0;
  endtask

  task automatic check(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic read_word(input string how);
    logic [W-1:0] d, expect_word;
    expect_word = last_bits;
    bus_read(1'b1, d);
    check({how, ": status V=1 C=1"}, d, 16'h0005);
    if (d[2]) n_c_ok++;
    bus_read(1'b0, d);
    check({how, ": data word"}, d, expect_word);
    $display("%s word = %h", how, d);
    bus_read(1'b1, d);
    check({how, ": V cleared"}, d & 16'h0001, 16'h0000);
    if (!d[0]) n_v_clear++;
  endtask

  initial begin
    logic [W-1:0] d;
    realtime t0;
    int unsigned c0;
    wait (pll_locked);
    n_lock++;
    repeat (4) @(posedge sys_clk);
    // sys_clk frequency
    t0 = $realtime; c0 = cyc;
    repeat (1000) @(posedge sys_clk);
    checks++;
    if (($realtime - t0) / 1000.0 < T_EXT - 0.001 || ($realtime - t0) / 1000.0 > T_EXT + 0.001) begin
      failures++;
      $display("sys_clk period %f ns", ($realtime - t0) / 1000.0);
    end
    @(negedge sys_clk) rst_n = 1'b1;
    // before the first window has been judged, C and V are 0
    repeat (10) @(posedge sys_clk);
    bus_read(1'b1, d);
    check("status right after reset", d, 16'h0000);
    if (!d[2]) n_c_zero++;

    // word 1: interrupts disabled, poll V
    do begin
      bus_read(1'b1, d);
      if (!d[0]) repeat (200) @(posedge sys_clk);
    end while (!d[0]);
    n_poll_word++;
    checks++;
    if (irq !== 1'b0) failures++; else n_masked++;
    read_word("polled");

    // words 2 and 3: interrupt driven
    bus_write(1'b1, 16'h0001);
    repeat (2) begin
      @(posedge irq);
      n_irq++;
      read_word("interrupt");
      checks++;
      if (irq !== 1'b0) begin failures++; $display("irq still high after read"); end
    end

    // leave two words unread: the data register holds the newer one
    bus_write(1'b1, 16'h0000);
    begin
      int target;
      target = n_strobe + 2 * W;
      while (n_strobe < target) @(posedge sys_clk);
    end
    bus_read(1'b1, d);
    check("status with unread word", d, 16'h0005);
    read_word("overwritten");
    n_overwrite++;

    checks++; if (n_c_zero == 0)    begin failures++; $display("C never 0"); end
    checks++; if (n_lock == 0)      begin failures++; $display("no PLL lock"); end
    checks++; if (n_strobe < 40)    begin failures++; $display("too few bits"); end
    checks++; if (n_poll_word == 0) begin failures++; $display("no polled word"); end
    checks++; if (n_masked == 0)    begin failures++; $display("interrupt never masked"); end
    checks++; if (n_irq < 2)        begin failures++; $display("too few interrupts"); end
    checks++; if (n_v_clear < 3)    begin failures++; $display("V not cleared"); end
    checks++; if (n_c_ok < 3)       begin failures++; $display("C never 1"); end
    checks++;
    if (n_ones == 0 || n_ones == n_strobe) begin failures++; $display("constant output"); end
    $display("locks %0d, bits %0d (ones %0d), polled words %0d, masked irq %0d, irqs %0d, V clears %0d, C ok %0d, C zero %0d, overwrites %0d",
             n_lock, n_strobe, n_ones, n_poll_word, n_masked, n_irq, n_v_clear, n_c_ok, n_c_zero, n_overwrite);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
