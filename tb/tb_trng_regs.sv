// tb_trng_regs: drives random bits into the register block and acts as the
// processor on the bus.  Checks: word assembly (first bit in the MSB), V set
// after DATA_W bits and cleared by a data read, IE gating the interrupt,
// C mirrored in the status word, overwrite of an unread word, a read that
// coincides with a new word, and that undefined bits read as zero.
module tb_trng_regs;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned W = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bit_in = 1'b0, bit_valid = 1'b0, clk_ok = 1'b0;
  logic cs = 1'b0, address = 1'b0, rd = 1'b0, wr = 1'b0;
  logic [W-1:0] wdata = '0, rdata;
  logic irq;
  int checks = 0, failures = 0;

  trng_regs dut (
    .clk(clk), .rst_n(rst_n), .bit_in(bit_in), .bit_valid(bit_valid), .clk_ok(clk_ok),
    .chipselect(cs), .address(address), .read(rd), .write(wr),
    .writedata(wdata), .readdata(rdata), .irq(irq));

  always #15 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  // send one bit, with a few idle cycles before the strobe
  task automatic send_bit(input logic b);
    repeat ($urandom_range(0, 3)) @(negedge clk);
    @(negedge clk);
    bit_in = b; bit_valid = 1'b1;
    @(negedge clk);
    bit_valid = 1'b0;
  endtask

  task automatic send_word(input logic [W-1:0] w);
    for (int i = W - 1; i >= 0; i--) send_bit(w[i]);
  endtask

  // zero-wait-state bus read: data valid in the read cycle
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

  logic [W-1:0] d, w1, w2, w3;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    bus_read(1'b1, d); check("status after reset", d, 16'h0000);
    check("irq after reset", {15'b0, irq}, 16'h0);

    // first word, interrupts disabled
    w1 = 16'($urandom);
    send_word(w1);
    @(negedge clk);
    check("irq masked by IE=0", {15'b0, irq}, 16'h0);
    bus_read(1'b1, d); check("status V=1 C=0", d, 16'h0001);
    bus_read(1'b1, d); check("status read leaves V", d, 16'h0001);
    bus_read(1'b0, d); check("data word 1", d, w1);
    bus_read(1'b1, d); check("status V cleared by read", d, 16'h0000);

    // C follows the clock checker
    clk_ok = 1'b1;
    bus_read(1'b1, d); check("status C=1", d, 16'h0004);

    // enable interrupts; second word raises irq
    bus_write(1'b1, 16'hfffd);  // only bit 0 (IE) has a meaning
    w2 = 16'($urandom);
    send_word(w2);
    @(negedge clk);
    check("irq with IE=1, V=1", {15'b0, irq}, 16'h1);
    bus_write(1'b0, 16'h1234);  // data register is read only
    bus_read(1'b0, d); check("data word 2", d, w2);
    @(negedge clk);
    check("irq cleared by data read", {15'b0, irq}, 16'h0);

    // an unread word is replaced by the next one
    w1 = 16'($urandom);
    w2 = 16'($urandom);
    send_word(w1);
    send_word(w2);
    bus_read(1'b0, d); check("overwritten data", d, w2);

    // a read in the same cycle as a completing word leaves V set
    w3 = 16'($urandom);
    for (int i = W - 1; i >= 1; i--) send_bit(w3[i]);
    @(negedge clk);
    bit_in = w3[0]; bit_valid = 1'b1;
    cs = 1'b1; rd = 1'b1; address = 1'b0;
    @(negedge clk);
    bit_valid = 1'b0; cs = 1'b0; rd = 1'b0;
    bus_read(1'b1, d); check("V kept by new word during read", d, 16'h0005);
    bus_read(1'b0, d); check("data word 3", d, w3);

    // disable interrupts again
    bus_write(1'b1, 16'h0000);
    send_word(16'hA5C3);
    @(negedge clk);
    check("irq off after IE=0", {15'b0, irq}, 16'h0);
    bus_read(1'b0, d); check("data word 4", d, 16'hA5C3);

    // many random words
    for (int k = 0; k < 20; k++) begin
      w1 = 16'($urandom);
      send_word(w1);
      bus_read(1'b1, d); check("status V", d, 16'h0005);
      bus_read(1'b1, d); check("status V kept by status read", d, 16'h0005);
      bus_read(1'b0, d); check("random word", d, w1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
