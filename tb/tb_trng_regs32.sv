// tb_trng_regs32: the 32-bit variant of the register block (DATA_W = 32,
// the TRNG-32 configuration).  Checks word assembly over 32 bits, V, C, IE,
// the interrupt and that a data read clears V, for a series of random words.
module tb_trng_regs32;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned W = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bit_in = 1'b0, bit_valid = 1'b0, clk_ok = 1'b0;
  logic cs = 1'b0, address = 1'b0, rd = 1'b0, wr = 1'b0;
  logic [W-1:0] wdata = '0, rdata;
  logic irq;
  int checks = 0, failures = 0;

  trng_regs #(.DATA_W(W)) dut (
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

  logic [W-1:0] d, w1;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    bus_read(1'b1, d); check("status after reset", d, 32'h0);
    clk_ok = 1'b1;
    for (int k = 0; k < 12; k++) begin
      if (k == 6) bus_write(1'b1, 32'h1);
      w1 = $urandom;
      send_word(w1);
      @(negedge clk);
      check("irq", {31'b0, irq}, (k >= 6) ? 32'h1 : 32'h0);
      bus_read(1'b1, d); check("status V C", d, 32'h5);
      bus_read(1'b1, d); check("status read leaves V", d, 32'h5);
      bus_read(1'b0, d); check("32-bit word", d, w1);
      bus_read(1'b1, d); check("V cleared", d, 32'h4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
