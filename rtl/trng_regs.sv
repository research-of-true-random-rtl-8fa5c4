// trng_regs: processor-bus registers of the TRNG peripheral.
//
// Random bits arrive one per T_Q with a strobe.  They are shifted into a
// DATA_W-bit assembly register; after DATA_W new bits the word is copied to
// the read-only data register and the valid flag V is set.  Reading the data
// register clears V (a word completed in the same cycle wins and leaves V
// set).  If nobody reads, a newer word replaces the older one.  The interrupt
// request is V AND IE.
//
// Register map (word offsets, see trng_pkg):
//   0  read : TRNG data (DATA_W bits, first bit received in the MSB)
//   1  read : status  -- bit 0 V (valid data), bit 2 C (proper clocks)
//   1  write: control -- bit 0 IE (interrupt enable)
// Undefined bits read as 0; writes to offset 0 are ignored.
//
// Bus: a simple synchronous slave with zero wait states, as used by a soft
// processor's peripheral bus: chipselect, address, read, write, writedata in
// the clk domain; readdata is valid in the same cycle as read (combinational
// from address), side effects happen at the end of that cycle.
// The map and the flag meanings follow the original peripheral; the bus
// timing, the bit order of the word and the overwrite policy are this
// design's own choices.
module trng_regs #(
  parameter int unsigned DATA_W = trng_pkg::DATA_W_DEFAULT
) (
  input  logic              clk,
  input  logic              rst_n,
  // random bit stream from the decimator
  input  logic              bit_in,
  input  logic              bit_valid,
  // clock state from the clock checker
  input  logic              clk_ok,
  // processor bus
  input  logic              chipselect,
  input  logic              address,
  input  logic              read,
  input  logic              write,
  input  logic [DATA_W-1:0] writedata,
  output logic [DATA_W-1:0] readdata,
  output logic              irq
);

  timeunit 1ns;
  timeprecision 1fs;

  import trng_pkg::*;

  localparam int unsigned NW = $clog2(DATA_W + 1);

  logic [DATA_W-2:0] shift_q;  // the DATA_W-1 bits before the newest
  logic [NW-1:0]     nbits;
  logic [DATA_W-1:0] data_q;
  logic              valid_q;
  logic              ie_q;
  logic              word_done;
  logic              rd_data;
  logic              wr_ctrl;
  logic [DATA_W-1:0] status_w;

  assign word_done = bit_valid && (nbits == NW'(DATA_W - 1));
  assign rd_data   = chipselect && read  && (address == ADDR_DATA);
  assign wr_ctrl   = chipselect && write && (address == ADDR_CSR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_q <= '0;
      nbits   <= '0;
      data_q  <= '0;
      valid_q <= 1'b0;
      ie_q    <= 1'b0;
    end else begin
      if (bit_valid) begin
        shift_q <= (DATA_W-1)'({shift_q, bit_in});
        nbits   <= word_done ? '0 : nbits + 1'b1;
      end
      if (word_done) begin
        data_q  <= {shift_q[DATA_W-2:0], bit_in};
        valid_q <= 1'b1;
      end else if (rd_data) begin
        valid_q <= 1'b0;
      end
      if (wr_ctrl) ie_q <= writedata[CTRL_IE_BIT];
    end
  end

  always_comb begin
    status_w               = '0;
    status_w[STATUS_V_BIT] = valid_q;
    status_w[STATUS_C_BIT] = clk_ok;
  end

  assign readdata = (address == ADDR_DATA) ? data_q : status_w;
  assign irq      = ie_q && valid_q;

  // A read of the data register with no word completing clears V.
  a_read_clears_v: assert property (@(posedge clk) disable iff (!rst_n)
    (rd_data && !word_done) |=> !valid_q);
  // A completed word always leaves V set.
  a_word_sets_v: assert property (@(posedge clk) disable iff (!rst_n)
    word_done |=> valid_q);

endmodule
