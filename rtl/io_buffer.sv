// io_buffer: double-banked complex operand buffer, used in place of a vector
// register file.
//
// Holds two banks ("even" and "odd") of one complex word each: a real and an
// imaginary 30-bit part. The datapath reads one bank while the external
// synchronous RAM streams the next operand into the other, so the vector
// stream runs without a register file.
//   write: when `we` is high at a rising edge, `din` goes into bank `eve_odd`,
//          part `we_r_i` (0 real, 1 imaginary).
//   read : `dout` is the part `oe_r_i` of the other bank (!eve_odd); it is a
//          combinational read of the registers, so a word written at an edge
//          can be read from the cycle after, once `eve_odd` has flipped.
// Reset clears all four words.
//
// The four words per buffer and the pins eve_odd, oe_r_i, we and we_r_i are
// the document's; that the read port sees the bank not being written (a
// ping-pong) is this design's reading of them.
module io_buffer
  import vmdct_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  eve_odd,
  input  logic  oe_r_i,
  input  logic  we,
  input  logic  we_r_i,
  input  fp30_t din,
  output fp30_t dout
);

  fp30_t mem [2][2];   // [bank][part]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int bk = 0; bk < 2; bk++)
        for (int pt = 0; pt < 2; pt++)
          mem[bk][pt] <= '0;
    end else if (we) begin
      mem[eve_odd][we_r_i] <= din;
    end
  end

  assign dout = mem[!eve_odd][oe_r_i];

endmodule
