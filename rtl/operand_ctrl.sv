// operand_ctrl: operand controller in front of the multiplier or the adder
// (MController / AController of the datapath).
//
// For each of its two operands it picks one of eight sources with a 3-bit
// select (vmdct_pkg::src_e: buffers A, B, C, two taps of the programmable
// delay, the multiplier result, the adder result, zero) and optionally
// negates it. Every source is widened to the adder format first, so the
// multiplier and adder results keep their full 48- and 56-bit mantissas here;
// the multiplier's instance truncates the chosen operand back to 30 bits.
// Negation is exact and renormalises (see vmdct_pkg::acc_neg).
//
// Purely combinational: the selected operands are captured by the first
// pipeline register of the unit behind the controller.
//
// The document names the two controllers and the select/invert pins
// (Multi_ASEL[2:0], Multi_AINV, SUM_ASEL[2:0], SUM_AINV, ...); which source
// each select code picks is this design's choice.
module operand_ctrl
  import vmdct_pkg::*;
(
  input  fp30_t bus_a,
  input  fp30_t bus_b,
  input  fp30_t bus_c,
  input  fp30_t dly1,
  input  fp30_t dly2,
  input  prod_t mul_res,
  input  acc_t  add_res,
  input  src_e  sel_a,
  input  logic  inv_a,
  input  src_e  sel_b,
  input  logic  inv_b,
  output acc_t  op_a,
  output acc_t  op_b
);

  function automatic acc_t pick(input src_e sel, input logic inv,
                                input fp30_t ba, input fp30_t bb, input fp30_t bc,
                                input fp30_t d1, input fp30_t d2,
                                input prod_t m, input acc_t s);
    acc_t v;
    unique case (sel)
      SRC_A:    v = fp30_to_acc(ba);
      SRC_B:    v = fp30_to_acc(bb);
      SRC_C:    v = fp30_to_acc(bc);
      SRC_DLY1: v = fp30_to_acc(d1);
      SRC_DLY2: v = fp30_to_acc(d2);
      SRC_MUL:  v = prod_to_acc(m);
      SRC_ADD:  v = s;
      default:  v = '0;
    endcase
    return inv ? acc_neg(v) : v;
  endfunction

  always_comb begin
    op_a = pick(sel_a, inv_a, bus_a, bus_b, bus_c, dly1, dly2, mul_res, add_res);
    op_b = pick(sel_b, inv_b, bus_a, bus_b, bus_c, dly1, dly2, mul_res, add_res);
  end

endmodule
