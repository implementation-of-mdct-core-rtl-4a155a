// vmdct_core: the vector MDCT datapath (the chip's "Top_pad").
//
// A floating-point multiplier and adder that run independently, fed from
// double-banked buffers instead of a vector register file:
//   A, B   complex input buffers, written from `din` (the external RAM stream)
//   C      complex coefficient buffer, written from `coeff_in`
//   O      complex output buffer, written from the multiplier or the adder
//          (M_A_OUT) and read on `dout`
// MController and AController (operand_ctrl) pick and optionally negate the
// operands of the multiplier and adder from the three buffers, the two taps
// of the four-stage programmable delay, the multiplier result and the adder
// result. The adder can thus accumulate products at full precision, and a
// result that is ready too early is parked in the delay line.
//
// Every control pin of the chip is a field of `cmd` (vmdct_pkg::cmd_t) and acts
// in the cycle it is presented:
//   buffer writes take effect at the rising edge ending the cycle;
//   operands selected in cycle t leave the multiplier or adder in cycle t+3;
//   `dout` is a combinational read of the O buffer.
// SUM_MIN_INF (`sum_min_inf`) flags an adder exponent overflow or underflow
// and Testout (`testout`) the same for the multiplier, both in the cycle the
// affected result appears.
//
// The set of units, their connections and the pin names follow the
// document's block diagram and pad list; the meaning of the two flag pins and
// single-edge clocking (the document launches on the rising and captures on
// the falling edge) are this design's choices.
module vmdct_core
  import vmdct_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  cmd_t  cmd,
  input  fp30_t din,
  input  fp30_t coeff_in,
  output fp30_t dout,
  output logic  sum_min_inf,
  output logic  testout
);

  fp30_t bus_a, bus_b, bus_c, o_din;
  fp30_t tap1, tap2;
  prod_t mul_res;
  acc_t  add_res;
  acc_t  m_op_a, m_op_b, a_op_a, a_op_b;

  io_buffer u_buf_a (
    .clk, .rst_n,
    .eve_odd(cmd.a.eve_odd), .oe_r_i(cmd.a.oe_r_i), .we(cmd.a.we), .we_r_i(cmd.a.we_r_i),
    .din(din), .dout(bus_a)
  );

  io_buffer u_buf_b (
    .clk, .rst_n,
    .eve_odd(cmd.b.eve_odd), .oe_r_i(cmd.b.oe_r_i), .we(cmd.b.we), .we_r_i(cmd.b.we_r_i),
    .din(din), .dout(bus_b)
  );

  io_buffer u_buf_c (
    .clk, .rst_n,
    .eve_odd(cmd.c.eve_odd), .oe_r_i(cmd.c.oe_r_i), .we(cmd.c.we), .we_r_i(cmd.c.we_r_i),
    .din(coeff_in), .dout(bus_c)
  );

  // MUX(2:1) in front of the output buffer.
  assign o_din = cmd.m_a_out ? acc_to_fp30(add_res) : prod_to_fp30(mul_res);

  io_buffer u_buf_o (
    .clk, .rst_n,
    .eve_odd(cmd.o.eve_odd), .oe_r_i(cmd.o.oe_r_i), .we(cmd.o.we), .we_r_i(cmd.o.we_r_i),
    .din(o_din), .dout(dout)
  );

  operand_ctrl u_mctrl (
    .bus_a, .bus_b, .bus_c, .dly1(tap1), .dly2(tap2), .mul_res, .add_res,
    .sel_a(cmd.multi_asel), .inv_a(cmd.multi_ainv),
    .sel_b(cmd.multi_bsel), .inv_b(cmd.multi_binv),
    .op_a(m_op_a), .op_b(m_op_b)
  );

  operand_ctrl u_actrl (
    .bus_a, .bus_b, .bus_c, .dly1(tap1), .dly2(tap2), .mul_res, .add_res,
    .sel_a(cmd.sum_asel), .inv_a(cmd.sum_ainv),
    .sel_b(cmd.sum_bsel), .inv_b(cmd.sum_binv),
    .op_a(a_op_a), .op_b(a_op_b)
  );

  fp_mul u_mul (
    .clk, .rst_n,
    .a(acc_to_fp30(m_op_a)), .b(acc_to_fp30(m_op_b)),
    .p(mul_res), .exc(testout)
  );

  fp_add u_add (
    .clk, .rst_n,
    .a(a_op_a), .b(a_op_b),
    .s(add_res), .exc(sum_min_inf)
  );

  prog_delay #(.DEPTH(4)) u_dly (
    .clk, .rst_n,
    .m_a_delay(cmd.m_a_delay), .mul_res, .add_res,
    .delay_sel1(cmd.delay_sel1), .delay_sel2(cmd.delay_sel2),
    .tap1, .tap2
  );

endmodule
