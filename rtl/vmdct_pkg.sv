// vmdct_pkg: number formats and the pipeline command word shared by the
// vector MDCT datapath and its micro-program controller.
//
// Number formats (all mantissas are two's complement, exponents biased by 32):
//   fp30_t  : the 30-bit word carried on every bus, in the buffers and in the
//             delay line. 6-bit exponent + 24-bit mantissa; value =
//             man / 2^22 * 2^(exp-32). Normalised means man[23] != man[22]
//             (|man/2^22| in [1,2)); zero is man = 0, exp = 0.
//   prod_t  : the 54-bit multiplier result, 6-bit exponent + 48-bit product
//             mantissa; value = man / 2^46 * 2^(exp-32), normalised like fp30.
//   acc_t   : the adder word, 6-bit exponent + 56-bit mantissa; value =
//             man / 2^54 * 2^(exp-32), normalised like fp30.
// The 6-bit exponent and the 24/56-bit mantissas follow the text; the bias,
// the two's complement encoding and truncation (no rounding) are this
// design's choices.
//
// cmd_t is one horizontal micro-instruction: one field per control pin of the
// datapath, named after the chip's pins. It is applied to the datapath in the
// cycle it is presented.
package vmdct_pkg;

  localparam int unsigned EXP_W  = 6;
  localparam int unsigned MAN_W  = 24;
  localparam int unsigned PMAN_W = 48;
  localparam int unsigned AMAN_W = 56;
  localparam logic [EXP_W-1:0] EXP_TOP = '1;

  typedef struct packed {
    logic [EXP_W-1:0]  exp;
    logic [MAN_W-1:0]  man;
  } fp30_t;

  typedef struct packed {
    logic [EXP_W-1:0]  exp;
    logic [PMAN_W-1:0] man;
  } prod_t;

  typedef struct packed {
    logic [EXP_W-1:0]  exp;
    logic [AMAN_W-1:0] man;
  } acc_t;

  // Operand sources of the multiplier and adder controllers (3-bit selects).
  typedef enum logic [2:0] {
    SRC_A    = 3'd0,   // A buffer read port
    SRC_B    = 3'd1,   // B buffer read port
    SRC_C    = 3'd2,   // C (coefficient) buffer read port
    SRC_DLY1 = 3'd3,   // programmable delay, tap chosen by DelaySEL1
    SRC_DLY2 = 3'd4,   // programmable delay, tap chosen by DelaySEL2
    SRC_MUL  = 3'd5,   // multiplier result
    SRC_ADD  = 3'd6,   // adder result
    SRC_ZERO = 3'd7    // constant zero
  } src_e;

  // Control of one double-banked real/imaginary buffer.
  typedef struct packed {
    logic eve_odd;   // bank written; the other bank is read
    logic oe_r_i;    // read part: 0 real, 1 imaginary
    logic we;        // write enable
    logic we_r_i;    // written part: 0 real, 1 imaginary
  } buf_ctrl_t;

  // One pipeline command (38 bits).
  typedef struct packed {
    buf_ctrl_t  a;
    buf_ctrl_t  b;
    buf_ctrl_t  c;
    buf_ctrl_t  o;
    logic [1:0] delay_sel1;
    logic [1:0] delay_sel2;
    logic       m_a_delay;   // delay-line input: 0 multiplier, 1 adder
    logic       m_a_out;     // output-buffer input: 0 multiplier, 1 adder
    logic       multi_ainv;
    src_e       multi_asel;
    logic       multi_binv;
    src_e       multi_bsel;
    logic       sum_ainv;
    src_e       sum_asel;
    logic       sum_binv;
    src_e       sum_bsel;
  } cmd_t;

  localparam int unsigned CMD_W = $bits(cmd_t);

  // Vector instruction: one zero-overhead loop over a block of pipeline
  // commands held in the instruction RAM.
  typedef struct packed {
    logic [5:0]  vaddr;       // first command in the instruction RAM
    logic [7:0]  init_delay;  // idle cycles before the first command
    logic [3:0]  stage_num;   // commands per loop body, 1..8
    logic [15:0] loop_num;    // loop iterations, 0 = none
  } vinstr_t;

  // Exact negation of a normalised fp30 word, renormalised.
  function automatic fp30_t fp30_neg(input fp30_t x);
    fp30_t r;
    logic [MAN_W-1:0] n;
    r = x;
    n = -x.man;
    if (x.man == '0) begin
      r = '0;
    end else if (x.man == {1'b1, {(MAN_W-1){1'b0}}}) begin
      // -(-2.0) = +2.0 = +1.0 * 2^1
      r.man = {2'b01, {(MAN_W-2){1'b0}}};
      r.exp = (x.exp == EXP_TOP) ? x.exp : x.exp + 1'b1;
    end else if (n[MAN_W-1] == n[MAN_W-2]) begin
      // -(+1.0) = -1.0 = -2.0 * 2^-1
      if (x.exp == '0) r = '0;
      else begin
        r.man = {n[MAN_W-2:0], 1'b0};
        r.exp = x.exp - 1'b1;
      end
    end else begin
      r.man = n;
    end
    return r;
  endfunction

  // Exact negation of a normalised acc word, renormalised.
  function automatic acc_t acc_neg(input acc_t x);
    acc_t r;
    logic [AMAN_W-1:0] n;
    r = x;
    n = -x.man;
    if (x.man == '0) begin
      r = '0;
    end else if (x.man == {1'b1, {(AMAN_W-1){1'b0}}}) begin
      r.man = {2'b01, {(AMAN_W-2){1'b0}}};
      r.exp = (x.exp == EXP_TOP) ? x.exp : x.exp + 1'b1;
    end else if (n[AMAN_W-1] == n[AMAN_W-2]) begin
      if (x.exp == '0) r = '0;
      else begin
        r.man = {n[AMAN_W-2:0], 1'b0};
        r.exp = x.exp - 1'b1;
      end
    end else begin
      r.man = n;
    end
    return r;
  endfunction

  function automatic acc_t fp30_to_acc(input fp30_t x);
    acc_t r;
    r.exp = x.exp;
    r.man = {x.man, {(AMAN_W-MAN_W){1'b0}}};
    return r;
  endfunction

  function automatic acc_t prod_to_acc(input prod_t x);
    acc_t r;
    r.exp = x.exp;
    r.man = {x.man, {(AMAN_W-PMAN_W){1'b0}}};
    return r;
  endfunction

  // Truncating conversions to the 30-bit bus word.
  function automatic fp30_t acc_to_fp30(input acc_t x);
    fp30_t r;
    r.man = x.man[AMAN_W-1 -: MAN_W];
    r.exp = (r.man == '0) ? '0 : x.exp;
    return r;
  endfunction

  function automatic fp30_t prod_to_fp30(input prod_t x);
    fp30_t r;
    r.man = x.man[PMAN_W-1 -: MAN_W];
    r.exp = (r.man == '0) ? '0 : x.exp;
    return r;
  endfunction

endpackage
