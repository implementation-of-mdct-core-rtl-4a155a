// tb_vmdct_pkg: testbench helpers for the vector MDCT processor.
//
// - Conversions of the hardware number formats to `real`, written from the
//   format definitions (value = mantissa * 2^(exp - 32 - fraction bits)), used
//   as the independent reference for every arithmetic check.
// - Random generators of normalised operands.
// - The two micro-programs the testbenches run, as functions returning one
//   pipeline command per body slot:
//   cx_cmd(t)   : 8-command body of the complex operation Z = X + Y*C
//                 (X = a+jb from buffer A, Y = c+jd from B, C = e+jf from C).
//                 Per element, four products ce, df, de, cf enter the
//                 multiplier on consecutive cycles; ce and de wait one cycle
//                 in the programmable delay for their partner product; the
//                 adder forms ce-df and de+cf and then adds a and b. One
//                 element per four cycles; the body covers two elements
//                 because the buffers swap banks every element.
//                 Stream per window w (cycles 4w..4w+3 after the first
//                 command): din = a(w), c(w+1), b(w), d(w+1);
//                 coeff_in = e(w+1), -, f(w+1), -.  Re Z(w) is on dout in
//                 cycle 4w+13, Im Z(w) in cycle 4w+15.
//   mac_cmd(head, t) : 6-command body of a three-way interleaved dot product
//                 (three MDCT outputs at once). Cycle t multiplies the x
//                 sample of triple t/3 (buffer A) by a coefficient (buffer C)
//                 and the adder accumulates the product onto the running sum
//                 three cycles old, so the three sums interleave. The head
//                 variant (first two triples of a group) starts new sums
//                 from zero in slots 3..5 and writes the three finished sums
//                 of the previous group to buffer O; they are on dout in
//                 head cycles 4, 5 and 6.
package tb_vmdct_pkg;
  import vmdct_pkg::*;

  function automatic real pow2(input int n);
    real r;
    r = 1.0;
    if (n >= 0) for (int i = 0; i < n; i++) r = r * 2.0;
    else        for (int i = 0; i < -n; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real fp30_real(input fp30_t x);
    return real'($signed(x.man)) * pow2(int'(x.exp) - 32 - 22);
  endfunction

  function automatic real prod_real(input prod_t x);
    longint m;
    m = longint'($signed(x.man));
    return real'(m) * pow2(int'(x.exp) - 32 - 46);
  endfunction

  function automatic real acc_real(input acc_t x);
    longint m;
    m = longint'($signed(x.man));
    return real'(m) * pow2(int'(x.exp) - 32 - 54);
  endfunction

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // Random normalised 30-bit word with exponent in [emin, emax].
  function automatic fp30_t rand_fp30(input int emin, input int emax);
    fp30_t r;
    logic s;
    s = 1'($urandom);
    r.man = {s, ~s, 22'($urandom)};
    r.exp = 6'(emin + int'($urandom % 32'(emax - emin + 1)));
    return r;
  endfunction

  function automatic acc_t rand_acc(input int emin, input int emax);
    acc_t r;
    logic s;
    s = 1'($urandom);
    r.man = {s, ~s, 22'($urandom), 32'($urandom)};
    r.exp = 6'(emin + int'($urandom % 32'(emax - emin + 1)));
    return r;
  endfunction

  // Nearest 30-bit word to a real value (for building test vectors).
  function automatic fp30_t real_to_fp30(input real v);
    fp30_t r;
    int e;
    real m;
    r = '0;
    if (v == 0.0) return r;
    e = 0;
    m = v;
    // Normalise so that m in [1,2) for v > 0, m in [-2,-1) for v < 0.
    while ((m >= 2.0) || (m < -2.0)) begin m = m / 2.0; e++; end
    while ((m < 1.0) && (m >= -1.0)) begin m = m * 2.0; e--; end
    // Below the smallest exponent the value is flushed to zero.
    if (e + 32 < 0) return r;
    r.man = 24'($rtoi(m * 4194304.0));
    r.exp = 6'(e + 32);
    return r;
  endfunction

  function automatic buf_ctrl_t bc(input logic eve, input logic oe,
                                   input logic we, input logic wri);
    buf_ctrl_t b;
    b.eve_odd = eve;
    b.oe_r_i  = oe;
    b.we      = we;
    b.we_r_i  = wri;
    return b;
  endfunction

  // Complex operation Z = X + Y*C, body slot t in 0..7.
  function automatic cmd_t cx_cmd(input int t);
    cmd_t c;
    logic p;
    int   s;
    p = 1'(t / 4);
    s = t % 4;
    c = '0;
    unique case (s)
      0: begin
        c.a = bc(p, 1'b0, 1'b1, 1'b0);    // write a(w)
        c.b = bc(~p, 1'b0, 1'b0, 1'b0);   // read c
        c.c = bc(~p, 1'b0, 1'b1, 1'b0);   // read e, write e(w+1)
        c.o = bc(~p, 1'b0, 1'b1, 1'b1);   // write Im Z(w-3)
        c.sum_asel = SRC_DLY1; c.sum_bsel = SRC_MUL; c.sum_binv = 1'b1;  // ce - df
      end
      1: begin
        c.a = bc(~p, 1'b1, 1'b0, 1'b0);   // read b(w-2)
        c.b = bc(~p, 1'b1, 1'b1, 1'b0);   // read d, write c(w+1)
        c.c = bc(~p, 1'b1, 1'b0, 1'b0);   // read f
        c.o = bc(p, 1'b0, 1'b0, 1'b0);    // read Re Z(w-3)
        c.sum_asel = SRC_ADD; c.sum_bsel = SRC_A;                        // (de+cf) + b
      end
      2: begin
        c.a = bc(p, 1'b0, 1'b1, 1'b1);    // write b(w)
        c.b = bc(~p, 1'b1, 1'b0, 1'b0);   // read d
        c.c = bc(~p, 1'b0, 1'b1, 1'b1);   // read e, write f(w+1)
        c.o = bc(p, 1'b0, 1'b1, 1'b0);    // write Re Z(w-2)
        c.sum_asel = SRC_DLY1; c.sum_bsel = SRC_MUL;                     // de + cf
      end
      default: begin
        c.a = bc(p, 1'b0, 1'b0, 1'b0);    // read a(w-1)
        c.b = bc(~p, 1'b0, 1'b1, 1'b1);   // read c, write d(w+1)
        c.c = bc(~p, 1'b1, 1'b0, 1'b0);   // read f
        c.o = bc(p, 1'b1, 1'b0, 1'b0);    // read Im Z(w-3)
        c.sum_asel = SRC_ADD; c.sum_bsel = SRC_A;                        // (ce-df) + a
      end
    endcase
    c.multi_asel = SRC_B;
    c.multi_bsel = SRC_C;
    c.m_a_delay  = 1'b0;
    c.m_a_out    = 1'b1;
    c.delay_sel1 = 2'd0;
    c.delay_sel2 = 2'd3;
    return c;
  endfunction

  // Interleaved dot product, body slot t in 0..5; head = first 6 cycles of a group.
  function automatic cmd_t mac_cmd(input logic head, input int t);
    cmd_t c;
    c = '0;
    // A: swaps banks every triple, the next x sample written in slot 0 of a triple.
    c.a = bc(1'((t / 3) + 1), 1'b0, (t % 3) == 0, 1'b0);
    // C: swaps banks every cycle, the coefficient of the next cycle written each cycle.
    c.c = bc(1'(t + 1), 1'b0, 1'b1, 1'b0);
    c.multi_asel = SRC_A;
    c.multi_bsel = SRC_C;
    c.sum_asel   = SRC_MUL;
    c.sum_bsel   = (head && t >= 3) ? SRC_ZERO : SRC_ADD;
    c.m_a_out    = 1'b1;
    if (head) begin
      unique case (t)
        3: c.o = bc(1'b0, 1'b0, 1'b1, 1'b0);   // sum 0 -> O[0].re
        4: c.o = bc(1'b1, 1'b0, 1'b1, 1'b0);   // sum 1 -> O[1].re, read O[0].re
        5: c.o = bc(1'b0, 1'b0, 1'b1, 1'b1);   // sum 2 -> O[0].im, read O[1].re
        default: c.o = bc(1'b0, 1'b0, 1'b0, 1'b0);
      endcase
    end else if (t == 0) begin
      c.o = bc(1'b1, 1'b1, 1'b0, 1'b0);        // read O[0].im
    end
    return c;
  endfunction

endpackage
