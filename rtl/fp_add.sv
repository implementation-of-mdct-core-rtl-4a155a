// fp_add: three-stage pipelined floating-point adder with a 56-bit mantissa.
//
// Adds two words in the adder format (6-bit exponent, 56-bit two's complement
// mantissa, see vmdct_pkg). The wide mantissa lets the adder accumulate full
// 48-bit products from the multiplier without a separate MAC unit.
//
//   AR1  pre-normaliser: compare exponents, swap so the larger one is kept,
//        shift the other mantissa right (arithmetic barrel shifter).
//   AR2  57-bit mantissa addition (one guard bit of headroom).
//   AR3  post-normaliser: count the redundant sign bits of the sum, shift it
//        left (barrel shifter) and correct the exponent; clamp the exponent.
//
// Operands presented in cycle t give the sum in cycle t+3 (the AR1..AR3 rows of
// the operation schedule); a new pair can enter every cycle. All registers are
// on the rising clock edge.
//
// The 6-bit exponent, 56-bit mantissa and the pre/post-normalising barrel
// shifters follow the document. The document builds its shifters 46 bits wide
// and its mantissa adder from carry-save adders; here both shifters span the
// 57-bit sum and the addition is a plain two-operand adder. Bits shifted out on
// alignment are dropped (truncation). A result exponent above 63 saturates with
// the mantissa kept, one below 0 flushes to zero; either raises `exc` with the
// result, which the chip brings out as SUM_MIN_INF.
module fp_add
  import vmdct_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  acc_t a,
  input  acc_t b,
  output acc_t s,
  output logic exc
);

  localparam int unsigned SW = AMAN_W + 1;   // 57-bit working width

  // ---------------- AR1: pre-normalisation ----------------
  logic signed [SW-1:0] big_d, sml_d;
  logic [EXP_W-1:0]     e_d;

  always_comb begin
    logic a_z, b_z, swap;
    logic [EXP_W-1:0] d;
    logic signed [SW-1:0] am, bm;
    a_z  = (a.man == '0);
    b_z  = (b.man == '0);
    am   = {a.man[AMAN_W-1], a.man};
    bm   = {b.man[AMAN_W-1], b.man};
    // The operand with the smaller exponent (or a zero one) is aligned.
    swap = a_z || (!b_z && (b.exp > a.exp));
    if (swap) begin
      big_d = bm;
      e_d   = b.exp;
      d     = b.exp - a.exp;
      sml_d = am >>> d;
      if (a_z) sml_d = '0;
    end else begin
      big_d = am;
      e_d   = a.exp;
      d     = a.exp - b.exp;
      sml_d = bm >>> d;
      if (b_z) sml_d = '0;
    end
  end

  logic signed [SW-1:0] big_q, sml_q;
  logic [EXP_W-1:0]     e_q1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      big_q <= '0;
      sml_q <= '0;
      e_q1  <= '0;
    end else begin
      big_q <= big_d;
      sml_q <= sml_d;
      e_q1  <= e_d;
    end
  end

  // ---------------- AR2: mantissa addition ----------------
  logic signed [SW-1:0] sum_q;
  logic [EXP_W-1:0]     e_q2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q <= '0;
      e_q2  <= '0;
    end else begin
      sum_q <= big_q + sml_q;
      e_q2  <= e_q1;
    end
  end

  // ---------------- AR3: post-normalisation ----------------
  acc_t s_d;
  logic exc_d;

  always_comb begin
    int unsigned lz;
    logic        found;
    logic signed [SW-1:0] n;
    logic signed [8:0]    e;
    // Redundant sign bits below the sign bit.
    lz    = 0;
    found = 1'b0;
    for (int i = int'(SW) - 2; i >= 0; i--) begin
      if (!found) begin
        if (sum_q[i] == sum_q[SW-1]) lz++;
        else found = 1'b1;
      end
    end
    n     = sum_q <<< lz;   // n[0] is dropped: truncation to 56 bits
    e     = $signed({3'b000, e_q2}) + 9'sd1 - 9'(lz);
    exc_d = 1'b0;
    if (sum_q == '0) begin
      s_d = '0;
    end else if (e < 0) begin
      s_d   = '0;
      exc_d = 1'b1;
    end else if (e > 9'sd63) begin
      s_d.man = n[SW-1:1];
      s_d.exp = EXP_TOP;
      exc_d   = 1'b1;
    end else begin
      s_d.man = n[SW-1:1];
      s_d.exp = e[EXP_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s   <= '0;
      exc <= 1'b0;
    end else begin
      s   <= s_d;
      exc <= exc_d;
    end
  end

endmodule
