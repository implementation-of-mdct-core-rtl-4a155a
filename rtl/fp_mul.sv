// fp_mul: three-stage pipelined floating-point multiplier.
//
// Multiplies two 30-bit words (6-bit exponent, 24-bit two's complement
// mantissa, see vmdct_pkg) and returns the full 48-bit product mantissa with
// a 6-bit exponent, the 54-bit word that feeds the adder.
//
//   MR1  radix-4 Booth recoding of the B mantissa into 12 digits in -2..+2,
//        twelve 26-bit partial products, exponent sum.
//   MR2  first levels of the adder tree: 12 partial products -> 3 sums.
//   MR3  last adder of the tree, then normalisation of the product by a left
//        shift of 0..2 bits and exponent clamping.
//
// Operands presented in cycle t give the result in cycle t+3 (three register
// stages, the MR1..MR3 rows of the operation schedule); a new pair can enter
// every cycle. All registers are on the rising clock edge.
//
// The document gives the Booth radix-4 multiplier, its 24-bit mantissa, the
// 26-bit partial products and the pipeline. It builds the tree from 26-bit
// adders with a 31-bit adder at the last node; here the tree is written as
// word-level additions over 48 bits, with the same result. The split of the tree over
// the stages, the exponent bias and the handling of exponent overflow are this
// design's own. An exponent above 63 saturates to the largest value with the
// mantissa kept, one below 0 flushes to zero; either raises `exc`.
module fp_mul
  import vmdct_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  fp30_t a,
  input  fp30_t b,
  output prod_t p,
  output logic  exc
);

  localparam int unsigned NPP = MAN_W / 2;   // 12 Booth digits

  // ---------------- MR1: Booth recoding and partial products ----------------
  logic signed [MAN_W+1:0] pp_d [NPP];
  logic signed [8:0]       esum_d;
  logic                    zero_d;

  always_comb begin
    logic [MAN_W:0] bx;
    logic [2:0]     grp;
    logic signed [MAN_W+1:0] am;
    bx = {b.man, 1'b0};
    am = {{2{a.man[MAN_W-1]}}, a.man};
    for (int i = 0; i < int'(NPP); i++) begin
      grp = bx[2*i +: 3];
      unique case (grp)
        3'b000, 3'b111: pp_d[i] = '0;
        3'b001, 3'b010: pp_d[i] = am;
        3'b011:         pp_d[i] = am <<< 1;
        3'b100:         pp_d[i] = -(am <<< 1);
        3'b101, 3'b110: pp_d[i] = -am;
        default:        pp_d[i] = '0;
      endcase
    end
    esum_d = $signed({3'b000, a.exp}) + $signed({3'b000, b.exp}) - 9'sd30;
    zero_d = (a.man == '0) || (b.man == '0);
  end

  logic signed [MAN_W+1:0] pp_q [NPP];
  logic signed [8:0]       esum_q1;
  logic                    zero_q1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NPP); i++) pp_q[i] <= '0;
      esum_q1 <= '0;
      zero_q1 <= 1'b1;
    end else begin
      pp_q    <= pp_d;
      esum_q1 <= esum_d;
      zero_q1 <= zero_d;
    end
  end

  // ---------------- MR2: adder tree, 12 -> 3 ----------------
  // Each group sums four weighted partial products (weights 4^0..4^3 within
  // the group); group g carries weight 4^(4g).
  logic signed [PMAN_W-1:0] grp_d [3];

  always_comb begin
    for (int g = 0; g < 3; g++) begin
      grp_d[g] = '0;
      for (int j = 0; j < 4; j++)
        grp_d[g] = grp_d[g] + (PMAN_W'(pp_q[4*g+j]) <<< (2*j));
    end
  end

  logic signed [PMAN_W-1:0] grp_q [3];
  logic signed [8:0]        esum_q2;
  logic                     zero_q2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < 3; g++) grp_q[g] <= '0;
      esum_q2 <= '0;
      zero_q2 <= 1'b1;
    end else begin
      grp_q   <= grp_d;
      esum_q2 <= esum_q1;
      zero_q2 <= zero_q1;
    end
  end

  // ---------------- MR3: final add, normalise, clamp ----------------
  prod_t p_d;
  logic  exc_d;

  always_comb begin
    logic signed [PMAN_W-1:0] prod;
    logic signed [8:0]        e;
    prod = grp_q[0] + (grp_q[1] <<< 8) + (grp_q[2] <<< 16);
    e    = esum_q2;
    // |prod| lies in (2^44, 2^46]: at most two bits of left shift.
    if (prod[PMAN_W-1] == prod[PMAN_W-2]) begin
      prod = prod <<< 1;
      e    = e - 9'sd1;
      if (prod[PMAN_W-1] == prod[PMAN_W-2]) begin
        prod = prod <<< 1;
        e    = e - 9'sd1;
      end
    end
    exc_d = 1'b0;
    if (zero_q2) begin
      p_d = '0;
    end else if (e < 0) begin
      p_d   = '0;
      exc_d = 1'b1;
    end else if (e > 9'sd63) begin
      p_d.man = prod;
      p_d.exp = EXP_TOP;
      exc_d   = 1'b1;
    end else begin
      p_d.man = prod;
      p_d.exp = e[EXP_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p   <= '0;
      exc <= 1'b0;
    end else begin
      p   <= p_d;
      exc <= exc_d;
    end
  end

endmodule
