// prog_delay: four-stage programmable delay used to resolve pipeline hazards.
//
// A four-word shift register of 30-bit words, shifted on every rising edge.
// Its input is chosen by `m_a_delay` between the multiplier result (0) and the
// adder result (1), truncated to the bus format. Two read taps, `tap1` and
// `tap2`, each give the input of 1 to 4 cycles earlier: `delay_sel1` /
// `delay_sel2` = k selects a delay of k+1 cycles. A result that is ready
// before its partner operand is parked here and read back when the partner
// arrives, so the micro-program needs no stall.
//
// The four stages, the two 2-bit selects (DelaySEL1[1:0], DelaySEL2[1:0]) and
// the M_A_Delay select are the document's; continuous shifting and the
// tap numbering are this design's choices.
module prog_delay
  import vmdct_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              m_a_delay,
  input  prod_t             mul_res,
  input  acc_t              add_res,
  input  logic [$clog2(DEPTH)-1:0] delay_sel1,
  input  logic [$clog2(DEPTH)-1:0] delay_sel2,
  output fp30_t             tap1,
  output fp30_t             tap2
);

  fp30_t sr [DEPTH];
  fp30_t din;

  assign din = m_a_delay ? acc_to_fp30(add_res) : prod_to_fp30(mul_res);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) sr[i] <= '0;
    end else begin
      sr[0] <= din;
      for (int i = 1; i < int'(DEPTH); i++) sr[i] <= sr[i-1];
    end
  end

  assign tap1 = sr[delay_sel1];
  assign tap2 = sr[delay_sel2];

endmodule
