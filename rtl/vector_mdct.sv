// vector_mdct: micro-programmed vector processor for MDCT/IMDCT.
//
// The vector controller plays micro-programmed vector instructions out of its
// instruction RAM as a stream of horizontal pipeline commands; each command
// drives every control pin of the floating-point datapath for one cycle. Data
// do not sit in a register file: an external synchronous RAM streams operand
// words in on `din` (buffers A and B) and `coeff_in` (coefficient buffer C),
// and takes results from `dout` (buffer O), in the cycles the micro-program
// sets. A butterfly or multiply-accumulate step of the MDCT/IMDCT, an FFT or
// a FIR filter is one loop body of up to eight commands, and the hardware loop
// repeats it over the vector with no overhead.
//
// Interface:
//   mode, load_we, in_data   load the instruction RAM (mode = 1)
//   start, vinstr, busy      run a vector instruction (mode = 0)
//   vi_ready                 a further vector instruction can be queued
//   cmd_valid                a command is being applied this cycle
//   din, coeff_in, dout      data streams of the external RAM (30-bit words)
//   sum_min_inf, testout     adder / multiplier exponent exception
// Timing: with `start` in cycle 0 the first command acts in cycle
// init_delay + 2 (see vector_controller); see vmdct_core for the datapath.
//
// The split into controller and datapath and their connection follow the
// document; the command encoding is this design's.
module vector_mdct
  import vmdct_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    mode,
  input  cmd_t    in_data,
  input  logic    load_we,
  input  logic    start,
  input  vinstr_t vinstr,
  output logic    busy,
  output logic    vi_ready,
  output logic    cmd_valid,
  input  fp30_t   din,
  input  fp30_t   coeff_in,
  output fp30_t   dout,
  output logic    sum_min_inf,
  output logic    testout
);

  cmd_t cmd;

  vector_controller #(.IRAM_DEPTH(64), .RING(8)) u_ctrl (
    .clk, .rst_n, .mode, .in_data, .load_we, .start, .vinstr,
    .busy, .vi_ready, .cmd, .cmd_valid
  );

  vmdct_core u_core (
    .clk, .rst_n, .cmd, .din, .coeff_in, .dout, .sum_min_inf, .testout
  );

endmodule
