// vector_controller: micro-program vector instruction controller.
//
// Holds the micro-program, a table of horizontal pipeline commands (cmd_t),
// in an instruction RAM, and plays a vector instruction out of it as a
// zero-overhead hardware loop.
//
// Load mode (`mode` = 1): each cycle with `load_we` high writes `in_data`
// (the In Data Bus, e.g. read from a boot ROM) to the instruction RAM at the
// load instruction pointer, which then advances. The pointer restarts at 0
// whenever `mode` is 0.
//
// Run mode (`mode` = 0): `start` with a vector instruction `vinstr` (first
// command address, initial delay, body length "pipeline stage number" of
// 1..RING commands, iteration count "long loop number") starts it when idle.
// While one runs, one more may be queued (`vi_ready` high means the queue
// slot is free); it starts right after the last command of the running one,
// so vector instructions with no initial delay follow each other with no gap.
// After `init_delay` idle cycles the body is fetched from the RAM once, issued
// and copied into the RING-entry ring buffer; the remaining iterations are
// replayed from the ring buffer with no gap between iterations. `cmd` is the
// registered pipeline command with `cmd_valid`; outside a vector instruction
// `cmd` is all zero, which writes nothing.
//
// Timing: with `start` high in cycle 0, the first command is on `cmd` in
// cycle init_delay + 2, followed by stage_num * loop_num consecutive commands.
// `busy` is high from cycle 1 up to the cycle before the last command is on
// `cmd`.
// A queued instruction's first command follows the last command of the
// running one after its own init_delay cycles.
//
// The instruction RAM, instruction pointer, ring buffer with a 3-bit pointer,
// the busy flag and the instruction fields (init delay, pipeline stage number,
// long loop number) are the document's. The RAM depth, the field widths,
// loading through a single incrementing pointer, the one-entry queue and the
// start handshake are this design's choices; the document's separate shifter
// is not modelled.
module vector_controller
  import vmdct_pkg::*;
#(
  parameter int unsigned IRAM_DEPTH = 64,
  parameter int unsigned RING       = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    mode,
  input  cmd_t    in_data,
  input  logic    load_we,
  input  logic    start,
  input  vinstr_t vinstr,
  output logic    busy,
  output logic    vi_ready,
  output cmd_t    cmd,
  output logic    cmd_valid
);

  localparam int unsigned AW = $clog2(IRAM_DEPTH);
  localparam int unsigned RW = $clog2(RING);

  typedef enum logic [1:0] {S_IDLE, S_DELAY, S_RUN} state_e;

  cmd_t            iram [IRAM_DEPTH];
  cmd_t            ring [RING];
  logic [AW-1:0]   load_ptr;
  logic [AW-1:0]   fetch_ptr;
  logic [RW-1:0]   idx;
  logic [RW-1:0]   last_idx;
  logic [15:0]     iter;
  logic [15:0]     last_iter;
  logic [7:0]      dcnt;
  state_e          state;
  vinstr_t         pend;
  logic            pend_valid;

  // Instruction RAM write port (load mode).
  always_ff @(posedge clk) begin
    if (mode && load_we) iram[load_ptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                load_ptr <= '0;
    else if (!mode)            load_ptr <= '0;
    else if (load_we)          load_ptr <= load_ptr + 1'b1;
  end

  // Body length, clamped to the ring buffer.
  function automatic logic [RW-1:0] body_last(input logic [3:0] n);
    if (n == 4'd0 || int'(n) > int'(RING)) return RW'(RING - 1);
    return RW'(n - 4'd1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      fetch_ptr <= '0;
      idx       <= '0;
      last_idx  <= '0;
      iter      <= '0;
      last_iter <= '0;
      dcnt      <= '0;
      cmd       <= '0;
      cmd_valid <= 1'b0;
      for (int i = 0; i < int'(RING); i++) ring[i] <= '0;
      pend       <= '0;
      pend_valid <= 1'b0;
    end else begin
      cmd       <= '0;
      cmd_valid <= 1'b0;
      // Queue a vector instruction that arrives while another one runs.
      if (start && !mode && state != S_IDLE && !pend_valid && vinstr.loop_num != '0) begin
        pend       <= vinstr;
        pend_valid <= 1'b1;
      end
      unique case (state)
        S_IDLE: begin
          if (pend_valid) begin
            // Queued in the cycle the previous instruction ended.
            pend_valid <= 1'b0;
            fetch_ptr  <= AW'(pend.vaddr);
            idx        <= '0;
            last_idx   <= body_last(pend.stage_num);
            iter       <= '0;
            last_iter  <= pend.loop_num - 16'd1;
            dcnt       <= pend.init_delay;
            state      <= (pend.init_delay != '0) ? S_DELAY : S_RUN;
          end else if (start && !mode && vinstr.loop_num != '0) begin
            fetch_ptr <= AW'(vinstr.vaddr);
            idx       <= '0;
            last_idx  <= body_last(vinstr.stage_num);
            iter      <= '0;
            last_iter <= vinstr.loop_num - 16'd1;
            dcnt      <= vinstr.init_delay;
            state     <= (vinstr.init_delay != '0) ? S_DELAY : S_RUN;
          end
        end
        S_DELAY: begin
          dcnt <= dcnt - 8'd1;
          if (dcnt == 8'd1) state <= S_RUN;
        end
        S_RUN: begin
          cmd_valid <= 1'b1;
          if (iter == '0) begin
            // First iteration: fetch from the instruction RAM, fill the ring.
            cmd       <= iram[fetch_ptr];
            ring[idx] <= iram[fetch_ptr];
            fetch_ptr <= fetch_ptr + 1'b1;
          end else begin
            cmd <= ring[idx];
          end
          if (idx == last_idx) begin
            idx  <= '0;
            iter <= iter + 16'd1;
            if (iter == last_iter) begin
              if (pend_valid) begin
                // Launch the queued instruction.
                pend_valid <= 1'b0;
                fetch_ptr  <= AW'(pend.vaddr);
                last_idx   <= body_last(pend.stage_num);
                iter       <= '0;
                last_iter  <= pend.loop_num - 16'd1;
                dcnt       <= pend.init_delay;
                state      <= (pend.init_delay != '0) ? S_DELAY : S_RUN;
              end else begin
                state <= S_IDLE;
              end
            end
          end else begin
            idx <= idx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy     = (state != S_IDLE);
  assign vi_ready = !pend_valid;

endmodule
