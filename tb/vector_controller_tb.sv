// vector_controller_tb: self-checking test of the micro-program controller.
// Loads random commands into the instruction RAM in load mode, then runs
// vector instructions with different start addresses, initial delays, body
// lengths (1..8) and loop counts, including one queued behind a running one.
// A model computes, for every cycle, whether a command is expected and which
// RAM word it must be; the test checks `cmd`/`cmd_valid` cycle by cycle, so
// the start latency (init_delay + 2), the absence of gaps between loop
// iterations and between queued instructions, and `busy` are all verified.
module vector_controller_tb;
  import vmdct_pkg::*;

  localparam int DEPTH = 64;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    mode, load_we, start;
  cmd_t    in_data;
  vinstr_t vinstr;
  logic    busy, vi_ready, cmd_valid;
  cmd_t    cmd;
  cmd_t    image [DEPTH];
  int      checks = 0, failures = 0;
  int      cyc = 0;

  // Expected command stream: exp_cmd[c] valid when exp_v[c].
  localparam int MAXC = 400;
  cmd_t exp_cmd [MAXC];
  logic exp_v   [MAXC];
  logic exp_busy[MAXC];

  vector_controller dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic vinstr_t mkvi(input int a, input int d, input int s, input int l);
    vinstr_t v;
    v.vaddr = 6'(a); v.init_delay = 8'(d); v.stage_num = 4'(s); v.loop_num = 16'(l);
    return v;
  endfunction

  // Model: a vector instruction whose first command is due in cycle c0.
  function automatic int model(input int c0, input vinstr_t v);
    int c;
    c = c0;
    for (int it = 0; it < int'(v.loop_num); it++)
      for (int i = 0; i < int'(v.stage_num); i++) begin
        exp_v[c] = 1'b1;
        exp_cmd[c] = image[(int'(v.vaddr) + i) % DEPTH];
        c++;
      end
    for (int b = c0 - int'(v.init_delay) - 1; b < c; b++) if (b >= 0) exp_busy[b] = 1'b1;
    return c;   // first cycle after the last command
  endfunction

  initial begin
    int t0, tend;
    vinstr_t v1, v2, v3, v4;
    mode = 0; load_we = 0; start = 0; in_data = '0; vinstr = '0;
    for (int c = 0; c < MAXC; c++) begin exp_v[c] = 0; exp_busy[c] = 0; exp_cmd[c] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Load mode.
    @(negedge clk);
    mode = 1;
    for (int i = 0; i < DEPTH; i++) begin
      image[i] = cmd_t'({6'($urandom), 32'($urandom)});
      in_data = image[i];
      load_we = 1;
      @(negedge clk);
    end
    load_we = 0;
    mode = 0;
    repeat (2) @(negedge clk);
    // Run phase: start at known cycles, model the expected stream.
    v1 = mkvi(5, 3, 8, 3);
    v2 = mkvi(20, 0, 3, 4);
    v3 = mkvi(40, 2, 5, 2);
    v4 = mkvi(60, 0, 1, 10);   // wraps around the RAM end
    begin
      int s1, s2, s3, s4, e1, e2, e3;
      t0 = cyc + 10;
      s1 = t0;
      e1 = model(s1 + 3 + 2, v1);
      s2 = e1 + 5;
      e2 = model(s2 + 2, v2);
      s3 = s2 + 1;                    // queued behind v2
      e3 = model(e2 + 2, v3);         // follows v2 after its own init delay
      s4 = e3 + 3;
      tend = model(s4 + 2, v4);
      fork
        begin
          // Drive the starts at the modelled cycles.
          while (cyc < s1) @(negedge clk);
          vinstr = v1; start = 1; @(negedge clk); start = 0;
          while (cyc < s2) @(negedge clk);
          vinstr = v2; start = 1; @(negedge clk);
          vinstr = v3; start = 1; @(negedge clk); start = 0;
          checks++;
          if (vi_ready) begin failures++; $display("FAIL queue slot not taken"); end
          while (cyc < s4) @(negedge clk);
          vinstr = v4; start = 1; @(negedge clk); start = 0;
        end
      begin
        // Check every cycle from t0 to the end of the model.
        while (cyc < t0) @(negedge clk);
        while (cyc < tend + 3) begin
          checks++;
          if (cmd_valid !== exp_v[cyc] || (exp_v[cyc] && cmd !== exp_cmd[cyc])) begin
            failures++;
            $display("FAIL cycle %0d: valid %0d cmd %h, expected %0d %h", cyc, cmd_valid, cmd, exp_v[cyc], exp_cmd[cyc]);
          end
          checks++;
          if (exp_v[cyc] && !busy && exp_v[cyc+1]) begin
            failures++;
            $display("FAIL cycle %0d: busy low while running", cyc);
          end
          @(negedge clk);
        end
      end
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
