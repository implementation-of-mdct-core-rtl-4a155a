// vector_mdct_tb: end-to-end test of the vector MDCT processor at its default
// configuration. The testbench plays the boot ROM (loading the micro-program
// through the In Data Bus) and the external synchronous RAM (streaming
// operands in on din/coeff_in and taking results from dout in the cycles the
// micro-program sets).
//   Phase 1: the complex operation Z = X + Y*C (the butterfly of the fast
//            MDCT flow graphs) over a vector of L random elements, one
//            vector instruction with an initial delay; checks the start
//            latency, the command count and every Re/Im result.
//   Phase 2: a 16-point MDCT computed directly from its definition
//            X(k) = sum_n x(n) * 2cos(2pi/N (n+n0)(k+1/2)), three outputs at a
//            time with the interleaved multiply-accumulate program, as a chain
//            of queued vector instructions; checks all N/2 outputs against a
//            real-valued reference.
//   Phase 3: a 16-point IMDCT, x(n) = 2/N sum_k X(k) cos(...), n = 0..N-1,
//            with the same program (dot products of length N/2); checks all
//            N outputs.
//   Phase 4: time-domain aliasing cancellation. Two frames of N samples,
//            overlapping by N/2, each windowed by the sine window
//            w(n) = sin(pi/N (n+1/2)) (folded into the coefficients), go
//            through the MDCT and the IMDCT on the processor; the windowed
//            second half of frame 0 plus the windowed first half of frame 1
//            must give back the N/2 input samples they share.
//   Phase 5: the same program on huge operands; checks that both exception
//            flags (Testout for the multiplier, SUM_MIN_INF for the adder)
//            are raised.
// It counts how often each mechanism occurs (initial delay, ring-buffer
// replay, queued instruction, programmable delay, operand negation, adder
// feedback, buffer bank swaps, both exception flags) and fails if one never
// does.
module vector_mdct_tb;
  import vmdct_pkg::*;
  import tb_vmdct_pkg::*;

  localparam int L      = 32;    // complex elements in phase 1
  localparam int INIT   = 3;     // initial delay of the phase-1 instruction
  localparam int N      = 16;    // MDCT length in phases 2 and 3
  localparam int MAXG   = (N + 2) / 3;       // groups of three outputs, at most
  localparam int A_CX   = 0;     // instruction RAM layout
  localparam int A_HEAD = 8;
  localparam int A_MAC  = 14;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    mode, load_we, start;
  cmd_t    in_data;
  vinstr_t vinstr;
  logic    busy, vi_ready, cmd_valid;
  fp30_t   din, coeff_in, dout;
  logic    sum_min_inf, testout;
  int      checks = 0, failures = 0;
  int      cyc = 0;

  vector_mdct dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- mechanism counters ----------------
  int n_init = 0, n_replay = 0, n_queue = 0, n_delay = 0, n_neg = 0;
  int n_feedback = 0, n_swap = 0, n_mulexc = 0, n_addexc = 0, n_cmds = 0, n_imdct = 0;
  int n_tdac = 0;
  logic last_o_eve = 1'b0;

  always @(negedge clk) if (rst_n) begin
    if (cmd_valid) begin
      n_cmds++;
      if (dut.cmd.sum_asel == SRC_DLY1 || dut.cmd.sum_bsel == SRC_DLY1) n_delay++;
      if (dut.cmd.sum_ainv || dut.cmd.sum_binv) n_neg++;
      if (dut.cmd.sum_asel == SRC_ADD || dut.cmd.sum_bsel == SRC_ADD) n_feedback++;
      if (dut.cmd.o.we && dut.cmd.o.eve_odd != last_o_eve) n_swap++;
      if (dut.cmd.o.we) last_o_eve = dut.cmd.o.eve_odd;
    end
    if (dut.u_ctrl.state == dut.u_ctrl.S_RUN && dut.u_ctrl.iter != '0) n_replay++;
    if (!vi_ready) n_queue++;
    if (testout) n_mulexc++;
    if (sum_min_inf) n_addexc++;
  end

  function automatic vinstr_t mkvi(input int a, input int d, input int s, input int l);
    vinstr_t v;
    v.vaddr = 6'(a); v.init_delay = 8'(d); v.stage_num = 4'(s); v.loop_num = 16'(l);
    return v;
  endfunction

  task automatic load_word(input int addr, input cmd_t c);
    // The load pointer counts from 0 in program order.
    if (addr < 0) $display("bad address");
    in_data = c;
    load_we = 1'b1;
    @(negedge clk);
    load_we = 1'b0;
  endtask

  task automatic check_close(input real got, input real expv, input real scale, input string nm);
    checks++;
    if (fabs(got - expv) > scale * pow2(-18)) begin
      failures++;
      $display("FAIL %s = %g expected %g", nm, got, expv);
    end
  endtask

  // ---------------- phase 1 data ----------------
  fp30_t ea [L+4], eb [L+4], ec [L+4], ed [L+4], ee [L+4], ef [L+4];

  function automatic fp30_t el(input fp30_t arr [L+4], input int k);
    if (k < 0 || k >= L + 4) return '0;
    return arr[k];
  endfunction

  // ---------------- phase 2 data ----------------
  // Current dot-product job: K outputs of length M (M even, at least 4).
  int    M, K, G;
  fp30_t xs [N];
  fp30_t cf [N][N];
  logic  huge;
  fp30_t res [N];                            // outputs of the last run_mac

  function automatic fp30_t x_at(input int j);
    int g, n;
    if (j < 2) return '0;
    g = (j - 2) / M;
    n = (j - 2) % M;
    if (g >= G) return '0;
    return xs[n];
  endfunction

  function automatic fp30_t coef_at(input int u);
    int j, r, g, n, k;
    j = u / 3;
    r = u % 3;
    if (j < 2) return '0;
    g = (j - 2) / M;
    n = (j - 2) % M;
    k = 3 * g + r;
    if (g >= G || k >= K) return '0;
    return cf[k][n];
  endfunction

  // Run the interleaved multiply-accumulate program: out(k) = sum_n xs[n]*cf[k][n].
  task automatic run_mac(input int m, input int kk, input string nm);
    int t0, tau, nvi;
    vinstr_t vis [2 * MAXG + 3];
    M = m;
    K = kk;
    G = (kk + 2) / 3;
    nvi = 0;
    vis[nvi++] = mkvi(A_HEAD, 0, 6, 1);                 // prologue
    for (int g = 0; g < G; g++) begin
      vis[nvi++] = mkvi(A_HEAD, 0, 6, 1);
      vis[nvi++] = mkvi(A_MAC, 0, 6, (M - 2) / 2);
    end
    vis[nvi++] = mkvi(A_HEAD, 0, 6, 1);                 // flush
    vis[nvi++] = mkvi(A_MAC, 0, 6, 1);
    t0 = cyc + 2;
    fork
      begin
        // Issue the chain: the first starts now, the others are queued.
        for (int i = 0; i < nvi; i++) begin
          while (!vi_ready) @(negedge clk);
          vinstr = vis[i];
          start = 1'b1;
          @(negedge clk);
          start = 1'b0;
        end
      end
      begin
        // External RAM: stream the operands, take the results.
        while (cyc < t0) @(negedge clk);
        for (tau = 0; tau < 3 * (2 + G * M + 4); tau++) begin
          int gh, r, k;
          din      = (tau % 3 == 0) ? x_at(tau / 3 + 1) : fp30_t'('0);
          coeff_in = coef_at(tau + 1);
          #1;
          checks++;
          if (!cmd_valid) begin
            failures++;
            $display("FAIL gap in the MDCT command stream at %0d", tau);
          end
          // Results of group gh-1 at cycles 4..6 of the head of group gh.
          if (tau >= 3 * (2 + M)) begin
            gh = (tau / 3 - 2) / M;
            r  = tau - 3 * (2 + gh * M) - 4;
            k  = 3 * (gh - 1) + r;
            if (r >= 0 && r < 3 && k < K && !huge) begin
              real rv, sc;
              rv = 0.0; sc = 0.0;
              for (int n = 0; n < M; n++) begin
                rv += fp30_real(xs[n]) * fp30_real(cf[k][n]);
                sc  += fabs(fp30_real(xs[n]) * fp30_real(cf[k][n]));
              end
              check_close(fp30_real(dout), rv, sc, $sformatf("%s(%0d)", nm, k));
              res[k] = dout;
              if (nm == "x") n_imdct++;
            end
          end
          @(negedge clk);
        end
      end
    join
  endtask

  initial begin
    int s1, t1;
    real pi;
    pi = 3.14159265358979323846;
    mode = 0; load_we = 0; start = 0; in_data = '0; vinstr = '0;
    din = '0; coeff_in = '0; huge = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---------- load the micro-program ----------
    mode = 1'b1;
    for (int t = 0; t < 8; t++) load_word(A_CX + t, cx_cmd(t));
    for (int t = 0; t < 6; t++) load_word(A_HEAD + t, mac_cmd(1'b1, t));
    for (int t = 0; t < 6; t++) load_word(A_MAC + t, mac_cmd(1'b0, t));
    mode = 1'b0;
    @(negedge clk);

    // ---------- phase 1: Z = X + Y*C ----------
    for (int k = 0; k < L + 4; k++) begin
      if (k < L) begin
        ea[k] = rand_fp30(29, 35); eb[k] = rand_fp30(29, 35);
        ec[k] = rand_fp30(29, 35); ed[k] = rand_fp30(29, 35);
        ee[k] = rand_fp30(29, 35); ef[k] = rand_fp30(29, 35);
      end else begin
        ea[k] = '0; eb[k] = '0; ec[k] = '0; ed[k] = '0; ee[k] = '0; ef[k] = '0;
      end
    end
    ec[0] = '0; ed[0] = '0; ee[0] = '0; ef[0] = '0;   // never streamed: reset zeros
    s1 = cyc;
    vinstr = mkvi(A_CX, INIT, 8, (L + 4) / 2);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!cmd_valid && cyc < s1 + 50) @(negedge clk);
    t1 = cyc;
    checks++;
    if (t1 - s1 != INIT + 2) begin
      failures++;
      $display("FAIL first command after %0d cycles, expected %0d", t1 - s1, INIT + 2);
    end else n_init++;
    for (int tau = 0; tau < 4 * (L + 4); tau++) begin
      int w, s, k;
      real re, im, sc;
      w = tau / 4;
      s = tau % 4;
      unique case (s)
        0: begin din = el(ea, w);     coeff_in = el(ee, w + 1); end
        1: begin din = el(ec, w + 1); coeff_in = '0;            end
        2: begin din = el(eb, w);     coeff_in = el(ef, w + 1); end
        default: begin din = el(ed, w + 1); coeff_in = '0;      end
      endcase
      #1;
      checks++;
      if (!cmd_valid) begin failures++; $display("FAIL gap in the command stream at %0d", tau); end
      if (tau >= 13 && (tau - 13) % 4 == 0 && (tau - 13) / 4 < L) begin
        k  = (tau - 13) / 4;
        re = fp30_real(ea[k]) + fp30_real(ec[k]) * fp30_real(ee[k]) - fp30_real(ed[k]) * fp30_real(ef[k]);
        sc = fabs(fp30_real(ea[k])) + fabs(fp30_real(ec[k]) * fp30_real(ee[k])) + fabs(fp30_real(ed[k]) * fp30_real(ef[k]));
        check_close(fp30_real(dout), re, sc, $sformatf("Re Z(%0d)", k));
      end
      if (tau >= 15 && (tau - 15) % 4 == 0 && (tau - 15) / 4 < L) begin
        k  = (tau - 15) / 4;
        im = fp30_real(eb[k]) + fp30_real(ed[k]) * fp30_real(ee[k]) + fp30_real(ec[k]) * fp30_real(ef[k]);
        sc = fabs(fp30_real(eb[k])) + fabs(fp30_real(ed[k]) * fp30_real(ee[k])) + fabs(fp30_real(ec[k]) * fp30_real(ef[k]));
        check_close(fp30_real(dout), im, sc, $sformatf("Im Z(%0d)", k));
      end
      @(negedge clk);
    end
    checks++;
    if (cmd_valid || busy) begin failures++; $display("FAIL phase 1 ran longer than %0d commands", 4 * (L + 4)); end
    repeat (3) @(negedge clk);

    // ---------- phase 2: 16-point MDCT ----------
    for (int n = 0; n < N; n++) xs[n] = rand_fp30(30, 33);
    for (int k = 0; k < N / 2; k++)
      for (int n = 0; n < N; n++)
        cf[k][n] = real_to_fp30(2.0 * $cos(2.0 * pi / N * (n + (N / 2.0 + 1.0) / 2.0) * (k + 0.5)));
    run_mac(N, N / 2, "X");
    while (busy || cmd_valid) @(negedge clk);
    repeat (3) @(negedge clk);

    // ---------- phase 3: 16-point IMDCT of N/2 spectral values ----------
    // x(n) = 2/N * sum_k X(k) cos(2pi/N (n+n0)(k+1/2)), n = 0..N-1.
    for (int k = 0; k < N / 2; k++) xs[k] = rand_fp30(30, 33);
    for (int n = 0; n < N; n++)
      for (int k = 0; k < N / 2; k++)
        cf[n][k] = real_to_fp30(2.0 / N * $cos(2.0 * pi / N * (n + (N / 2.0 + 1.0) / 2.0) * (k + 0.5)));
    run_mac(N / 2, N, "x");
    while (busy || cmd_valid) @(negedge clk);
    repeat (3) @(negedge clk);

    // ---------- phase 4: overlap-add of two windowed frames ----------
    begin
      fp30_t sig [3 * N / 2];
      real   ola [2][N];
      for (int i = 0; i < 3 * N / 2; i++) sig[i] = rand_fp30(30, 32);
      for (int f = 0; f < 2; f++) begin
        for (int n = 0; n < N; n++) xs[n] = sig[f * N / 2 + n];
        for (int k = 0; k < N / 2; k++)
          for (int n = 0; n < N; n++)
            cf[k][n] = real_to_fp30($sin(pi / N * (n + 0.5)) * 2.0 *
                                    $cos(2.0 * pi / N * (n + (N / 2.0 + 1.0) / 2.0) * (k + 0.5)));
        run_mac(N, N / 2, "Xw");
        while (busy || cmd_valid) @(negedge clk);
        repeat (3) @(negedge clk);
        for (int k = 0; k < N / 2; k++) xs[k] = res[k];
        for (int n = 0; n < N; n++)
          for (int k = 0; k < N / 2; k++)
            cf[n][k] = real_to_fp30($sin(pi / N * (n + 0.5)) * 2.0 / N *
                                    $cos(2.0 * pi / N * (n + (N / 2.0 + 1.0) / 2.0) * (k + 0.5)));
        run_mac(N / 2, N, "yw");
        while (busy || cmd_valid) @(negedge clk);
        repeat (3) @(negedge clk);
        for (int n = 0; n < N; n++) ola[f][n] = fp30_real(res[n]);
      end
      for (int n = 0; n < N / 2; n++) begin
        check_close(ola[0][n + N / 2] + ola[1][n], fp30_real(sig[N / 2 + n]), 1.0,
                    $sformatf("overlap-add x(%0d)", N / 2 + n));
        n_tdac++;
      end
    end

    // ---------- phase 5: exponent overflow ----------
    huge = 1'b1;
    for (int n = 0; n < N; n++) begin xs[n].man = 24'h600000; xs[n].exp = 6'd63; end
    for (int k = 0; k < N / 2; k++) for (int n = 0; n < N; n++) cf[k][n] = xs[n];
    run_mac(N, N / 2, "X");
    while (busy || cmd_valid) @(negedge clk);
    repeat (6) @(negedge clk);

    // ---------- mechanisms ----------
    checks++;
    if (n_imdct != N) begin failures++; $display("FAIL %0d IMDCT outputs checked, expected %0d", n_imdct, N); end
    checks++;
    if (n_tdac != N / 2) begin failures++; $display("FAIL %0d samples reconstructed, expected %0d", n_tdac, N / 2); end
    $display("mechanisms: init_delay=%0d ring_replay=%0d queued=%0d prog_delay=%0d negation=%0d feedback=%0d bank_swaps=%0d mul_exc=%0d add_exc=%0d commands=%0d",
             n_init, n_replay, n_queue, n_delay, n_neg, n_feedback, n_swap, n_mulexc, n_addexc, n_cmds);
    checks += 9;
    if (n_init == 0)     begin failures++; $display("FAIL initial delay never exercised"); end
    if (n_replay == 0)   begin failures++; $display("FAIL ring buffer never replayed"); end
    if (n_queue == 0)    begin failures++; $display("FAIL no vector instruction queued"); end
    if (n_delay == 0)    begin failures++; $display("FAIL programmable delay never used"); end
    if (n_neg == 0)      begin failures++; $display("FAIL negation never used"); end
    if (n_feedback == 0) begin failures++; $display("FAIL adder feedback never used"); end
    if (n_swap == 0)     begin failures++; $display("FAIL no buffer bank swap"); end
    if (n_mulexc == 0)   begin failures++; $display("FAIL multiplier exception never raised"); end
    if (n_addexc == 0)   begin failures++; $display("FAIL adder exception never raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
