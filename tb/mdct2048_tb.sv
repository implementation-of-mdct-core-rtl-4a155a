// mdct2048_tb: workload test, a 2048-point MDCT and the IMDCT of its result
// (the long-block transforms of MPEG-2 AAC) on the processor at its default
// configuration, computed directly from the definitions
//   X(k) = 2   sum_{n=0}^{N-1}   x(n) cos(2pi/N (n+n0)(k+1/2)),  k = 0..N/2-1,
//   y(n) = 2/N sum_{k=0}^{N/2-1} X(k) cos(2pi/N (n+n0)(k+1/2)),  n = 0..N-1,
// with n0 = (N/2+1)/2, by the three-way interleaved multiply-accumulate
// program of tb_vmdct_pkg: 342 groups of three 2048-term dot products, then
// 683 groups of three 1024-term dot products, each job a chain of queued
// vector instructions. The testbench plays the boot ROM and the external RAM,
// checks all 1024 coefficients and all 2048 output samples against real-valued
// references computed from each job's own 30-bit inputs, checks that neither
// command stream has a gap, and reports the cycle counts (3 cycles per output
// per input sample, plus the prologue and flush).
module mdct2048_tb;
  import vmdct_pkg::*;
  import tb_vmdct_pkg::*;

  localparam int N      = 2048;
  localparam int GMAX   = (N + 2) / 3;
  localparam int A_HEAD = 0;
  localparam int A_MAC  = 6;
  localparam real PI    = 3.14159265358979323846;

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

  // Current job: K outputs, each a dot product of the M samples xs with the
  // coefficients coef(k, n). inv selects the IMDCT coefficients.
  int    M, K, G;
  logic  inv;
  fp30_t xs [N];
  fp30_t res [N];

  function automatic vinstr_t mkvi(input int a, input int d, input int s, input int l);
    vinstr_t v;
    v.vaddr = 6'(a); v.init_delay = 8'(d); v.stage_num = 4'(s); v.loop_num = 16'(l);
    return v;
  endfunction

  // Coefficient of output k at sample n: MDCT (k spectral, n time) or IMDCT
  // (k time, n spectral).
  function automatic real cosine(input int k, input int n);
    if (inv) return 2.0 / N * $cos(2.0 * PI / N * (k + (N / 2.0 + 1.0) / 2.0) * (n + 0.5));
    return 2.0 * $cos(2.0 * PI / N * (n + (N / 2.0 + 1.0) / 2.0) * (k + 0.5));
  endfunction

  function automatic fp30_t x_at(input int j);
    int g;
    if (j < 2) return '0;
    g = (j - 2) / M;
    if (g >= G) return '0;
    return xs[(j - 2) % M];
  endfunction

  function automatic fp30_t coef_at(input int u);
    int j, g, k;
    j = u / 3;
    if (j < 2) return '0;
    g = (j - 2) / M;
    k = 3 * g + u % 3;
    if (g >= G || k >= K) return '0;
    return real_to_fp30(cosine(k, (j - 2) % M));
  endfunction

  // Run one job; results to res[0..K-1], each checked against its reference.
  task automatic run_mac(input int m, input int kk, input logic iv, input string nm);
    int t0, nvi, nout;
    vinstr_t vis [2 * GMAX + 3];
    M = m; K = kk; G = (kk + 2) / 3; inv = iv;
    nvi = 0;
    nout = 0;
    vis[nvi++] = mkvi(A_HEAD, 0, 6, 1);
    for (int g = 0; g < G; g++) begin
      vis[nvi++] = mkvi(A_HEAD, 0, 6, 1);
      vis[nvi++] = mkvi(A_MAC, 0, 6, (M - 2) / 2);
    end
    vis[nvi++] = mkvi(A_HEAD, 0, 6, 1);
    vis[nvi++] = mkvi(A_MAC, 0, 6, 1);
    t0 = cyc + 2;
    fork
      begin
        for (int i = 0; i < nvi; i++) begin
          while (!vi_ready) @(negedge clk);
          vinstr = vis[i];
          start = 1'b1;
          @(negedge clk);
          start = 1'b0;
        end
      end
      begin
        int gap;
        gap = 0;
        while (cyc < t0) @(negedge clk);
        for (int tau = 0; tau < 3 * (2 + G * M + 4); tau++) begin
          int gh, r, k;
          din      = (tau % 3 == 0) ? x_at(tau / 3 + 1) : fp30_t'('0);
          coeff_in = coef_at(tau + 1);
          #1;
          if (!cmd_valid) gap++;
          if (tau >= 3 * (2 + M)) begin
            gh = (tau / 3 - 2) / M;
            r  = tau - 3 * (2 + gh * M) - 4;
            k  = 3 * (gh - 1) + r;
            if (r >= 0 && r < 3 && k < K) begin
              real rv, sc, p;
              rv = 0.0; sc = 0.0;
              for (int n = 0; n < M; n++) begin
                p   = fp30_real(xs[n]) * cosine(k, n);
                rv += p;
                sc += fabs(p);
              end
              res[k] = dout;
              checks++;
              nout++;
              if (fabs(fp30_real(dout) - rv) > sc * pow2(-18)) begin
                failures++;
                if (failures < 10) $display("FAIL %s(%0d) = %g expected %g", nm, k, fp30_real(dout), rv);
              end
            end
          end
          @(negedge clk);
        end
        checks++;
        if (gap != 0) begin failures++; $display("FAIL %0d cycles without a command", gap); end
      end
    join
    checks++;
    if (nout != K) begin failures++; $display("FAIL %0d outputs checked, expected %0d", nout, K); end
    $display("%s: %0d outputs in %0d cycles from the first command", nm, nout, cyc - t0);
    while (busy || cmd_valid) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    mode = 0; load_we = 0; start = 0; in_data = '0; vinstr = '0;
    din = '0; coeff_in = '0;
    for (int n = 0; n < N; n++) xs[n] = rand_fp30(30, 33);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Boot: load the multiply-accumulate program.
    mode = 1'b1;
    for (int t = 0; t < 6; t++) begin in_data = mac_cmd(1'b1, t); load_we = 1'b1; @(negedge clk); end
    for (int t = 0; t < 6; t++) begin in_data = mac_cmd(1'b0, t); load_we = 1'b1; @(negedge clk); end
    load_we = 1'b0;
    mode = 1'b0;
    @(negedge clk);
    run_mac(N, N / 2, 1'b0, "2048-point MDCT");
    for (int k = 0; k < N / 2; k++) xs[k] = res[k];
    run_mac(N / 2, N, 1'b1, "2048-point IMDCT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6 * (2 + GMAX * N + 4) + 1000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
