// mdct_fast_tb: workload test, a 2048-point MDCT and IMDCT by the fast
// even/odd decomposition, on the processor at its default configuration, with the
// complex micro-program Z = X + Y*C of tb_vmdct_pkg.
//
// With C_M = exp(j*2pi/M), the MDCT X(k) = 2 sum_n x(n) cos(2pi/N (n+n0)(k+1/2))
// is X(k) = 2 Re[ C_N^(n0(k+1/2)) S(k) ] with S(k) = sum_n x(n) C_N^(n(k+1/2)).
// Splitting S into its even and odd samples, S_M(k) = E(k) + C_M^(k+1/2) O(k),
// and E, O repeat with period M/2 in k, so S_M(k+M/2) = E(k) - C_M^(k+1/2) O(k):
// a radix-2 decimation-in-time flow graph whose butterflies carry the twiddle
// C_M^(m+1/2). The input is taken in bit-reversed order; stage s (span
// h = 2^s, M = 2h) forms X + W*Y and X - W*Y, two elements of one vector run
// per butterfly. The last stage forms only the N/2 bins that are needed, and
// a final run multiplies each by 2*C_N^(n0(k+1/2)) and keeps the real part.
// The testbench plays the boot ROM and the external RAM (it holds the 2048
// complex intermediate values and streams every run's elements). The first
// element of every run is a dummy (its Y and C would be taken from the
// buffers before any were streamed), and one dummy pads the run.
//
// The IMDCT y(n) = 2/N sum_k X(k) cos(2pi/N (n+n0)(k+1/2)) of the result is
// then formed the same way: y(n) = 2/N Re[ C_N^((n+n0)/2) U(n) ] with
// U(n) = sum_k u(k) C_N^(nk), u(k) = X(k) C_N^(n0 k) (zero for k >= N/2): a
// pre-twiddle run, 11 full FFT stages with twiddles C_M^m, and a post-twiddle
// run that keeps the real part.
//
// Checks: every output of every run against real arithmetic on the same
// 30-bit operands; all 1024 coefficients against the MDCT computed directly
// from its definition; all 2048 samples against the IMDCT computed directly
// from those coefficients; no gap in any command stream. Reports the cycle
// counts.
module mdct_fast_tb;
  import vmdct_pkg::*;
  import tb_vmdct_pkg::*;

  localparam int N      = 2048;
  localparam int LOGN   = 11;
  localparam int LMAX   = N + 2;             // elements per run, dummies included
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

  // External RAM: the working array and the operands of one run.
  fp30_t dre [N], dim [N];
  real   x0 [N];
  fp30_t xk [N/2];                           // MDCT coefficients, IMDCT input
  fp30_t ea [LMAX+4], eb [LMAX+4], ec [LMAX+4], ed [LMAX+4], ee [LMAX+4], ef [LMAX+4];
  fp30_t zr [LMAX], zi [LMAX];
  int    nel;                                // real elements in the current run

  function automatic vinstr_t mkvi(input int a, input int d, input int s, input int l);
    vinstr_t v;
    v.vaddr = 6'(a); v.init_delay = 8'(d); v.stage_num = 4'(s); v.loop_num = 16'(l);
    return v;
  endfunction

  function automatic fp30_t el(input fp30_t arr [LMAX+4], input int k);
    if (k < 0 || k >= nel + 6) return '0;
    return arr[k];
  endfunction

  function automatic int bitrev(input int v);
    int r;
    r = 0;
    for (int b = 0; b < LOGN; b++) if (v[b]) r |= 1 << (LOGN - 1 - b);
    return r;
  endfunction

  task automatic check_close(input real got, input real expv, input real scale, input string nm);
    checks++;
    if (fabs(got - expv) > scale) begin
      failures++;
      if (failures < 10) $display("FAIL %s = %g expected %g", nm, got, expv);
    end
  endtask

  task automatic clear_run();
    for (int k = 0; k < LMAX + 4; k++) begin
      ea[k] = '0; eb[k] = '0; ec[k] = '0; ed[k] = '0; ee[k] = '0; ef[k] = '0;
    end
  endtask

  // Element k (1..nel): Z = (ea,eb) + (ec,ed) * (ee,ef).
  task automatic set_el(input int k, input fp30_t xr, input fp30_t xi,
                        input fp30_t yr, input fp30_t yi, input real wr, input real wi);
    ea[k] = xr; eb[k] = xi; ec[k] = yr; ed[k] = yi;
    ee[k] = real_to_fp30(wr); ef[k] = real_to_fp30(wi);
  endtask

  // One vector run of the complex program over elements 0..nel+1; results to
  // zr/zi, each checked against real arithmetic on its operands.
  task automatic run_cx(input string nm, output int ncyc);
    int s1, gap, lr;
    lr = nel + 2;
    s1 = cyc;
    vinstr = mkvi(0, 0, 8, (lr + 4) / 2);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!cmd_valid && cyc < s1 + 50) @(negedge clk);
    gap = 0;
    for (int tau = 0; tau < 4 * (lr + 4); tau++) begin
      int w, s;
      w = tau / 4;
      s = tau % 4;
      unique case (s)
        0: begin din = el(ea, w);     coeff_in = el(ee, w + 1); end
        1: begin din = el(ec, w + 1); coeff_in = '0;            end
        2: begin din = el(eb, w);     coeff_in = el(ef, w + 1); end
        default: begin din = el(ed, w + 1); coeff_in = '0;      end
      endcase
      #1;
      if (!cmd_valid) gap++;
      if (tau >= 13 && (tau - 13) % 4 == 0 && (tau - 13) / 4 < lr) zr[(tau - 13) / 4] = dout;
      if (tau >= 15 && (tau - 15) % 4 == 0 && (tau - 15) / 4 < lr) zi[(tau - 15) / 4] = dout;
      @(negedge clk);
    end
    checks++;
    if (gap != 0) begin failures++; $display("FAIL %0d cycles without a command", gap); end
    while (busy || cmd_valid) @(negedge clk);
    ncyc = cyc - s1;
    for (int k = 1; k <= nel; k++) begin
      real re, im, sc, sci;
      re  = fp30_real(ea[k]) + fp30_real(ec[k]) * fp30_real(ee[k]) - fp30_real(ed[k]) * fp30_real(ef[k]);
      im  = fp30_real(eb[k]) + fp30_real(ed[k]) * fp30_real(ee[k]) + fp30_real(ec[k]) * fp30_real(ef[k]);
      sc  = fabs(fp30_real(ea[k])) + fabs(fp30_real(ec[k]) * fp30_real(ee[k])) + fabs(fp30_real(ed[k]) * fp30_real(ef[k]));
      sci = fabs(fp30_real(eb[k])) + fabs(fp30_real(ed[k]) * fp30_real(ee[k])) + fabs(fp30_real(ec[k]) * fp30_real(ef[k]));
      check_close(fp30_real(zr[k]), re, sc * pow2(-18), $sformatf("%s Re(%0d)", nm, k));
      check_close(fp30_real(zi[k]), im, sci * pow2(-18), $sformatf("%s Im(%0d)", nm, k));
    end
  endtask

  // Radix-2 decimation-in-time stages over dre/dim (input in bit-reversed
  // order, result in natural order). Twiddle of stage s: C_M^(m+off), M = 2h.
  // With half set, the last stage forms only the first N/2 outputs.
  task automatic fft_stages(input real off, input logic half, inout int total);
    int nc;
    for (int st = 0; st < LOGN; st++) begin
      int h, b;
      logic last;
      h    = 1 << st;
      last = half && (st == LOGN - 1);
      clear_run();
      b = 0;
      for (int g = 0; g < N; g += 2 * h) begin
        for (int m = 0; m < h; m++) begin
          real wr, wi;
          wr = $cos(2.0 * PI * (m + off) / (2 * h));
          wi = $sin(2.0 * PI * (m + off) / (2 * h));
          if (last) begin
            set_el(b + 1, dre[g+m], dim[g+m], dre[g+m+h], dim[g+m+h], wr, wi);
          end else begin
            set_el(2 * b + 1, dre[g+m], dim[g+m], dre[g+m+h], dim[g+m+h], wr, wi);
            set_el(2 * b + 2, dre[g+m], dim[g+m], dre[g+m+h], dim[g+m+h], -wr, -wi);
          end
          b++;
        end
      end
      nel = last ? b : 2 * b;
      run_cx($sformatf("stage %0d", st), nc);
      total += nc;
      b = 0;
      for (int g = 0; g < N; g += 2 * h) begin
        for (int m = 0; m < h; m++) begin
          if (last) begin
            dre[g+m] = zr[b+1]; dim[g+m] = zi[b+1];
          end else begin
            dre[g+m]   = zr[2*b+1]; dim[g+m]   = zi[2*b+1];
            dre[g+m+h] = zr[2*b+2]; dim[g+m+h] = zi[2*b+2];
          end
          b++;
        end
      end
    end
  endtask

  initial begin
    int total, nc;
    real n0;
    mode = 0; load_we = 0; start = 0; in_data = '0; vinstr = '0;
    din = '0; coeff_in = '0;
    total = 0;
    n0 = (N / 2.0 + 1.0) / 2.0;
    for (int i = 0; i < N; i++) begin
      fp30_t r;
      r = rand_fp30(29, 32);
      x0[i] = fp30_real(r);
      dre[bitrev(i)] = r;
      dim[bitrev(i)] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    mode = 1'b1;
    for (int t = 0; t < 8; t++) begin in_data = cx_cmd(t); load_we = 1'b1; @(negedge clk); end
    load_we = 1'b0;
    mode = 1'b0;
    @(negedge clk);

    // Butterfly stages of the odd-frequency transform S(k).
    fft_stages(0.5, 1'b1, total);

    // X(k) = Re[ S(k) * 2 C_N^(n0(k+1/2)) ].
    clear_run();
    nel = N / 2;
    for (int k = 0; k < N / 2; k++)
      set_el(k + 1, '0, '0, dre[k], dim[k],
             2.0 * $cos(2.0 * PI / N * n0 * (k + 0.5)), 2.0 * $sin(2.0 * PI / N * n0 * (k + 0.5)));
    run_cx("post", nc);
    total += nc;

    // All coefficients against the definition.
    for (int k = 0; k < N / 2; k++) begin
      real rv, sc, c;
      rv = 0.0; sc = 0.0;
      for (int n = 0; n < N; n++) begin
        c   = 2.0 * $cos(2.0 * PI / N * (n + n0) * (k + 0.5));
        rv += x0[n] * c;
        sc += fabs(x0[n]) * 2.0;
      end
      check_close(fp30_real(zr[k+1]), rv, sc * pow2(-16), $sformatf("X(%0d)", k));
    end
    $display("2048-point fast MDCT: %0d runs in %0d cycles", LOGN + 1, total);

    // IMDCT of the coefficients just computed:
    // y(n) = 2/N Re[ C_N^((n+n0)/2) U(n) ], U(n) = sum_k u(k) C_N^(nk),
    // u(k) = X(k) C_N^(n0 k) for k < N/2 and 0 above.
    for (int k = 0; k < N / 2; k++) xk[k] = zr[k+1];
    total = 0;
    clear_run();
    nel = N / 2;
    for (int k = 0; k < N / 2; k++)
      set_el(k + 1, '0, '0, xk[k], '0, $cos(2.0 * PI / N * n0 * k), $sin(2.0 * PI / N * n0 * k));
    run_cx("pre", nc);
    total += nc;
    for (int k = 0; k < N; k++) begin
      dre[bitrev(k)] = (k < N / 2) ? zr[k+1] : fp30_t'('0);
      dim[bitrev(k)] = (k < N / 2) ? zi[k+1] : fp30_t'('0);
    end
    fft_stages(0.0, 1'b0, total);
    clear_run();
    nel = N;
    for (int n = 0; n < N; n++)
      set_el(n + 1, '0, '0, dre[n], dim[n],
             2.0 / N * $cos(PI / N * (n + n0)), 2.0 / N * $sin(PI / N * (n + n0)));
    run_cx("post", nc);
    total += nc;
    for (int n = 0; n < N; n++) begin
      real rv, sc;
      rv = 0.0; sc = 0.0;
      for (int k = 0; k < N / 2; k++) begin
        rv += 2.0 / N * fp30_real(xk[k]) * $cos(2.0 * PI / N * (n + n0) * (k + 0.5));
        sc += 2.0 / N * fabs(fp30_real(xk[k]));
      end
      check_close(fp30_real(zr[n+1]), rv, sc * pow2(-16), $sformatf("y(%0d)", n));
    end
    $display("2048-point fast IMDCT: %0d runs in %0d cycles", LOGN + 2, total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((2 * LOGN + 3) * (4 * (LMAX + 4) + 100) + 1000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
