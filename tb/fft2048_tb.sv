// fft2048_tb: workload test, a 2048-point complex FFT on the processor at its
// default configuration, with the complex micro-program Z = X + Y*C of
// tb_vmdct_pkg as the butterfly.
//
// Radix-2 decimation in time: the input is taken in bit-reversed order, and
// stage s (span h = 2^s, s = 0..10) combines elements i and i+h with the
// twiddle W = exp(-j*2pi*m/(2h)) into X + W*Y and X - W*Y. Each of the 1024
// butterflies of a stage is two elements of one vector run: (X, Y, W) and
// (X, Y, -W). The testbench plays the boot ROM and the external RAM: it keeps
// the 2048 complex values, streams each stage's elements in and stores the
// results. The first element of every run is a dummy (its Y and C would be
// taken from the buffers before any were streamed), and one dummy pads the
// run to whole loop bodies.
//
// Checks: every butterfly output of every stage against real arithmetic on the
// same 30-bit operands; every one of the 2048 final bins against a directly
// computed DFT of the input; that no stage has a gap in its command stream.
// Reports the cycle count of the 11 stages.
module fft2048_tb;
  import vmdct_pkg::*;
  import tb_vmdct_pkg::*;

  localparam int N      = 2048;
  localparam int LOGN   = 11;
  localparam int L      = N + 2;             // elements per run, dummies included
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
  real   x0re [N], x0im [N];
  fp30_t ea [L+4], eb [L+4], ec [L+4], ed [L+4], ee [L+4], ef [L+4];
  fp30_t zr [L], zi [L];
  real   wc [N], ws [N];

  function automatic vinstr_t mkvi(input int a, input int d, input int s, input int l);
    vinstr_t v;
    v.vaddr = 6'(a); v.init_delay = 8'(d); v.stage_num = 4'(s); v.loop_num = 16'(l);
    return v;
  endfunction

  function automatic fp30_t el(input fp30_t arr [L+4], input int k);
    if (k < 0 || k >= L + 4) return '0;
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

  // One vector run of the complex program over ea..ef; results to zr/zi.
  task automatic run_cx(output int ncyc);
    int s1, gap;
    s1 = cyc;
    vinstr = mkvi(0, 0, 8, (L + 4) / 2);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!cmd_valid && cyc < s1 + 50) @(negedge clk);
    gap = 0;
    for (int tau = 0; tau < 4 * (L + 4); tau++) begin
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
      if (tau >= 13 && (tau - 13) % 4 == 0 && (tau - 13) / 4 < L) zr[(tau - 13) / 4] = dout;
      if (tau >= 15 && (tau - 15) % 4 == 0 && (tau - 15) / 4 < L) zi[(tau - 15) / 4] = dout;
      @(negedge clk);
    end
    checks++;
    if (gap != 0) begin failures++; $display("FAIL %0d cycles without a command", gap); end
    while (busy || cmd_valid) @(negedge clk);
    ncyc = cyc - s1;
  endtask

  initial begin
    int total, nc;
    mode = 0; load_we = 0; start = 0; in_data = '0; vinstr = '0;
    din = '0; coeff_in = '0;
    total = 0;
    for (int i = 0; i < N; i++) begin
      wc[i] = $cos(2.0 * PI * i / N);
      ws[i] = $sin(2.0 * PI * i / N);
    end
    for (int i = 0; i < N; i++) begin
      fp30_t r, q;
      r = rand_fp30(29, 32);
      q = rand_fp30(29, 32);
      x0re[i] = fp30_real(r);
      x0im[i] = fp30_real(q);
      dre[bitrev(i)] = r;
      dim[bitrev(i)] = q;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    mode = 1'b1;
    for (int t = 0; t < 8; t++) begin in_data = cx_cmd(t); load_we = 1'b1; @(negedge clk); end
    load_we = 1'b0;
    mode = 1'b0;
    @(negedge clk);

    for (int st = 0; st < LOGN; st++) begin
      int h, b;
      h = 1 << st;
      for (int k = 0; k < L + 4; k++) begin
        ea[k] = '0; eb[k] = '0; ec[k] = '0; ed[k] = '0; ee[k] = '0; ef[k] = '0;
      end
      // Elements 1..N: butterfly b is elements 2b+1 (top) and 2b+2 (bottom).
      b = 0;
      for (int g = 0; g < N; g += 2 * h) begin
        for (int m = 0; m < h; m++) begin
          int i, j, tw;
          fp30_t cr, ci;
          i  = g + m;
          j  = i + h;
          tw = m * (N / (2 * h));
          cr = real_to_fp30(wc[tw]);
          ci = real_to_fp30(-ws[tw]);
          for (int e = 1; e <= 2; e++) begin
            ea[2*b+e] = dre[i]; eb[2*b+e] = dim[i];
            ec[2*b+e] = dre[j]; ed[2*b+e] = dim[j];
            ee[2*b+e] = (e == 1) ? cr : fp30_neg(cr);
            ef[2*b+e] = (e == 1) ? ci : fp30_neg(ci);
          end
          b++;
        end
      end
      run_cx(nc);
      total += nc;
      // Check every output of the stage and store it.
      b = 0;
      for (int g = 0; g < N; g += 2 * h) begin
        for (int m = 0; m < h; m++) begin
          int i, j;
          i = g + m;
          j = i + h;
          for (int e = 1; e <= 2; e++) begin
            int k;
            real re, im, sc, sci;
            k   = 2 * b + e;
            re  = fp30_real(ea[k]) + fp30_real(ec[k]) * fp30_real(ee[k]) - fp30_real(ed[k]) * fp30_real(ef[k]);
            im  = fp30_real(eb[k]) + fp30_real(ed[k]) * fp30_real(ee[k]) + fp30_real(ec[k]) * fp30_real(ef[k]);
            sc  = fabs(fp30_real(ea[k])) + fabs(fp30_real(ec[k]) * fp30_real(ee[k])) + fabs(fp30_real(ed[k]) * fp30_real(ef[k]));
            sci = fabs(fp30_real(eb[k])) + fabs(fp30_real(ed[k]) * fp30_real(ee[k])) + fabs(fp30_real(ec[k]) * fp30_real(ef[k]));
            check_close(fp30_real(zr[k]), re, sc * pow2(-18), $sformatf("stage %0d Re(%0d)", st, k));
            check_close(fp30_real(zi[k]), im, sci * pow2(-18), $sformatf("stage %0d Im(%0d)", st, k));
          end
          dre[i] = zr[2*b+1]; dim[i] = zi[2*b+1];
          dre[j] = zr[2*b+2]; dim[j] = zi[2*b+2];
          b++;
        end
      end
    end

    // Final bins against the DFT of the input.
    for (int k = 0; k < N; k++) begin
      real re, im, sc;
      re = 0.0; im = 0.0; sc = 0.0;
      for (int n = 0; n < N; n++) begin
        int tw;
        tw = (k * n) % N;
        re += x0re[n] * wc[tw] + x0im[n] * ws[tw];
        im += x0im[n] * wc[tw] - x0re[n] * ws[tw];
        sc += fabs(x0re[n]) + fabs(x0im[n]);
      end
      check_close(fp30_real(dre[k]), re, sc * pow2(-16), $sformatf("X(%0d).re", k));
      check_close(fp30_real(dim[k]), im, sc * pow2(-16), $sformatf("X(%0d).im", k));
    end
    $display("2048-point FFT: %0d stages in %0d cycles", LOGN, total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (LOGN * (4 * (L + 4) + 100) + 1000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
