// tns_fir_tb: workload test, the 38-tap temporal noise shaping filter of
// MPEG-2 AAC run over the 1024 spectral lines of a long block,
//   y(k) = sum_{j=0}^{37} a(j) * x(k-j),  k = 0..1023  (x(k) = 0 for k < 0),
// on the processor at its default configuration, with the three-way
// interleaved multiply-accumulate program of tb_vmdct_pkg. Each group of three
// outputs k0..k0+2 streams the 40 samples x(k0+2), x(k0+1), ..., x(k0-37) once;
// output k0+r takes the tap a(n-2+r) at stream position n (zero outside the
// filter), so one 40-term dot product serves all three. The testbench plays
// the boot ROM and the external RAM, checks all 1024 outputs against a
// real-valued reference, checks that the command stream has no gap, and
// reports the cycle count.
module tns_fir_tb;
  import vmdct_pkg::*;
  import tb_vmdct_pkg::*;

  localparam int L      = 1024;              // spectral lines
  localparam int TAPS   = 38;
  localparam int N      = TAPS + 2;          // stream length per group
  localparam int K      = L;
  localparam int G      = (K + 2) / 3;
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

  fp30_t xs [L];
  real   xr [L];
  fp30_t tap [TAPS];

  function automatic vinstr_t mkvi(input int a, input int d, input int s, input int l);
    vinstr_t v;
    v.vaddr = 6'(a); v.init_delay = 8'(d); v.stage_num = 4'(s); v.loop_num = 16'(l);
    return v;
  endfunction

  // Sample at stream position n of the group holding output k.
  function automatic fp30_t samp(input int k, input int n);
    int i;
    i = 3 * (k / 3) + 2 - n;
    if (i < 0 || i >= L) return '0;
    return xs[i];
  endfunction

  // Coefficient of output k at stream position n.
  function automatic fp30_t coef(input int k, input int n);
    int j;
    j = n - 2 + k % 3;
    if (j < 0 || j >= TAPS) return '0;
    return tap[j];
  endfunction

  function automatic fp30_t x_at(input int j);
    int g;
    if (j < 2) return '0;
    g = (j - 2) / N;
    if (g >= G) return '0;
    return samp(3 * g, (j - 2) % N);
  endfunction

  function automatic fp30_t coef_at(input int u);
    int j, g, k;
    j = u / 3;
    if (j < 2) return '0;
    g = (j - 2) / N;
    k = 3 * g + u % 3;
    if (g >= G || k >= K) return '0;
    return coef(k, (j - 2) % N);
  endfunction

  initial begin
    int t0, t_end, nvi, nout;
    vinstr_t vis [2 * G + 3];
    mode = 0; load_we = 0; start = 0; in_data = '0; vinstr = '0;
    din = '0; coeff_in = '0;
    nout = 0;
    for (int i = 0; i < L; i++) begin
      xs[i] = rand_fp30(30, 33);
      xr[i] = fp30_real(xs[i]);
    end
    for (int j = 0; j < TAPS; j++) tap[j] = rand_fp30(26, 31);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Boot: load the multiply-accumulate program.
    mode = 1'b1;
    for (int i = 0; i < A_HEAD; i++) begin in_data = '0; load_we = 1'b1; @(negedge clk); end
    for (int t = 0; t < 6; t++) begin in_data = mac_cmd(1'b1, t); load_we = 1'b1; @(negedge clk); end
    for (int t = 0; t < 6; t++) begin in_data = mac_cmd(1'b0, t); load_we = 1'b1; @(negedge clk); end
    load_we = 1'b0;
    mode = 1'b0;
    @(negedge clk);
    nvi = 0;
    vis[nvi++] = mkvi(A_HEAD, 0, 6, 1);
    for (int g = 0; g < G; g++) begin
      vis[nvi++] = mkvi(A_HEAD, 0, 6, 1);
      vis[nvi++] = mkvi(A_MAC, 0, 6, (N - 2) / 2);
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
        for (int tau = 0; tau < 3 * (2 + G * N + 4); tau++) begin
          int gh, r, k;
          din      = (tau % 3 == 0) ? x_at(tau / 3 + 1) : fp30_t'('0);
          coeff_in = coef_at(tau + 1);
          #1;
          if (!cmd_valid) gap++;
          if (tau >= 3 * (2 + N)) begin
            gh = (tau / 3 - 2) / N;
            r  = tau - 3 * (2 + gh * N) - 4;
            k  = 3 * (gh - 1) + r;
            if (r >= 0 && r < 3 && k < K) begin
              real rv, sc, c;
              rv = 0.0; sc = 0.0;
              for (int j = 0; j < TAPS; j++) begin
                if (k - j >= 0) begin
                  c   = fp30_real(tap[j]);
                  rv += xr[k - j] * c;
                  sc += fabs(xr[k - j] * c);
                end
              end
              checks++;
              nout++;
              if (fabs(fp30_real(dout) - rv) > sc * pow2(-18)) begin
                failures++;
                if (failures < 10) $display("FAIL y(%0d) = %g expected %g", k, fp30_real(dout), rv);
              end
            end
          end
          @(negedge clk);
        end
        checks++;
        if (gap != 0) begin failures++; $display("FAIL %0d cycles without a command", gap); end
      end
    join
    t_end = cyc;
    checks++;
    if (nout != K) begin failures++; $display("FAIL %0d outputs checked, expected %0d", nout, K); end
    $display("38-tap filter over 1024 lines: %0d outputs in %0d cycles from the first command", nout, t_end - t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * (2 + G * N + 4) + 1000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
