// vmdct_core_tb: self-checking test of the vector datapath, with the pipeline
// commands driven directly by the testbench.
// 1. Runs the complex operation Z = X + Y*C (tb_vmdct_pkg::cx_cmd) over a
//    vector of random complex elements, streaming operands in and results out
//    as an external RAM would, and checks every Re/Im result in the cycle the
//    schedule predicts (4k+13 and 4k+15) against a real-valued reference.
//    This exercises all four buffers with bank swapping, both operand
//    controllers with negation, the multiplier/adder pipelines, adder result
//    feedback and the programmable delay.
// 2. Drives exponent overflow through the multiplier and the adder and checks
//    Testout and SUM_MIN_INF.
module vmdct_core_tb;
  import vmdct_pkg::*;
  import tb_vmdct_pkg::*;

  localparam int L = 24;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  cmd_t  cmd;
  fp30_t din, coeff_in, dout;
  logic  sum_min_inf, testout;
  int    checks = 0, failures = 0;

  vmdct_core dut (.*);

  always #5 clk = ~clk;

  fp30_t ea [L+4], eb [L+4], ec [L+4], ed [L+4], ee [L+4], ef [L+4];

  function automatic fp30_t el(input fp30_t arr [L+4], input int k);
    if (k < 0 || k >= L + 4) return '0;
    return arr[k];
  endfunction

  task automatic check_val(input real got, input real expv, input real scale, input string nm, input int k);
    checks++;
    if (fabs(got - expv) > scale * pow2(-19)) begin
      failures++;
      $display("FAIL %s Z(%0d) = %g expected %g", nm, k, got, expv);
    end
  endtask

  initial begin
    int tau;
    real re, im, sc;
    cmd = '0; din = '0; coeff_in = '0;
    for (int k = 0; k < L + 4; k++) begin
      if (k < L) begin
        ea[k] = rand_fp30(29, 35); eb[k] = rand_fp30(29, 35);
        ec[k] = rand_fp30(29, 35); ed[k] = rand_fp30(29, 35);
        ee[k] = rand_fp30(29, 35); ef[k] = rand_fp30(29, 35);
      end else begin
        ea[k] = '0; eb[k] = '0; ec[k] = '0; ed[k] = '0; ee[k] = '0; ef[k] = '0;
      end
    end
    // Element 0's Y and C are never streamed in: the buffers hold reset zeros.
    ec[0] = '0; ed[0] = '0; ee[0] = '0; ef[0] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (tau = 0; tau < 4 * (L + 4); tau++) begin
      int w, s, k;
      @(negedge clk);
      w = tau / 4;
      s = tau % 4;
      cmd = cx_cmd(tau % 8);
      unique case (s)
        0: begin din = el(ea, w);     coeff_in = el(ee, w + 1); end
        1: begin din = el(ec, w + 1); coeff_in = '0;            end
        2: begin din = el(eb, w);     coeff_in = el(ef, w + 1); end
        default: begin din = el(ed, w + 1); coeff_in = '0;      end
      endcase
      #1;
      // Results: Re Z(k) at 4k+13, Im Z(k) at 4k+15.
      if (tau >= 13 && (tau - 13) % 4 == 0 && (tau - 13) / 4 < L) begin
        k  = (tau - 13) / 4;
        re = fp30_real(ea[k]) + fp30_real(ec[k]) * fp30_real(ee[k]) - fp30_real(ed[k]) * fp30_real(ef[k]);
        sc = fabs(fp30_real(ea[k])) + fabs(fp30_real(ec[k]) * fp30_real(ee[k])) + fabs(fp30_real(ed[k]) * fp30_real(ef[k]));
        check_val(fp30_real(dout), re, sc, "Re", k);
      end
      if (tau >= 15 && (tau - 15) % 4 == 0 && (tau - 15) / 4 < L) begin
        k  = (tau - 15) / 4;
        im = fp30_real(eb[k]) + fp30_real(ed[k]) * fp30_real(ee[k]) + fp30_real(ec[k]) * fp30_real(ef[k]);
        sc = fabs(fp30_real(eb[k])) + fabs(fp30_real(ed[k]) * fp30_real(ee[k])) + fabs(fp30_real(ec[k]) * fp30_real(ef[k]));
        check_val(fp30_real(dout), im, sc, "Im", k);
      end
    end
    // Exception flags: write a huge value into A (real part, bank 0).
    @(negedge clk);
    cmd = '0;
    cmd.a = bc(1'b0, 1'b0, 1'b1, 1'b0);
    din.man = 24'h600000; din.exp = 6'd63;
    @(negedge clk);
    // Read A bank 0 (eve_odd = 1); square it and double it.
    cmd = '0;
    cmd.a = bc(1'b1, 1'b0, 1'b0, 1'b0);
    cmd.multi_asel = SRC_A; cmd.multi_bsel = SRC_A;
    cmd.sum_asel = SRC_A;   cmd.sum_bsel = SRC_A;
    @(negedge clk);
    cmd.multi_asel = SRC_ZERO; cmd.sum_asel = SRC_ZERO; cmd.sum_bsel = SRC_ZERO;
    checks += 2;
    if (testout || sum_min_inf) begin failures++; $display("FAIL flag raised early"); end
    @(negedge clk);
    // Both results appear three cycles after the operands.
    @(negedge clk);
    checks += 2;
    if (!testout)     begin failures++; $display("FAIL multiplier overflow not flagged"); end
    if (!sum_min_inf) begin failures++; $display("FAIL adder overflow not flagged"); end
    @(negedge clk);
    checks += 2;
    if (testout || sum_min_inf) begin failures++; $display("FAIL flag stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
