// fp_mul_tb: self-checking test of the pipelined floating-point multiplier.
// Feeds one operand pair per cycle (random normalised words plus directed
// corner cases: zeros, -2 x -2, +-1, exponent overflow and underflow) and
// checks each product against a real-valued reference exactly three cycles
// later: the value must be exact (the 48-bit product needs no rounding), the
// mantissa normalised, and `exc` set only on exponent overflow/underflow.
module fp_mul_tb;
  import vmdct_pkg::*;
  import tb_vmdct_pkg::*;

  localparam int NRAND = 400;
  localparam int LAT   = 3;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  fp30_t a, b;
  prod_t p;
  logic  exc;
  int    checks = 0, failures = 0;

  fp_mul dut (.clk, .rst_n, .a, .b, .p, .exc);

  always #5 clk = ~clk;

  // Reference pipeline of expected values.
  real   exp_v  [LAT];
  logic  exp_ok [LAT];    // value check applies
  int    exp_x  [LAT];    // expected exc: 0 no, 1 yes
  int    ncase = 0;

  function automatic fp30_t mk(input logic [23:0] man, input int e);
    fp30_t r;
    r.man = man;
    r.exp = 6'(e);
    return r;
  endfunction

  task automatic drive(input fp30_t x, input fp30_t y);
    real v;
    int  e;
    a = x;
    b = y;
    v = fp30_real(x) * fp30_real(y);
    // Exponent of the normalised result (value in [1,2) * 2^(e-32) magnitude).
    if (v == 0.0) e = 0;
    else begin
      real m;
      m = fabs(v);
      e = 32;
      while (m >= 2.0) begin m = m / 2.0; e++; end
      while (m < 1.0) begin m = m * 2.0; e--; end
      // -2^k is normalised as -2.0 * 2^(k-1).
      if (v < 0.0 && m == 1.0) e--;
    end
    for (int i = LAT - 1; i > 0; i--) begin
      exp_v[i] = exp_v[i-1]; exp_ok[i] = exp_ok[i-1]; exp_x[i] = exp_x[i-1];
    end
    exp_v[0]  = v;
    exp_ok[0] = (e >= 0 && e <= 63);
    exp_x[0]  = (v != 0.0 && (e < 0 || e > 63)) ? 1 : 0;
    ncase++;
  endtask

  task automatic check_out();
    if (ncase > LAT) begin
      checks++;
      if (exc !== (exp_x[LAT-1] == 1)) begin
        failures++;
        $display("FAIL exc=%0d expected %0d (case %0d)", exc, exp_x[LAT-1], ncase - LAT);
      end
      if (exp_ok[LAT-1]) begin
        checks++;
        if (prod_real(p) != exp_v[LAT-1]) begin
          failures++;
          $display("FAIL product %g expected %g (case %0d)", prod_real(p), exp_v[LAT-1], ncase - LAT);
        end
        if (p.man != '0) begin
          checks++;
          if (p.man[47] == p.man[46]) begin
            failures++;
            $display("FAIL product not normalised %h", p.man);
          end
        end
      end
    end
  endtask

  initial begin
    a = '0; b = '0;
    for (int i = 0; i < LAT; i++) begin exp_v[i] = 0.0; exp_ok[i] = 1'b0; exp_x[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Directed cases.
    drive(mk(24'h400000, 32), mk(24'h400000, 32)); @(negedge clk); check_out();   // 1*1
    drive(mk(24'h800000, 32), mk(24'h800000, 32)); @(negedge clk); check_out();   // -2*-2
    drive(mk(24'h800000, 31), mk(24'h400000, 32)); @(negedge clk); check_out();   // -1*1
    drive(mk(24'h000000, 0),  mk(24'h512345, 40)); @(negedge clk); check_out();   // 0*x
    drive(mk(24'h7fffff, 33), mk(24'h800001, 30)); @(negedge clk); check_out();   // extremes
    drive(mk(24'h600000, 63), mk(24'h600000, 63)); @(negedge clk); check_out();   // overflow
    drive(mk(24'h400000, 1),  mk(24'h400000, 1));  @(negedge clk); check_out();   // underflow
    for (int i = 0; i < NRAND; i++) begin
      drive(rand_fp30(16, 46), rand_fp30(16, 46));
      @(negedge clk);
      check_out();
    end
    for (int i = 0; i < LAT; i++) begin
      drive('0, '0);
      @(negedge clk);
      check_out();
    end
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
