// fp_add_tb: self-checking test of the pipelined floating-point adder.
// Feeds one operand pair per cycle (random normalised 56-bit words with close
// and distant exponents, exact cancellation, zero operands, -1.0 results,
// exponent overflow and underflow) and checks each sum three cycles later
// against a real-valued reference: the error must stay within a few units in
// the last place of the larger operand, the mantissa must be normalised, and
// `exc` must be set exactly when the exponent leaves 0..63.
module fp_add_tb;
  import vmdct_pkg::*;
  import tb_vmdct_pkg::*;

  localparam int NRAND = 600;
  localparam int LAT   = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  acc_t a, b, s;
  logic exc;
  int   checks = 0, failures = 0;

  fp_add dut (.clk, .rst_n, .a, .b, .s, .exc);

  always #5 clk = ~clk;

  real  exp_v   [LAT];
  real  exp_tol [LAT];
  int   exp_x   [LAT];   // 0 no exception, 1 exception, 2 do not care
  int   ncase = 0;

  function automatic acc_t mk(input logic [55:0] man, input int e);
    acc_t r;
    r.man = man;
    r.exp = 6'(e);
    return r;
  endfunction

  task automatic drive(input acc_t x, input acc_t y, input int xexc);
    real va, vb, big;
    a = x;
    b = y;
    va = acc_real(x);
    vb = acc_real(y);
    big = (fabs(va) > fabs(vb)) ? fabs(va) : fabs(vb);
    for (int i = LAT - 1; i > 0; i--) begin
      exp_v[i] = exp_v[i-1]; exp_tol[i] = exp_tol[i-1]; exp_x[i] = exp_x[i-1];
    end
    exp_v[0]   = va + vb;
    exp_tol[0] = big * pow2(-50);
    exp_x[0]   = xexc;
    ncase++;
  endtask

  task automatic check_out();
    real got;
    if (ncase > LAT) begin
      got = acc_real(s);
      if (exp_x[LAT-1] != 2) begin
        checks++;
        if (exc !== (exp_x[LAT-1] == 1)) begin
          failures++;
          $display("FAIL exc=%0d expected %0d (case %0d)", exc, exp_x[LAT-1], ncase - LAT);
        end
      end
      if (exp_x[LAT-1] == 0) begin
        checks++;
        if (fabs(got - exp_v[LAT-1]) > exp_tol[LAT-1]) begin
          failures++;
          $display("FAIL sum %g expected %g (case %0d)", got, exp_v[LAT-1], ncase - LAT);
        end
        if (s.man != '0) begin
          checks++;
          if (s.man[55] == s.man[54]) begin
            failures++;
            $display("FAIL sum not normalised %h", s.man);
          end
        end
      end
    end
  endtask

  initial begin
    acc_t r;
    a = '0; b = '0;
    for (int i = 0; i < LAT; i++) begin exp_v[i] = 0.0; exp_tol[i] = 0.0; exp_x[i] = 2; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Directed cases.
    r = rand_acc(30, 34);
    drive(r, acc_neg(r), 0); @(negedge clk); check_out();                                  // x + -x
    drive(r, '0, 0); @(negedge clk); check_out();                                          // x + 0
    drive('0, r, 0); @(negedge clk); check_out();                                          // 0 + x
    drive('0, '0, 0); @(negedge clk); check_out();                                         // 0 + 0
    drive(mk(56'h40000000000000, 32), mk(56'h80000000000000, 32), 0); @(negedge clk); check_out(); // 1 + -2 = -1
    drive(mk(56'h60000000000000, 63), mk(56'h60000000000000, 63), 1); @(negedge clk); check_out(); // overflow
    drive(mk(56'h40000000000000, 0),  mk(56'hA0000000000000, 0), 1); @(negedge clk); check_out();  // underflow
    drive(mk(56'h40000000000000, 40), mk(56'h40000000000000, 2), 0); @(negedge clk); check_out();  // far apart
    for (int i = 0; i < NRAND; i++) begin
      if (i % 3 == 0) drive(rand_acc(20, 44), rand_acc(20, 44), 0);
      else            drive(rand_acc(30, 33), rand_acc(30, 33), 0);
      @(negedge clk);
      check_out();
    end
    for (int i = 0; i < LAT; i++) begin
      drive('0, '0, 0);
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
