// operand_ctrl_tb: self-checking test of the operand controller. For random
// source values it steps both selects through all eight sources, with and
// without negation, and checks each operand's value against the chosen source
// (negated where asked) in real arithmetic; negation must be exact and keep
// the result normalised. Directed values cover +1.0 and -2.0, whose negations
// need a renormalising shift.
module operand_ctrl_tb;
  import vmdct_pkg::*;
  import tb_vmdct_pkg::*;

  fp30_t bus_a, bus_b, bus_c, dly1, dly2;
  prod_t mul_res;
  acc_t  add_res;
  src_e  sel_a, sel_b;
  logic  inv_a, inv_b;
  acc_t  op_a, op_b;
  int    checks = 0, failures = 0;
  logic  clk = 1'b0;

  operand_ctrl dut (.*);

  always #5 clk = ~clk;

  function automatic real src_val(input int s);
    case (s)
      0: return fp30_real(bus_a);
      1: return fp30_real(bus_b);
      2: return fp30_real(bus_c);
      3: return fp30_real(dly1);
      4: return fp30_real(dly2);
      5: return prod_real(mul_res);
      6: return acc_real(add_res);
      default: return 0.0;
    endcase
  endfunction

  task automatic chk(input acc_t got, input real expv, input string nm);
    checks++;
    if (acc_real(got) != expv || (got.man != '0 && got.man[55] == got.man[54])) begin
      failures++;
      $display("FAIL %s got %g expected %g", nm, acc_real(got), expv);
    end
  endtask

  initial begin
    for (int r = 0; r < 40; r++) begin
      bus_a = rand_fp30(20, 44);
      bus_b = rand_fp30(20, 44);
      bus_c = rand_fp30(20, 44);
      dly1  = rand_fp30(20, 44);
      dly2  = rand_fp30(20, 44);
      mul_res.man = {1'b0, 1'b1, 14'($urandom), 32'($urandom)};
      mul_res.exp = 6'(20 + $urandom % 20);
      add_res = rand_acc(20, 44);
      if (r == 0) begin bus_a.man = 24'h400000; bus_b.man = 24'h800000; end
      if (r == 1) begin mul_res.man = 48'h800000000000; add_res.man = 56'h40000000000000; end
      for (int s = 0; s < 8; s++) begin
        for (int inv = 0; inv < 2; inv++) begin
          sel_a = src_e'(s);
          sel_b = src_e'(7 - s);
          inv_a = 1'(inv);
          inv_b = 1'(1 - inv);
          @(negedge clk);
          chk(op_a, inv ? -src_val(s) : src_val(s), "op_a");
          chk(op_b, inv ? src_val(7 - s) : -src_val(7 - s), "op_b");
        end
      end
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
