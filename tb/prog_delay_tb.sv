// prog_delay_tb: self-checking test of the four-stage programmable delay.
// Every cycle it presents new random multiplier and adder results, a random
// input select and random tap selects, and checks both taps against a history
// of the truncated inputs kept by the testbench: a select of k must return
// the input of k+1 cycles before.
module prog_delay_tb;
  import vmdct_pkg::*;
  import tb_vmdct_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       m_a_delay;
  prod_t      mul_res;
  acc_t       add_res;
  logic [1:0] delay_sel1, delay_sel2;
  fp30_t      tap1, tap2;
  fp30_t      hist [4];
  int         checks = 0, failures = 0;

  prog_delay dut (.*);

  always #5 clk = ~clk;

  initial begin
    fp30_t inw;
    m_a_delay = 0; mul_res = '0; add_res = '0; delay_sel1 = 0; delay_sel2 = 0;
    for (int i = 0; i < 4; i++) hist[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      m_a_delay   = 1'($urandom);
      mul_res.man = {16'($urandom), 32'($urandom)};
      mul_res.exp = 6'($urandom);
      add_res     = rand_acc(0, 63);
      delay_sel1  = 2'($urandom);
      delay_sel2  = 2'($urandom);
      #1;
      checks += 2;
      if (tap1 !== hist[delay_sel1]) begin
        failures++;
        $display("FAIL tap1 sel %0d: %h expected %h", delay_sel1, tap1, hist[delay_sel1]);
      end
      if (tap2 !== hist[delay_sel2]) begin
        failures++;
        $display("FAIL tap2 sel %0d: %h expected %h", delay_sel2, tap2, hist[delay_sel2]);
      end
      // Input word: top 24 mantissa bits of the chosen result.
      if (m_a_delay) begin inw.man = add_res.man[55:32]; inw.exp = add_res.exp; end
      else           begin inw.man = mul_res.man[47:24]; inw.exp = mul_res.exp; end
      if (inw.man == '0) inw.exp = '0;
      @(posedge clk);
      for (int i = 3; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = inw;
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
