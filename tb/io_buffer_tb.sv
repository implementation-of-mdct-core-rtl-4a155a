// io_buffer_tb: self-checking test of the double-banked complex buffer.
// Random writes (bank, part, enable) and random reads every cycle; a model
// array kept by the testbench gives the word expected on the read port, which
// always shows the bank not selected by eve_odd. Also checks the reset value.
module io_buffer_tb;
  import vmdct_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  eve_odd, oe_r_i, we, we_r_i;
  fp30_t din, dout;
  fp30_t model [2][2];
  int    checks = 0, failures = 0;

  io_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    eve_odd = 0; oe_r_i = 0; we = 0; we_r_i = 0; din = '0;
    for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) model[i][j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      eve_odd = 1'($urandom);
      oe_r_i  = 1'($urandom);
      we      = 1'($urandom);
      we_r_i  = 1'($urandom);
      din     = 30'($urandom);
      #1;
      checks++;
      if (dout !== model[!eve_odd][oe_r_i]) begin
        failures++;
        $display("FAIL read bank %0d part %0d: %h expected %h", !eve_odd, oe_r_i, dout, model[!eve_odd][oe_r_i]);
      end
      @(posedge clk);
      if (we) model[eve_odd][we_r_i] = din;
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
