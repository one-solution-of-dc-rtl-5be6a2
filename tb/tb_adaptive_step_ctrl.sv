// tb_adaptive_step_ctrl: random fi and sign histories with and without the
// sample strobe. The table is modelled in the testbench as step = +/-(1 + a
// few bits of the address) with the sign of the new direction. Checks the new
// sign (keep on fi = 1, flip on fi = 0), the address {three older signs, new
// sign} and the registered run-length / reversal status.
module tb_adaptive_step_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sample = 1'b0, fi = 1'b0;
  logic [3:0] hist = 4'b1010;
  logic sign_new, reversed;
  logic [3:0] lut_addr;
  logic signed [7:0] lut_step;
  logic [2:0] run_len;
  int checks = 0, failures = 0;

  adaptive_step_ctrl dut (.*);

  always_comb lut_step = lut_addr[0] ? 8'(1 + lut_addr[3:1]) : -8'(1 + lut_addr[3:1]);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (fi=%b hist=%b)", what, fi, hist);
    end
  endtask

  initial begin
    logic exp_sign;
    logic [3:0] exp_addr;
    int exp_run;
    int last_run = 1;
    bit last_rev = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    chk(run_len == 3'd1 && !reversed, "reset status");
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      fi     = 1'($urandom);
      hist   = 4'($urandom);
      sample = ($urandom % 4) == 0;
      #1;
      chk(run_len == 3'(last_run) && reversed == last_rev, "registered status");
      exp_sign = fi ? hist[0] : !hist[0];
      exp_addr = {hist[2:0], exp_sign};
      chk(sign_new == exp_sign, "new sign");
      chk(lut_addr == exp_addr, "table address");
      exp_run = 1;
      while (exp_run < 4 && exp_addr[exp_run] == exp_addr[0]) exp_run++;
      @(posedge clk);
      if (sample) begin
        last_run = exp_run;
        last_rev = !fi;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
