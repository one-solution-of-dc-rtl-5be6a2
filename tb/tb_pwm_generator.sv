// tb_pwm_generator: default 8-bit PWM (256 clocks per period). At every
// period end a random step (sometimes large, to hit both clamps) is applied
// or withheld. Checks per period: the period is 256 clocks, the gate is high
// for exactly the duty of that period and only in its first cycles, and the
// duty follows duty + step clamped to [2, 128], with the saturation flags.
module tb_pwm_generator;
  logic clk = 1'b0, rst_n = 1'b0;
  logic step_valid = 1'b0;
  logic signed [7:0] step = '0;
  logic period_end, gate, sat_hi, sat_lo;
  logic [7:0] count;
  logic [8:0] duty;
  int checks = 0, failures = 0;
  int n_sat_hi = 0, n_sat_lo = 0;

  pwm_generator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (256 * 400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int exp_duty = 2;
    int high, len, sum;
    bit late_high;
    bit exp_hi = 0, exp_lo = 0;
    repeat (2) @(posedge clk);
    #1;
    chk(duty == 9'd2 && count == 8'd0 && gate, "reset state");
    rst_n = 1'b1;
    for (int p = 0; p < 300; p++) begin
      high = 0;
      len = 0;
      late_high = 0;
      forever begin
        if (gate) begin
          high++;
          if (count >= 8'(exp_duty)) late_high = 1;
        end
        len++;
        if (period_end) break;
        @(posedge clk);
        #1;
      end
      // now in the last cycle of the period (count = 255)
      chk(len == 256, "period length");
      chk(high == exp_duty, $sformatf("gate high %0d, duty %0d", high, exp_duty));
      chk(!late_high, "gate high after duty");
      chk(duty == 9'(exp_duty), "duty value");
      chk(sat_hi == exp_hi && sat_lo == exp_lo, "saturation flags");
      step_valid = ($urandom % 5) != 0;
      case ($urandom % 4)
        0: step = 8'sd100;
        1: step = -8'sd100;
        default: step = 8'($signed(5'($urandom)));
      endcase
      @(posedge clk);
      if (step_valid) begin
        sum = exp_duty + int'(step);
        exp_hi = sum > 128;
        exp_lo = sum < 2;
        exp_duty = exp_hi ? 128 : exp_lo ? 2 : sum;
        n_sat_hi += int'(exp_hi);
        n_sat_lo += int'(exp_lo);
      end
      #1;
      step_valid = 1'b0;
    end
    chk(n_sat_hi > 0 && n_sat_lo > 0, "both clamps exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
