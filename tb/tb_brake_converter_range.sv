// tb_brake_converter_range: the controller at its default parameters over
// the operating range of a 110 V, 20 kHz forward converter whose output is
// set between 30 V and 120 V (electropneumatic brake supply). For each
// reference of 30, 60, 90 and 120 V it
//   - lets the loop settle at 10 % load (1.2 V loss drop),
//   - checks that the mean output over 64 periods is within 1.5 V of the
//     reference and that the duty never sits at a clamp,
//   - applies the step to 100 % load (12 V loss drop, 20 % of 60 V) and
//     checks that the output is back inside +/-5 V for 8 periods within 20
//     periods, and again after the load is released.
// Uses the same behavioural comparator and power stage models as the
// end-to-end test (turns ratio 2.5, so 120 V at full load needs a duty of
// about 123/256, below the 128/256 limit).
module tb_brake_converter_range;
  localparam int PERIOD = 256;
  localparam int DROP_LIGHT_MV = 1200;
  localparam int DROP_FULL_MV = 12000;
  localparam int BAND_MV = 5000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic comp_in, gate, period_end, fi, reversed, sat_hi, sat_lo;
  logic [7:0] pwm_count;
  logic [8:0] duty;
  logic signed [7:0] duty_step;
  logic [3:0] sign_hist;
  logic [2:0] run_len;
  int u_o_mv, v_ref_mv = 30000, drop_mv = DROP_LIGHT_MV;
  int checks = 0, failures = 0;

  dcdc_adaptive_ctrl dut (
    .clk(clk), .rst_n(rst_n), .comp_in(comp_in), .gate(gate),
    .lut_wr_en(1'b0), .lut_wr_addr(4'd0), .lut_wr_step(8'sd0),
    .period_end(period_end), .pwm_count(pwm_count), .duty(duty),
    .duty_step(duty_step), .fi(fi), .sign_hist(sign_hist), .run_len(run_len),
    .reversed(reversed), .sat_hi(sat_hi), .sat_lo(sat_lo));

  forward_stage_model #(.PERIOD(PERIOD)) u_plant (
    .clk(clk), .gate(gate), .drop_mv(drop_mv), .u_o_mv(u_o_mv));

  comparator_model u_comp (.u_o_mv(u_o_mv), .v_ref_mv(v_ref_mv), .out(comp_in));

  always #5 clk = ~clk;

  initial begin
    repeat (PERIOD * 3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic periods(input int n);
    repeat (n) @(posedge clk iff period_end);
  endtask

  // periods until the output has been inside the band for 8 periods
  task automatic recover(output int t_rec);
    int in_band = 0;
    t_rec = -1;
    for (int p = 1; p <= 200; p++) begin
      periods(1);
      if (u_o_mv > v_ref_mv - BAND_MV && u_o_mv < v_ref_mv + BAND_MV) begin
        in_band++;
        if (in_band == 8) begin
          t_rec = p - 7;
          break;
        end
      end else in_band = 0;
    end
  endtask

  initial begin
    int t, t_up, t_down;
    longint sum;
    bit clamped;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int v = 30000; v <= 120000; v += 30000) begin
      v_ref_mv = v;
      drop_mv = DROP_LIGHT_MV;
      recover(t);
      chk(t > 0, $sformatf("%0d V: settles", v / 1000));
      periods(16);
      sum = 0;
      clamped = 1'b0;
      for (int p = 0; p < 64; p++) begin
        periods(1);
        sum += u_o_mv;
        if (sat_hi || sat_lo) clamped = 1'b1;
      end
      chk(sum / 64 > v - 1500 && sum / 64 < v + 1500,
          $sformatf("%0d V: mean output %0d mV", v / 1000, sum / 64));
      chk(!clamped, $sformatf("%0d V: duty inside its limits", v / 1000));
      drop_mv = DROP_FULL_MV;
      recover(t_up);
      chk(t_up > 0 && t_up <= 20, $sformatf("%0d V: load step recovery %0d periods", v / 1000, t_up));
      drop_mv = DROP_LIGHT_MV;
      recover(t_down);
      chk(t_down > 0 && t_down <= 20, $sformatf("%0d V: load release recovery %0d periods", v / 1000, t_down));
      $display("%0d V: mean %0d mV, duty %0d, recovery %0d / %0d periods",
               v / 1000, sum / 64, duty, t_up, t_down);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
