// tb_dcdc_adaptive_ctrl: closed-loop, end-to-end test of the controller at
// its default parameters (8-bit PWM, 256 clocks per switching period, four
// remembered signs, BASE = 1, K1 = K2 = 2, duty limits 2..128).
//
// The controller drives a behavioural forward-converter model (110 V input,
// 1:2.5 turns ratio, first-order output filter) whose output voltage is
// compared with the reference by a behavioural comparator. Load steps are
// modelled as a change of the loss drop: 1.2 V at 10 % load, 12 V (20 % of the output) at 100 %.
//
// An independent model of the decision rule (keep on fi = 1, reverse on
// fi = 0, table indexed by the last four signs, clamped duty update) runs
// alongside and is compared with the design at every period; the gate's
// high time is compared with the duty factor in every period.
//
// Sequence: soft start to 60 V at light load, steady state, load step
// 10 % -> 100 % and back, reference above what the duty limit can reach
// (upper clamp), reference of 0 V (lower clamp), return to 60 V, then the
// table is reprogrammed to uniform +/-1 steps and the same load step is
// repeated. Every mechanism (reversal, runs of 2, 3 and 4 equal signs,
// halved step after a boosted run, both clamps, table writes, steady state,
// recovery) must occur at least once. The adaptive step table must recover
// from the load step in fewer periods than the uniform one.
module tb_dcdc_adaptive_ctrl;
  localparam int PERIOD = 256;
  localparam int VREF_NOM_MV = 60000;
  localparam int DROP_LIGHT_MV = 1200;
  localparam int DROP_FULL_MV = 12000;
  localparam int BAND_MV = 5000;   // "regulated" band around the reference

  logic clk = 1'b0, rst_n = 1'b0;
  logic comp_in, gate;
  logic lut_wr_en = 1'b0;
  logic [3:0] lut_wr_addr = '0;
  logic signed [7:0] lut_wr_step = '0;
  logic period_end;
  logic [7:0] pwm_count;
  logic [8:0] duty;
  logic signed [7:0] duty_step;
  logic fi, reversed, sat_hi, sat_lo;
  logic [3:0] sign_hist;
  logic [2:0] run_len;

  int u_o_mv, v_ref_mv = VREF_NOM_MV, drop_mv = DROP_LIGHT_MV;
  int checks = 0, failures = 0;

  dcdc_adaptive_ctrl dut (.*);

  forward_stage_model #(.PERIOD(PERIOD)) u_plant (
    .clk(clk), .gate(gate), .drop_mv(drop_mv), .u_o_mv(u_o_mv));

  comparator_model u_comp (.u_o_mv(u_o_mv), .v_ref_mv(v_ref_mv), .out(comp_in));

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- checks
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int abs_i(input int v);
    return v < 0 ? -v : v;
  endfunction

  // reference step table: {oldest .. newest sign} -> step
  int tbl [16] = '{-4, 1, -1, 1, -1, 1, -1, 2, -2, 1, -1, 1, -1, 1, -1, 4};

  // mechanism counters
  int n_period = 0, n_reversal = 0, n_halved = 0, n_sat_hi = 0, n_sat_lo = 0;
  int n_writes = 0, n_steady = 0, last_mag = 1, n_dither = 0;
  bit last_rev = 1'b0;
  int n_run [1:4] = '{0, 0, 0, 0};
  bit uniform_mode = 1'b0;
  bit state_check = 1'b0;
  int n_bad_uniform = 0;

  // reference model state
  logic [3:0] m_hist = 4'b1010;
  int m_duty = 2;
  logic c1 = 1'b0, c2 = 1'b0;
  int gate_high = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      logic exp_comp, exp_fi, exp_sign;
      logic [3:0] addr;
      int r, sum;
      exp_comp = c2;
      c2 = c1;
      c1 = comp_in;
      gate_high += int'(gate);
      if (period_end) begin
        n_period++;
        chk(gate_high == m_duty, $sformatf("gate high %0d cycles, duty %0d", gate_high, m_duty));
        gate_high = 0;
        exp_fi   = exp_comp ^ m_hist[0];
        exp_sign = exp_fi ? m_hist[0] : !m_hist[0];
        addr     = {m_hist[2:0], exp_sign};
        chk(fi == exp_fi, "fi");
        chk(duty_step == 8'(tbl[addr]), $sformatf("step %0d expected %0d", duty_step, tbl[addr]));
        r = 1;
        while (r < 4 && addr[r] == addr[0]) r++;
        n_run[r]++;
        if (!exp_fi && last_rev) n_dither++;
        last_rev = !exp_fi;
        if (!exp_fi) begin
          n_reversal++;
          if (abs_i(tbl[addr]) < last_mag) n_halved++;
        end
        last_mag = abs_i(tbl[addr]);
        if (uniform_mode && tbl[addr] != 1 && tbl[addr] != -1) n_bad_uniform++;
        sum = m_duty + tbl[addr];
        if (sum > 128) begin
          m_duty = 128;
          n_sat_hi++;
        end else if (sum < 2) begin
          m_duty = 2;
          n_sat_lo++;
        end else m_duty = sum;
        m_hist = addr;
        state_check = 1'b1;
      end
    end
  end

  // the design's duty and sign history must match the model after each
  // period's decision edge
  always @(negedge clk) begin
    if (rst_n && state_check) begin
      state_check = 1'b0;
      chk(duty == 9'(m_duty) && sign_hist == m_hist,
          $sformatf("state duty=%0d exp %0d hist=%b exp %b", duty, m_duty, sign_hist, m_hist));
    end
  end

  // ------------------------------------------------------------- watchdog
  initial begin
    repeat (PERIOD * 4000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- sequence
  task automatic periods(input int n);
    repeat (n) begin
      @(posedge clk iff period_end);
    end
  endtask

  // periods after a load step until the output is back in_band the band and
  // stays there for 8 periods; also reports the worst deviation
  task automatic load_step(input int new_drop, output int t_rec, output int worst);
    int in_band;
    drop_mv = new_drop;
    t_rec = -1;
    worst = 0;
    in_band = 0;
    for (int p = 1; p <= 300; p++) begin
      periods(1);
      if (u_o_mv - v_ref_mv > worst) worst = u_o_mv - v_ref_mv;
      if (v_ref_mv - u_o_mv > worst) worst = v_ref_mv - u_o_mv;
      if (u_o_mv > v_ref_mv - BAND_MV && u_o_mv < v_ref_mv + BAND_MV) begin
        in_band++;
        if (in_band == 8) begin
          t_rec = p - 7;
          break;
        end
      end else in_band = 0;
    end
  endtask

  // periods until the output holds the band for 8 periods after any change
  task automatic settle(input string what);
    int t, w;
    load_step(drop_mv, t, w);
    chk(t > 0, {what, ": output settles"});
  endtask

  task automatic write_table(input int a, input int step);
    @(negedge clk);
    lut_wr_en = 1'b1;
    lut_wr_addr = 4'(a);
    lut_wr_step = 8'(step);
    @(negedge clk);
    lut_wr_en = 1'b0;
    tbl[a] = step;   // takes effect before the next period end
    n_writes++;
  endtask

  initial begin
    int t_soft, t_adapt, t_unif, uv_adapt, uv_unif, tmp, w, lo, hi;
    repeat (3) @(posedge clk);
    #1;
    chk(duty == 9'd2 && sign_hist == 4'b1010, "reset state");
    rst_n = 1'b1;

    // soft start
    t_soft = -1;
    for (int p = 1; p <= 200 && t_soft < 0; p++) begin
      periods(1);
      if (u_o_mv > v_ref_mv) t_soft = p;
    end
    chk(t_soft > 0, "soft start reaches the reference");
    settle("soft start");

    // steady state: the duty only dithers around its operating point
    lo = 1000;
    hi = 0;
    for (int p = 0; p < 64; p++) begin
      periods(1);
      if (int'(duty) < lo) lo = int'(duty);
      if (int'(duty) > hi) hi = int'(duty);
      if (run_len == 3'd1) n_steady++;
      chk(u_o_mv > v_ref_mv - BAND_MV && u_o_mv < v_ref_mv + BAND_MV, "steady state band");
    end
    chk(hi - lo <= 10, $sformatf("steady-state duty spread %0d..%0d", lo, hi));

    // load step 10 % -> 100 % and back
    load_step(DROP_FULL_MV, t_adapt, uv_adapt);
    chk(t_adapt > 0, "recovery after load step (adaptive)");
    load_step(DROP_LIGHT_MV, tmp, w);
    chk(tmp > 0, "recovery after load release (adaptive)");

    // unreachable reference: duty pinned at its upper limit
    v_ref_mv = 150000;
    periods(120);
    chk(duty == 9'd128, "duty at upper limit");
    // zero reference: duty pinned at its lower limit
    v_ref_mv = 0;
    periods(120);
    chk(duty == 9'd2, "duty at lower limit");
    v_ref_mv = VREF_NOM_MV;
    settle("return to 60 V");

    // uniform steps: +/-1 for every history
    for (int a = 0; a < 16; a++) write_table(a, (a % 2) ? 1 : -1);
    uniform_mode = 1'b1;
    settle("uniform table");
    load_step(DROP_FULL_MV, t_unif, uv_unif);
    chk(t_unif > 0, "recovery after load step (uniform)");
    load_step(DROP_LIGHT_MV, tmp, w);
    uniform_mode = 1'b0;

    $display("soft start %0d periods; load step recovery: adaptive %0d periods (worst %0d mV), uniform %0d periods (worst %0d mV)",
             t_soft, t_adapt, uv_adapt, t_unif, uv_unif);
    $display("periods %0d reversals %0d halved %0d runs 1:%0d 2:%0d 3:%0d 4:%0d clamps hi %0d lo %0d writes %0d steady %0d dither %0d",
             n_period, n_reversal, n_halved, n_run[1], n_run[2], n_run[3], n_run[4],
             n_sat_hi, n_sat_lo, n_writes, n_steady, n_dither);
    chk(t_adapt < t_unif, "adaptive table recovers faster than uniform steps");
    chk(n_bad_uniform == 0, "uniform table gives only +/-1 steps");
    chk(n_reversal > 0, "mechanism: direction reversal");
    chk(n_halved > 0, "mechanism: reduced step after a boosted run");
    chk(n_run[2] > 0, "mechanism: run of 2 (base step kept)");
    chk(n_run[3] > 0, "mechanism: run of 3 (K1 boost)");
    chk(n_run[4] > 0, "mechanism: run of 4 (K1*K2 boost)");
    chk(n_sat_hi > 0, "mechanism: upper duty clamp");
    chk(n_sat_lo > 0, "mechanism: lower duty clamp");
    chk(n_writes == 16, "mechanism: table reprogramming");
    chk(n_dither > 0, "mechanism: steady-state +/-1 alternation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
