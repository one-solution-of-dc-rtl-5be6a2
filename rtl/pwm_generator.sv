// pwm_generator: digital PWM with a duty factor that moves by a signed step
// once per switching period.
//
// A free-running N_BITS counter divides the clock into periods of 2**N_BITS
// cycles; period_end is high in the last cycle of each period. In that cycle,
// if step_valid is high, the duty factor becomes duty + step, clamped to
// [DUTY_MIN, DUTY_MAX] (the switch's shortest useful pulse and the
// topology's largest duty). The gate output is registered: in the cycle
// where the counter holds k it is high exactly when k < duty, so each period
// starts with duty high cycles and the new duty applies from the first cycle
// of the next period. sat_hi / sat_lo report that the last update was
// clamped.
//
// The counter-compare structure, the 8-bit resolution and the
// PWM_i = PWM_i-1 +/- dPWM update follow the described design; the limits,
// the start value and the registered gate are this design's own choices.
module pwm_generator #(
  parameter int unsigned N_BITS    = 8,
  parameter int unsigned STEP_W    = 8,
  parameter int unsigned DUTY_MIN  = 2,
  parameter int unsigned DUTY_MAX  = 128,
  parameter int unsigned DUTY_INIT = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     step_valid,
  input  logic signed [STEP_W-1:0] step,
  output logic                     period_end,
  output logic [N_BITS-1:0]        count,
  output logic [N_BITS:0]          duty,    // 0 .. 2**N_BITS
  output logic                     gate,
  output logic                     sat_hi,
  output logic                     sat_lo
);

  localparam int SUM_W = N_BITS + 2 > STEP_W ? N_BITS + 3 : STEP_W + 1;

  logic [N_BITS-1:0]     count_next;
  logic [N_BITS:0]       duty_next;
  logic signed [SUM_W-1:0] sum;
  logic                  clamp_hi, clamp_lo;

  always_comb begin
    period_end = (count == '1);
    count_next = count + 1'b1;
    sum        = $signed({{(SUM_W - N_BITS - 1){1'b0}}, duty}) + SUM_W'(step);
    clamp_hi   = sum > $signed(SUM_W'(DUTY_MAX));
    clamp_lo   = sum < $signed(SUM_W'(DUTY_MIN));
    duty_next  = duty;
    if (period_end && step_valid) begin
      if (clamp_hi)      duty_next = (N_BITS + 1)'(DUTY_MAX);
      else if (clamp_lo) duty_next = (N_BITS + 1)'(DUTY_MIN);
      else               duty_next = sum[N_BITS:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      duty   <= (N_BITS + 1)'(DUTY_INIT);
      gate   <= (DUTY_INIT > 0);
      sat_hi <= 1'b0;
      sat_lo <= 1'b0;
    end else begin
      count <= count_next;
      duty  <= duty_next;
      gate  <= ({1'b0, count_next} < duty_next);
      if (period_end && step_valid) begin
        sat_hi <= clamp_hi;
        sat_lo <= clamp_lo;
      end
    end
  end

  initial begin
    assert (DUTY_MIN <= DUTY_INIT && DUTY_INIT <= DUTY_MAX && DUTY_MAX <= (1 << N_BITS))
      else $error("pwm_generator: need DUTY_MIN <= DUTY_INIT <= DUTY_MAX <= 2**N_BITS");
  end

endmodule
