// dcdc_adaptive_ctrl: digital feedback controller for a switch-mode DC/DC
// converter using adaptive delta modulation of the PWM duty factor.
//
// The loop only needs one bit per switching period: whether the output
// voltage is above the reference (comp_in, from an external analog
// comparator). Instead of measuring the error, the controller remembers the
// signs of its last four duty changes. While the output stays on one side of
// the reference the duty keeps moving the same way in growing steps
// (BASE, BASE, K1*BASE, K1*K2*BASE); when the output crosses the reference
// the direction reverses with a smaller step. In steady state the
// duty alternates by +/-BASE around the operating point.
//
//   comp_in -> sync2 -> error_gate (with last sign) -> fi
//   fi -> adaptive_step_ctrl -> new sign -> delay_line (4 signs)
//   {3 older signs, new sign} -> step_lut -> signed step -> pwm_generator
//   pwm_generator -> gate (to the power switch), period_end (= sample)
//
// Timing: one decision per period of 2**N_BITS clocks, taken in the period's
// last clock from the comparator level seen two clocks earlier (synchronizer);
// the new duty applies from the next period. With N_BITS = 8 and a 20 kHz
// switching frequency the clock is 5.12 MHz.
//
// The loop structure, the four-bit sign memory, the table of steps and the
// 8-bit PWM follow the described converter. The comparator polarity (1 =
// output above reference), the reset state, the duty limits, the default K
// factors and the table write port are this design's own choices.
module dcdc_adaptive_ctrl
  import dcdc_pkg::*;
#(
  parameter int unsigned N_BITS    = 8,
  parameter int unsigned STEP_W    = 8,
  parameter int unsigned DUTY_MIN  = 2,
  parameter int unsigned DUTY_MAX  = 128,
  parameter int unsigned DUTY_INIT = 2,
  parameter int unsigned BASE_STEP = 1,
  parameter int unsigned K1        = 2,
  parameter int unsigned K2        = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // analog comparator output: 1 = output voltage above reference
  input  logic                     comp_in,
  // power switch drive
  output logic                     gate,
  // step table programming
  input  logic                     lut_wr_en,
  input  logic [HIST_BITS-1:0]     lut_wr_addr,
  input  logic signed [STEP_W-1:0] lut_wr_step,
  // status
  output logic                     period_end,
  output logic [N_BITS-1:0]        pwm_count,
  output logic [N_BITS:0]          duty,
  output logic signed [STEP_W-1:0] duty_step,
  output logic                     fi,
  output logic [HIST_BITS-1:0]     sign_hist,
  output logic [2:0]               run_len,
  output logic                     reversed,
  output logic                     sat_hi,
  output logic                     sat_lo
);

  logic                     comp_s;
  logic                     sign_new;
  logic [HIST_BITS-1:0]     lut_addr;

  sync2 u_sync (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (comp_in),
    .q     (comp_s)
  );

  error_gate u_gate (
    .comp_hi   (comp_s),
    .sign_prev (sign_hist[0]),
    .fi        (fi)
  );

  adaptive_step_ctrl #(.STEP_W(STEP_W)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .sample     (period_end),
    .fi         (fi),
    .hist       (sign_hist),
    .sign_new   (sign_new),
    .lut_addr   (lut_addr),
    .lut_step   (duty_step),
    .run_len    (run_len),
    .reversed   (reversed)
  );

  delay_line #(.DEPTH(HIST_BITS)) u_delay (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift_en (period_end),
    .sign_in  (sign_new),
    .hist     (sign_hist)
  );

  step_lut #(
    .ADDR_W (HIST_BITS),
    .STEP_W (STEP_W),
    .BASE   (BASE_STEP),
    .K1     (K1),
    .K2     (K2)
  ) u_lut (
    .clk     (clk),
    .rst_n   (rst_n),
    .rd_addr (lut_addr),
    .rd_step (duty_step),
    .wr_en   (lut_wr_en),
    .wr_addr (lut_wr_addr),
    .wr_step (lut_wr_step)
  );

  pwm_generator #(
    .N_BITS    (N_BITS),
    .STEP_W    (STEP_W),
    .DUTY_MIN  (DUTY_MIN),
    .DUTY_MAX  (DUTY_MAX),
    .DUTY_INIT (DUTY_INIT)
  ) u_pwm (
    .clk        (clk),
    .rst_n      (rst_n),
    .step_valid (period_end),
    .step       (duty_step),
    .period_end (period_end),
    .count      (pwm_count),
    .duty       (duty),
    .gate       (gate),
    .sat_hi     (sat_hi),
    .sat_lo     (sat_lo)
  );

endmodule
