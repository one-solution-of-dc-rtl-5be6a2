// adaptive_step_ctrl: the decision logic of the adaptive delta modulator.
//
// Once per switching period (sample high for one clock)
//   1. it takes fi from the error gate and the previous sign hist[0]:
//      fi = 1 keeps the direction, fi = 0 reverses it, giving sign_new;
//   2. it forms the step-table address from the new sign and the three signs
//      before it, {hist[2:0], sign_new}, so the table sees the run of equal
//      signs that includes the change being made now.
// The surrounding design shifts sign_new into the delay line and adds the
// addressed table entry to the duty factor on that same sample clock.
//
// Decision and address are combinational, so the new duty factor is
// registered on the sample clock itself and applies to the next period. The
// registered status outputs describe the last decision: run_len (1..4
// equal signs) and reversed (fi was 0). lut_addr[3:1] are the three older
// signs unchanged; the oldest stored sign, hist[3], leaves the window and is
// not read. The keep/reverse rule follows the described converter; reading
// the four addressed signs as "the change being made and the three before"
// is this design's reading of the four-bit rule.
module adaptive_step_ctrl
  import dcdc_pkg::*;
#(
  parameter int unsigned STEP_W = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sample,     // end of switching period
  input  logic                     fi,         // from error_gate
  input  logic [HIST_BITS-1:0]     hist,       // delay line, hist[0] newest
  output logic                     sign_new,   // to delay line
  output logic [HIST_BITS-1:0]     lut_addr,   // to step table
  input  logic signed [STEP_W-1:0] lut_step,   // from step table (checked only)
  output logic [2:0]               run_len,    // status: equal signs in last decision
  output logic                     reversed    // status: last decision reversed
);

  always_comb begin
    sign_new   = fi ? hist[0] : ~hist[0];
    lut_addr   = {hist[HIST_BITS-2:0], sign_new};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_len  <= 3'd1;
      reversed <= 1'b0;
    end else if (sample) begin
      run_len  <= 3'(run_length(lut_addr));
      reversed <= ~fi;
    end
  end

  // The step sign always matches the chosen direction (holds for the default
  // table; a reprogrammed table may break it, hence only a warning).
  step_sign_follows_direction: assert property (
    @(posedge clk) disable iff (!rst_n)
      (sample && lut_step != '0) |-> ((lut_step > 0) == sign_new))
    else $warning("step table entry %0d has the opposite sign", lut_addr);

endmodule
