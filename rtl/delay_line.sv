// delay_line: shift register that remembers the signs of the last DEPTH
// duty-cycle changes (1 = increase, 0 = decrease).
//
// On every clock with shift_en high the new sign enters at hist[0] and the
// oldest falls out of hist[DEPTH-1]; hist[0] is therefore always the sign of
// the most recent change and feeds the error gate. The whole word is the
// address of the step table. Four stages follow the described design; the
// reset value (alternating signs, newest = decrease, i.e. the steady-state
// pattern) is this design's own choice so that the first period after reset
// uses the smallest step. Synchronous, active-low asynchronous reset.
module delay_line #(
  parameter int unsigned DEPTH = 4,
  parameter logic [DEPTH-1:0] RESET_VALUE = DEPTH'({(DEPTH + 1) / 2 {2'b10}})
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,  // one pulse per switching period
  input  logic             sign_in,   // sign of the change made this period
  output logic [DEPTH-1:0] hist       // hist[0] newest, hist[DEPTH-1] oldest
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        hist <= RESET_VALUE;
    else if (shift_en) hist <= {hist[DEPTH-2:0], sign_in};
  end

endmodule
