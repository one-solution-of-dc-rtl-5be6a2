// forward_stage_model: behavioural average model of the forward converter
// power stage (not synthesizable logic), for closed-loop simulation only.
//
// The secondary delivers VSEC_MV while the switch is on (input voltage times
// turns ratio). The model averages the gate over a sliding window of one
// switching period (PERIOD clocks), subtracts the load-dependent loss drop
// and passes the result through a first-order output filter with a time
// constant of TAU clocks. All updates happen on the falling clock edge so
// that the output is stable around the rising edge. Voltages in millivolts.
module forward_stage_model #(
  parameter int PERIOD  = 256,
  parameter int VSEC_MV = 275000,  // 110 V input, 1:2.5 turns ratio
  parameter int TAU     = 64
) (
  input  logic clk,
  input  logic gate,
  input  int   drop_mv,   // loss drop at the present load
  output int   u_o_mv
);
  logic [PERIOD-1:0] window = '0;
  int   high = 0;
  longint v_uv = 0;      // output voltage in microvolts

  always @(negedge clk) begin
    longint target_uv;
    high   = high + int'(gate) - int'(window[PERIOD-1]);
    window = {window[PERIOD-2:0], gate};
    target_uv = longint'(VSEC_MV) * 1000 * high / PERIOD - longint'(drop_mv) * 1000;
    if (target_uv < 0) target_uv = 0;
    v_uv   = v_uv + (target_uv - v_uv) / TAU;
    u_o_mv = int'(v_uv / 1000);
  end
endmodule
