// comparator_model: behavioural model of the analog output-voltage
// comparator (not synthesizable logic). out is 1 while the output voltage is
// above the reference, 0 otherwise; voltages are integers in millivolts.
module comparator_model (
  input  int   u_o_mv,
  input  int   v_ref_mv,
  output logic out
);
  always_comb out = (u_o_mv > v_ref_mv);
endmodule
