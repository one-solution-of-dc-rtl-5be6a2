// error_gate: the gate that compares the comparator output with the sign of
// the previous duty change and produces fi.
//
//   fi = 1 : the output voltage is still on the side the last change was
//            moving it away from, so the direction is kept (error persists);
//   fi = 0 : the last change carried the output across the reference, so
//            the direction reverses.
//
// comp_hi is 1 when the output voltage is above the reference; sign_prev is 1
// when the last change increased the duty. With these polarities the gate is
// an exclusive OR: after an increase (sign_prev = 1) an output above the
// reference (comp_hi = 1) gives fi = 0 and the duty is decreased next. A
// comparator wired with the opposite polarity needs the inverted function;
// INVERT selects it. Purely combinational, no clock. The keep/reverse
// meaning of fi follows the described converter; the comparator and sign
// polarities, and hence the XOR default, are this design's resolution of
// them.
module error_gate #(
  parameter bit INVERT = 1'b0
) (
  input  logic comp_hi,    // 1: output voltage above reference
  input  logic sign_prev,  // 1: previous duty change was an increase
  output logic fi          // 1: keep direction, 0: reverse
);

  always_comb fi = (comp_hi ^ sign_prev) ^ INVERT;

endmodule
