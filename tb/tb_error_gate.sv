// tb_error_gate: exhaustive check of the keep/reverse gate.
// Expected value: the direction must reverse (fi = 0) exactly when the last
// change pushed the output across the reference, i.e. an increase followed by
// an output above the reference, or a decrease followed by an output below
// it. The INVERT = 1 variant must give the opposite function.
module tb_error_gate;
  logic clk = 1'b0;
  logic comp_hi, sign_prev, fi, fi_inv;
  int checks = 0, failures = 0;

  error_gate dut (.comp_hi(comp_hi), .sign_prev(sign_prev), .fi(fi));
  error_gate #(.INVERT(1'b1)) dut_inv (.comp_hi(comp_hi), .sign_prev(sign_prev), .fi(fi_inv));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic crossed;
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 4; i++) begin
        {comp_hi, sign_prev} = 2'(i);
        @(posedge clk);
        crossed = (sign_prev && comp_hi) || (!sign_prev && !comp_hi);
        checks++;
        if (fi !== !crossed) begin
          failures++;
          $display("FAIL comp_hi=%b sign_prev=%b fi=%b", comp_hi, sign_prev, fi);
        end
        checks++;
        if (fi_inv !== crossed) begin
          failures++;
          $display("FAIL inverted comp_hi=%b sign_prev=%b fi=%b", comp_hi, sign_prev, fi_inv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
