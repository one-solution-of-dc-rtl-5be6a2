// tb_delay_line: drives random signs with random shift enables into the
// four-stage sign memory and compares every cycle with a queue model.
// Also checks the reset pattern (alternating, newest = decrease) and that
// the word holds while shift_en is low.
module tb_delay_line;
  logic clk = 1'b0, rst_n = 1'b0;
  logic shift_en = 1'b0, sign_in = 1'b0;
  logic [3:0] hist;
  logic [3:0] model;
  int checks = 0, failures = 0;

  delay_line #(.DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (hist !== 4'b1010) begin
      failures++;
      $display("FAIL reset value %b", hist);
    end
    model = 4'b1010;
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      shift_en = ($urandom % 3) != 0;
      sign_in  = 1'($urandom);
      @(posedge clk);
      if (shift_en) model = {model[2:0], sign_in};
      #1;
      checks++;
      if (hist !== model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d hist=%b expected %b", i, hist, model);
      end
    end
    // asynchronous reset in mid-operation
    #2 rst_n = 1'b0;
    #1;
    checks++;
    if (hist !== 4'b1010) begin
      failures++;
      $display("FAIL async reset %b", hist);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
