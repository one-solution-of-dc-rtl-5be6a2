// tb_step_lut: checks the reset contents of the step table against a table
// worked out by hand for BASE = 1, K1 = K2 = 2 (runs of 2, 3, 4 equal signs
// give 1, 2, 4; a reversal gives 1), then random writes and reads against a
// model, and that reset restores the defaults. A second instance with
// BASE = 2, K1 = 3, K2 = 2 (runs give 2, 6, 12; a reversal after a run of 3
// gives 3, otherwise 2) checks the parameterised growth and the halving.
module tb_step_lut;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] rd_addr, wr_addr, rd_addr2;
  logic signed [7:0] rd_step, wr_step, rd_step2;
  logic wr_en = 1'b0;
  int checks = 0, failures = 0;

  // index = {oldest .. newest sign}
  localparam int EXP [16] = '{-4, 1, -1, 1, -1, 1, -1, 2, -2, 1, -1, 1, -1, 1, -1, 4};
  localparam int EXP2 [16] = '{-12, 3, -2, 2, -2, 2, -2, 6, -6, 2, -2, 2, -2, 2, -3, 12};

  step_lut dut (.clk(clk), .rst_n(rst_n), .rd_addr(rd_addr), .rd_step(rd_step),
                .wr_en(wr_en), .wr_addr(wr_addr), .wr_step(wr_step));
  step_lut #(.BASE(2), .K1(3), .K2(2)) dut2 (
    .clk(clk), .rst_n(rst_n), .rd_addr(rd_addr2), .rd_step(rd_step2),
    .wr_en(1'b0), .wr_addr(4'd0), .wr_step(8'sd0));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_defaults(input string what);
    for (int a = 0; a < 16; a++) begin
      rd_addr = 4'(a);
      rd_addr2 = 4'(a);
      #1;
      checks++;
      if (int'(rd_step) != EXP[a]) begin
        failures++;
        $display("FAIL %s addr %b step %0d expected %0d", what, 4'(a), rd_step, EXP[a]);
      end
      checks++;
      if (int'(rd_step2) != EXP2[a]) begin
        failures++;
        $display("FAIL %s (BASE=2, K=3,2) addr %b step %0d expected %0d", what, 4'(a), rd_step2, EXP2[a]);
      end
    end
  endtask

  initial begin
    int model [16];
    wr_addr = '0;
    wr_step = '0;
    rd_addr = '0;
    rd_addr2 = '0;
    repeat (2) @(posedge clk);
    check_defaults("reset");
    rst_n = 1'b1;
    foreach (model[a]) model[a] = EXP[a];
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wr_en   = ($urandom % 2) == 0;
      wr_addr = 4'($urandom);
      wr_step = 8'($urandom);
      rd_addr = 4'($urandom);
      #1;
      checks++;
      if (int'(rd_step) != model[rd_addr]) begin
        failures++;
        if (failures < 10) $display("FAIL read addr %0d got %0d expected %0d", rd_addr, rd_step, model[rd_addr]);
      end
      @(posedge clk);
      if (wr_en) model[wr_addr] = int'(wr_step);
    end
    @(negedge clk);
    wr_en = 1'b0;
    rst_n = 1'b0;
    #1;
    check_defaults("re-reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
