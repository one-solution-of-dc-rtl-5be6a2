// step_lut: programmable table of duty-cycle steps, addressed by the sign
// history of the last ADDR_W changes.
//
// Each of the 2**ADDR_W entries is a signed step (in duty counts) that the
// PWM generator adds to the duty factor. After reset every entry holds
// dcdc_pkg::default_step() of its address for the BASE/K1/K2 parameters,
// which realises the growing-step / halve-on-reversal algorithm. The table
// can be rewritten at run time through the write port to tune the loop, for
// example with +/-BASE in every entry for a converter with uniform steps.
//
// Timing: the read is combinational (rd_step follows rd_addr in the same
// cycle); a write takes effect on the next rising clock edge. That the table
// is programmable follows the described design; the port, the widths and the
// defaults are this design's own.
module step_lut
  import dcdc_pkg::*;
#(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned STEP_W = 8,
  parameter int unsigned BASE   = 1,
  parameter int unsigned K1     = 2,
  parameter int unsigned K2     = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [ADDR_W-1:0]        rd_addr,
  output logic signed [STEP_W-1:0] rd_step,
  input  logic                     wr_en,
  input  logic [ADDR_W-1:0]        wr_addr,
  input  logic signed [STEP_W-1:0] wr_step
);

  localparam int unsigned DEPTH = LUT_DEPTH;

  logic signed [STEP_W-1:0] table_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned a = 0; a < DEPTH; a++)
        table_q[a] <= STEP_W'(default_step(HIST_BITS'(a), BASE, K1, K2));
    end else if (wr_en) begin
      table_q[wr_addr] <= wr_step;
    end
  end

  always_comb rd_step = table_q[rd_addr];

  initial begin
    assert (ADDR_W == HIST_BITS && DEPTH == (1 << ADDR_W))
      else $error("step_lut: ADDR_W must equal HIST_BITS");
    assert (BASE * K1 * K2 < (1 << (STEP_W - 1)))
      else $error("step_lut: largest default step does not fit STEP_W");
  end

endmodule
