// sync2: two-flop synchronizer for the asynchronous comparator output.
// d is sampled on every rising clock edge; q follows d two clocks later.
// Not part of the described loop itself: it only keeps the analog
// comparator's output from reaching the decision logic metastable.
module sync2 #(
  parameter logic RESET_VALUE = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {q, meta} <= {2{RESET_VALUE}};
    else        {q, meta} <= {meta, d};
  end

endmodule
