// ff_cell: output cell of the fully connected layer, before its activation.
//
// The inputs of this layer are binary, so the weighted sum needs no multiplier:
// an AND gate passes the weight when the input bit is 1 and the accumulator
// adds it. One input is taken per clock (in_valid); `first` restarts the sum.
// acc is the signed running sum of the weights of all inputs that were 1.
// This follows the published feedforward cell; weight width is this design's.
module ff_cell
  import mneo_pkg::*;
#(
  parameter int W  = FC_W,
  parameter int AW = FC_ACC_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                first,
  input  logic                x,
  input  logic signed [W-1:0] w,
  output logic signed [AW-1:0] acc
);

  logic signed [W-1:0] gated;

  always_comb gated = x ? w : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        acc <= '0;
    else if (in_valid) acc <= (first ? AW'(0) : acc) + AW'(gated);
  end

endmodule
