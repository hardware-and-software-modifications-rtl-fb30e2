// s_cell_pe: processing element computing the Manhattan distance between a
// receptive field and the weight vector of one S plane.
//
// Each clock with in_valid it takes NLANE input values and NLANE weights,
// forms |x - w| for every lane whose mask bit is set, and adds the lane sum to
// its accumulator; `first` starts a new sum. On the clock after a beat marked
// `last`, dsum holds the complete distance and dvalid is high for one
// clock. Distance (sum of absolute differences) in place of a dot product and
// the subtract / absolute / accumulate datapath follow the published S-cell;
// the lane mask, which lets the same PE take S2 fields of four values per row,
// is this design's addition.
module s_cell_pe
  import mneo_pkg::*;
#(
  parameter int NLANE = LANES,
  parameter int W     = PIX_W,
  parameter int DW    = DIST_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    first,
  input  logic                    last,
  input  logic [NLANE-1:0]        mask,
  input  logic [NLANE-1:0][W-1:0] x,
  input  logic [NLANE-1:0][W-1:0] w,
  output logic [DW-1:0]           dsum,
  output logic                    dvalid
);

  logic [DW-1:0] lane_sum;

  always_comb begin
    lane_sum = '0;
    for (int l = 0; l < NLANE; l++) begin
      if (mask[l]) begin
        if (x[l] >= w[l]) lane_sum = lane_sum + DW'(x[l] - w[l]);
        else              lane_sum = lane_sum + DW'(w[l] - x[l]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dsum       <= '0;
      dvalid <= 1'b0;
    end else begin
      dvalid <= in_valid && last;
      if (in_valid) dsum <= (first ? '0 : dsum) + lane_sum;
    end
  end

endmodule
