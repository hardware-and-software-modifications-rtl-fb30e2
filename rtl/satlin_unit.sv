// satlin_unit: the single activation unit shared by all output cells.
//
// It replaces the sigmoid with the saturating linear function
//   y = 0            for x <= -th
//   y = 1            for x >= +th
//   y = 0.5 + x*0.5/th  otherwise,
// which needs one multiplier and one adder. Output cells present their sums
// one after another, one per clock; the unit is a two-stage pipeline, so y
// (unsigned, ONE = 1.0) and its tag appear two clocks after x.
// The function, the single shared unit and the threshold th = 2.5 follow the
// published design; the fixed-point constants (TH in input LSBs, SLOPE =
// 0.5/th scaled by 2^SHIFT) are this design's.
module satlin_unit
  import mneo_pkg::*;
#(
  parameter int IN_W  = FC_ACC_W,
  parameter int OUT_W = SAT_OUT_W,
  parameter int TAG_W = CODE_W,
  parameter int TH    = SAT_TH,
  parameter int SLOPE = SAT_SLOPE,
  parameter int SHIFT = SAT_SHIFT
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] x,
  input  logic [TAG_W-1:0]       tag_in,
  output logic                   out_valid,
  output logic [OUT_W-1:0]       y,
  output logic [TAG_W-1:0]       tag_out
);

  localparam int PW = IN_W + 16;
  localparam int ONE  = 1 << (OUT_W - 1);
  localparam int HALF = ONE / 2;

  logic                 v1;
  logic                 lo1, hi1;
  logic signed [PW-1:0] prod1;
  logic [TAG_W-1:0]     tag1;
  logic signed [PW-1:0] lin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1    <= 1'b0;
      lo1   <= 1'b0;
      hi1   <= 1'b0;
      prod1 <= '0;
      tag1  <= '0;
    end else begin
      v1    <= in_valid;
      lo1   <= PW'(x) <= -PW'(TH);
      hi1   <= PW'(x) >=  PW'(TH);
      prod1 <= PW'(x) * PW'(SLOPE);
      tag1  <= tag_in;
    end
  end

  always_comb lin = PW'(HALF) + (prod1 >>> SHIFT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
      tag_out   <= '0;
    end else begin
      out_valid <= v1;
      tag_out   <= tag1;
      if (lo1)                    y <= '0;
      else if (hi1)               y <= OUT_W'(ONE);
      else if (lin < 0)           y <= '0;
      else if (lin > PW'(ONE))    y <= OUT_W'(ONE);
      else                        y <= OUT_W'(lin);
    end
  end

endmodule
