// competition_unit: winner-take-all stage of an S layer.
//
// For one receptive-field position, the S cell whose weight vector is closest
// (smallest Manhattan distance) to the field wins: its output is 1 and all
// other planes' outputs are 0. The PE array delivers NPE distances at a time
// (in_valid); when a layer has more planes than PEs they arrive in groups
// (grp = 0, 1, ...) and the unit keeps the best candidate of the groups seen so
// far. On the group marked `last` it reports the winning plane number, one
// clock later, with win_valid and the tag given with that group.
// Ties go to the lower plane number. Winner-take-all by minimum distance
// follows the published S-cell; grouping and the tie rule are this design's.
module competition_unit
  import mneo_pkg::*;
#(
  parameter int NPE   = N_PE,
  parameter int NGRP  = N_GRP,
  parameter int DW    = DIST_W,
  parameter int TAG_W = 2 * POS_W + 1,
  localparam int GW   = (NGRP > 1) ? $clog2(NGRP) : 1,
  localparam int IW   = $clog2(NPE * NGRP)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [GW-1:0]         grp,
  input  logic                  last,
  input  logic [NPE-1:0][DW-1:0] dsum,
  input  logic [TAG_W-1:0]      tag_in,
  output logic                  win_valid,
  output logic [IW-1:0]         win_idx,
  output logic [TAG_W-1:0]      tag_out
);

  logic [DW-1:0] loc_d;
  logic [IW-1:0] loc_i;
  logic [DW-1:0] best_d, cand_d;
  logic [IW-1:0] best_i, cand_i;

  // local minimum of this group, lowest index on ties
  always_comb begin
    loc_d = dsum[0];
    loc_i = IW'(int'(grp) * NPE);
    for (int p = 1; p < NPE; p++) begin
      if (dsum[p] < loc_d) begin
        loc_d = dsum[p];
        loc_i = IW'(int'(grp) * NPE + p);
      end
    end
    if (grp == '0 || loc_d < best_d) begin
      cand_d = loc_d;
      cand_i = loc_i;
    end else begin
      cand_d = best_d;
      cand_i = best_i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_d    <= '0;
      best_i    <= '0;
      win_valid <= 1'b0;
      win_idx   <= '0;
      tag_out   <= '0;
    end else begin
      win_valid <= in_valid && last;
      if (in_valid) begin
        best_d <= cand_d;
        best_i <= cand_i;
        if (last) begin
          win_idx <= cand_i;
          tag_out <= tag_in;
        end
      end
    end
  end

endmodule
