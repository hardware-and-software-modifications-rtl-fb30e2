// segmentation_unit (SU): cuts the input of an S layer into receptive-field
// vectors and streams them to the PE array.
//
// mode 0 (S1): for every 5x5 field of the image (stride 1, 28x28 positions)
//   it reads the field row by row, one row of LANES pixels per clock, through
//   the image RAM's read port: 5 beats per position.
// mode 1 (S2): for every 4x4x4 field of the C1 map (stride 1, 10x10 positions)
//   it reads the window once from the C1 map and then presents it as 4 plane
//   groups x 4 input planes x 4 rows = 64 beats, each row being 4 binary cells
//   mapped to 0 or BIN_ONE; the fifth lane is masked off.
// Timing: start (one clock) begins a layer. The unit drives read addresses
// (img_rd_*, c1_rd_*, w_addr) from its counters and, one clock later, when the
// memories have answered, presents the beat: x, mask and the beat_t flags.
// Exactly one beat per clock is produced, so a layer takes positions x beats
// clocks plus one; `beat.last_all` marks its final beat.
// Segmenting the image into overlapping sub-images for the PEs follows the
// published block diagram; the beat order and flags are this design's choice.
module segmentation_unit
  import mneo_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic                        mode,       // 0: S1, 1: S2
  // image RAM read port
  output logic [POS_W-1:0]            img_rd_row,
  output logic [POS_W-1:0]            img_rd_col,
  input  logic [LANES-1:0][PIX_W-1:0] img_data,
  // C1 map read port
  output logic [POS_W-1:0]            c1_rd_row,
  output logic [POS_W-1:0]            c1_rd_col,
  input  logic [S2_WIN-1:0][S2_WIN-1:0][S1_PLANES-1:0] c1_win,
  // S-weight memory address
  output logic [SW_AW-1:0]            w_addr,
  // beat stream to the PE array (aligned with the memories' read data)
  output beat_t                       beat,
  output logic [LANES-1:0]            mask,
  output logic [LANES-1:0][PIX_W-1:0] x,
  output logic                        busy
);

  localparam int PLN_W = $clog2(S1_PLANES);
  localparam int ROW_W = $clog2(S1_WIN);

  logic                 active, md;
  logic [POS_W-1:0]     pr, pc;        // field position
  logic [GRP_W-1:0]     g;             // plane group
  logic [PLN_W-1:0]     pl;            // input plane (S2)
  logic [ROW_W-1:0]     ri;            // row within the field
  logic [POS_W-1:0]     pos_max;
  logic [GRP_W-1:0]     g_max;
  logic [PLN_W-1:0]     pl_max;
  logic [ROW_W-1:0]     ri_max;
  logic                 is_first, is_last_grp, is_last_pos, is_last_all;

  // beat registered to align with memory read data
  beat_t                bt_d;
  logic                 md_d;
  logic [PLN_W-1:0]     pl_d;
  logic [ROW_W-1:0]     ri_d;

  always_comb begin
    pos_max = md ? POS_W'(S2_OUT - 1) : POS_W'(S1_OUT - 1);
    g_max   = md ? GRP_W'(N_GRP - 1) : '0;
    pl_max  = md ? PLN_W'(S1_PLANES - 1) : '0;
    ri_max  = md ? ROW_W'(S2_WIN - 1) : ROW_W'(S1_WIN - 1);
    is_first    = (ri == '0) && (pl == '0);
    is_last_grp = (ri == ri_max) && (pl == pl_max);
    is_last_pos = is_last_grp && (g == g_max);
    is_last_all = is_last_pos && (pc == pos_max) && (pr == pos_max);
  end

  // read addresses
  always_comb begin
    img_rd_row = pr + POS_W'(ri);
    img_rd_col = pc;
    c1_rd_row  = pr;
    c1_rd_col  = pc;
    if (md) w_addr = SW_AW'(SW_S2_BASE) + SW_AW'((int'(g) * S1_PLANES + int'(pl)) * S2_WIN + int'(ri));
    else    w_addr = SW_AW'(ri);
  end

  // field counters: row in field, input plane, plane group, column, row
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      md     <= 1'b0;
      pr <= '0; pc <= '0; g <= '0; pl <= '0; ri <= '0;
    end else if (start) begin
      active <= 1'b1;
      md     <= mode;
      pr <= '0; pc <= '0; g <= '0; pl <= '0; ri <= '0;
    end else if (active) begin
      if (ri != ri_max) ri <= ri + 1'b1;
      else begin
        ri <= '0;
        if (pl != pl_max) pl <= pl + 1'b1;
        else begin
          pl <= '0;
          if (g != g_max) g <= g + 1'b1;
          else begin
            g <= '0;
            if (pc != pos_max) pc <= pc + 1'b1;
            else begin
              pc <= '0;
              if (pr != pos_max) pr <= pr + 1'b1;
              else begin
                pr     <= '0;
                active <= 1'b0;
              end
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bt_d <= '0;
      md_d <= 1'b0;
      pl_d <= '0;
      ri_d <= '0;
    end else begin
      bt_d.valid    <= active && !start;
      bt_d.first    <= is_first;
      bt_d.last_grp <= is_last_grp;
      bt_d.last_pos <= is_last_pos;
      bt_d.last_all <= is_last_all;
      bt_d.grp      <= g;
      bt_d.row      <= pr;
      bt_d.col      <= pc;
      md_d          <= md;
      pl_d          <= pl;
      ri_d          <= ri;
    end
  end

  // lane data: image pixels (S1) or binary C1 cells scaled to BIN_ONE (S2)
  always_comb begin
    beat = bt_d;
    for (int l = 0; l < LANES; l++) begin
      if (!md_d) begin
        x[l]    = img_data[l];
        mask[l] = 1'b1;
      end else if (l < S2_WIN) begin
        x[l]    = c1_win[ri_d][l % S2_WIN][pl_d] ? PIX_W'(BIN_ONE) : '0;
        mask[l] = 1'b1;
      end else begin
        x[l]    = '0;
        mask[l] = 1'b0;
      end
    end
  end

  always_comb busy = active || bt_d.valid;

endmodule
