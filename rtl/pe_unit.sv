// pe_unit (PEs): every computation of the network, driven by the segmentation
// unit's beat stream and the control unit's layer commands.
//
// S layers: N_PE s_cell_pe instances each compute the Manhattan distance of
//   the current field to one plane's weights, LANES values per clock (5 x 4 =
//   20 connections per clock). The competition_unit picks the nearest plane
//   and the unit writes that position's one-hot result (s_wr_*). With 16 S2
//   planes the four PEs go over the field four times, one plane group each.
// C layers: the control unit addresses a 4x4 window of the S map (c_valid,
//   c_row, c_col at clock t); one clock later the window arrives and S2_PLANES
//   c_cell ORs produce the C outputs of all planes of that position (c_wr_*).
// FC layer: one input bit per clock (fc_valid, fc_plane at t; map word and
//   N_CLASS weights arrive at t+1); N_CLASS ff_cell accumulators add the weight
//   where the bit is 1.
// Activation: act_valid/act_idx (one output cell per clock) send the sums in
//   turn through the one shared satlin_unit; the largest result gives
//   recog_code, and recog_end rises with it and stays high until the next
//   `clear`. scores holds every cell's satlin output.
// All write and done outputs are single-clock pulses. The composition follows
// the published PE description; the pipeline registers and the arg-max that
// turns the 12 outputs into the recognition code are this design's choices.
module pe_unit
  import mneo_pkg::*;
(
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic                                    clear,
  // S layers
  input  beat_t                                   beat,
  input  logic [LANES-1:0]                        mask,
  input  logic [LANES-1:0][PIX_W-1:0]             x,
  input  logic [N_PE-1:0][LANES-1:0][PIX_W-1:0]   s_w,
  output logic                                    s_wr,
  output logic [POS_W-1:0]                        s_wr_row,
  output logic [POS_W-1:0]                        s_wr_col,
  output logic [S2_PLANES-1:0]                    s_wr_data,
  output logic                                    s_done,
  // C layers
  input  logic                                    c_valid,
  input  logic                                    c_last,
  input  logic [POS_W-1:0]                        c_row,
  input  logic [POS_W-1:0]                        c_col,
  input  logic [C1_WIN-1:0][C1_WIN-1:0][S2_PLANES-1:0] c_win,
  output logic                                    c_wr,
  output logic [POS_W-1:0]                        c_wr_row,
  output logic [POS_W-1:0]                        c_wr_col,
  output logic [S2_PLANES-1:0]                    c_wr_data,
  output logic                                    c_done,
  // FC layer
  input  logic                                    fc_valid,
  input  logic                                    fc_first,
  input  logic                                    fc_last,
  input  logic [$clog2(S2_PLANES)-1:0]            fc_plane,
  input  logic [S2_PLANES-1:0]                    fc_word,
  input  logic [N_CLASS-1:0][FC_W-1:0]            fc_w,
  output logic                                    fc_done,
  // activation and result
  input  logic                                    act_valid,
  input  logic [CODE_W-1:0]                       act_idx,
  output logic [N_CLASS-1:0][SAT_OUT_W-1:0]       scores,
  output logic [CODE_W-1:0]                       recog_code,
  output logic                                    recog_end
);

  localparam int TAG_W = 2 * POS_W + 1;
  localparam int IW    = $clog2(N_PE * N_GRP);

  // ---------------- S layers ----------------
  logic [N_PE-1:0][DIST_W-1:0] dsum;
  logic [N_PE-1:0]             dvalid_v;
  beat_t                       beat_d;
  logic                        win_valid;
  logic [IW-1:0]               win_idx;
  logic [TAG_W-1:0]            win_tag;

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    s_cell_pe u_pe (
      .clk, .rst_n,
      .in_valid  (beat.valid),
      .first     (beat.first),
      .last      (beat.last_grp),
      .mask,
      .x,
      .w         (s_w[p]),
      .dsum      (dsum[p]),
      .dvalid(dvalid_v[p])
    );
  end

  // beat flags follow the distances by one clock
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) beat_d <= '0;
    else        beat_d <= beat;
  end

  competition_unit u_comp (
    .clk, .rst_n,
    .in_valid (dvalid_v[0]),
    .grp      (beat_d.grp),
    .last     (beat_d.last_pos),
    .dsum,
    .tag_in   ({beat_d.last_all, beat_d.row, beat_d.col}),
    .win_valid,
    .win_idx,
    .tag_out  (win_tag)
  );

  always_comb begin
    s_wr      = win_valid;
    s_wr_row  = win_tag[2*POS_W-1:POS_W];
    s_wr_col  = win_tag[POS_W-1:0];
    s_wr_data = S2_PLANES'(1) << win_idx;
    s_done    = win_valid && win_tag[TAG_W-1];
  end

  // an S result names exactly one winning plane
  a_s_onehot: assert property (@(posedge clk) disable iff (!rst_n) s_wr |-> $onehot(s_wr_data));

  // ---------------- C layers ----------------
  logic             c_v_d, c_last_d;
  logic [POS_W-1:0] c_row_d, c_col_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_v_d <= 1'b0; c_last_d <= 1'b0; c_row_d <= '0; c_col_d <= '0;
    end else begin
      c_v_d <= c_valid; c_last_d <= c_last; c_row_d <= c_row; c_col_d <= c_col;
    end
  end

  for (genvar k = 0; k < S2_PLANES; k++) begin : g_cc
    logic [C1_WIN*C1_WIN-1:0] fld;
    always_comb begin
      for (int i = 0; i < C1_WIN; i++)
        for (int j = 0; j < C1_WIN; j++)
          fld[i*C1_WIN + j] = c_win[i][j][k];
    end
    c_cell #(.N_IN(C1_WIN * C1_WIN)) u_cc (.field(fld), .out(c_wr_data[k]));
  end

  always_comb begin
    c_wr     = c_v_d;
    c_wr_row = c_row_d;
    c_wr_col = c_col_d;
    c_done   = c_v_d && c_last_d;
  end

  // ---------------- FC layer ----------------
  logic                              fc_v_d, fc_first_d, fc_last_d;
  logic [$clog2(S2_PLANES)-1:0]      fc_plane_d;
  logic signed [N_CLASS-1:0][FC_ACC_W-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fc_v_d <= 1'b0; fc_first_d <= 1'b0; fc_last_d <= 1'b0; fc_plane_d <= '0; fc_done <= 1'b0;
    end else begin
      fc_v_d     <= fc_valid;
      fc_first_d <= fc_first;
      fc_last_d  <= fc_last;
      fc_plane_d <= fc_plane;
      fc_done    <= fc_v_d && fc_last_d;
    end
  end

  for (genvar n = 0; n < N_CLASS; n++) begin : g_ff
    ff_cell u_ff (
      .clk, .rst_n,
      .in_valid (fc_v_d),
      .first    (fc_first_d),
      .x        (fc_word[fc_plane_d]),
      .w        (fc_w[n]),
      .acc      (acc[n])
    );
  end

  // ---------------- shared activation and arg-max ----------------
  logic                  sat_v;
  logic [SAT_OUT_W-1:0]  sat_y;
  logic [CODE_W-1:0]     sat_tag;
  logic [SAT_OUT_W-1:0]  best_y;

  satlin_unit u_sat (
    .clk, .rst_n,
    .in_valid (act_valid),
    .x        (acc[act_idx]),
    .tag_in   (act_idx),
    .out_valid(sat_v),
    .y        (sat_y),
    .tag_out  (sat_tag)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scores     <= '0;
      best_y     <= '0;
      recog_code <= '0;
      recog_end  <= 1'b0;
    end else if (clear) begin
      recog_end  <= 1'b0;
    end else if (sat_v) begin
      scores[sat_tag] <= sat_y;
      if (sat_tag == '0 || sat_y > best_y) begin
        best_y     <= sat_y;
        recog_code <= sat_tag;
      end
      if (sat_tag == CODE_W'(N_CLASS - 1)) recog_end <= 1'b1;
    end
  end

endmodule
