// mneo_top: binary modified-neocognitron (MNEO) face recogniser, a SIMD
// processor array that classifies a 32x32 grey image into one of 12 classes.
//
// Blocks (as in the published block diagram):
//   image_ram          input image, written by the host
//   segmentation_unit  (SU) cuts S-layer inputs into receptive-field rows
//   control_unit       (CU) runs S1, C1, S2, C2, FC and the activation in turn
//   memory_unit        (MU) weights and binary feature maps
//   pe_unit            (PEs) distance PEs, competition, C cells, FC cells, satlin
// Use: load the image (img_we ...) and the weights (sw_we ..., fw_we ...),
// pulse start, and wait for recog_end; recog_code is the class, scores the
// satlin output of each class (SAT_ONE = 1.0). busy is high from start until
// the run ends. A run takes about 11,000 clocks: 3,920 for S1 (784 fields x 5
// beats), 6,400 for S2 (100 fields x 64 beats), 256 for FC, plus the C layers
// and pipeline fill. Weights and image must not be written while busy.
module mneo_top
  import mneo_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst_n,
  // host: image
  input  logic                              img_we,
  input  logic [POS_W-1:0]                  img_row,
  input  logic [POS_W-1:0]                  img_col,
  input  logic [PIX_W-1:0]                  img_data,
  // host: S1/S2 weights (address map in mneo_pkg; element = pe*LANES + lane)
  input  logic                              sw_we,
  input  logic [SW_AW-1:0]                  sw_addr,
  input  logic [$clog2(N_PE*LANES)-1:0]     sw_elem,
  input  logic [PIX_W-1:0]                  sw_data,
  // host: FC weights (address = input number, element = class)
  input  logic                              fw_we,
  input  logic [FC_AW-1:0]                  fw_addr,
  input  logic [CODE_W-1:0]                 fw_elem,
  input  logic [FC_W-1:0]                   fw_data,
  // run control and result
  input  logic                              start,
  output logic                              busy,
  output logic [CODE_W-1:0]                 recog_code,
  output logic                              recog_end,
  output logic [N_CLASS-1:0][SAT_OUT_W-1:0] scores
);

  phase_t phase;
  logic   clear;

  // SU <-> memories <-> PEs
  logic                                     su_start, su_mode;
  logic [POS_W-1:0]                         img_rd_row, img_rd_col;
  logic [LANES-1:0][PIX_W-1:0]              img_lanes;
  logic [POS_W-1:0]                         c1_rd_row, c1_rd_col;
  logic [S2_WIN-1:0][S2_WIN-1:0][S1_PLANES-1:0] c1_win;
  logic [SW_AW-1:0]                         s_w_addr;
  beat_t                                    beat;
  logic [LANES-1:0]                         mask;
  logic [LANES-1:0][PIX_W-1:0]              x;
  logic [N_PE-1:0][LANES-1:0][PIX_W-1:0]    s_w;

  // S results
  logic                                     s_wr, s_done;
  logic [POS_W-1:0]                         s_wr_row, s_wr_col;
  logic [S2_PLANES-1:0]                     s_wr_data;

  // C layers
  logic                                     c_valid, c_last, c_wr, c_done;
  logic [POS_W-1:0]                         c_row, c_col, c_rd_row, c_rd_col, c_wr_row, c_wr_col;
  logic [C1_WIN-1:0][C1_WIN-1:0][S2_PLANES-1:0] c_win;
  logic [S2_PLANES-1:0]                     c_wr_data;

  // FC and activation
  logic                                     fc_valid, fc_first, fc_last, fc_done;
  logic [$clog2(S2_PLANES)-1:0]             fc_plane;
  logic [POS_W-1:0]                         fc_rd_row, fc_rd_col;
  logic [FC_AW-1:0]                         fc_w_addr;
  logic [S2_PLANES-1:0]                     fc_word;
  logic [N_CLASS-1:0][FC_W-1:0]             fc_w;
  logic                                     act_valid;
  logic [CODE_W-1:0]                        act_idx;

  image_ram u_img (
    .clk,
    .we(img_we), .wr_row(img_row), .wr_col(img_col), .wr_data(img_data),
    .rd_row(img_rd_row), .rd_col(img_rd_col), .rd_data(img_lanes)
  );

  segmentation_unit u_su (
    .clk, .rst_n,
    .start(su_start), .mode(su_mode),
    .img_rd_row, .img_rd_col, .img_data(img_lanes),
    .c1_rd_row, .c1_rd_col, .c1_win,
    .w_addr(s_w_addr),
    .beat, .mask, .x,
    .busy()
  );

  control_unit u_cu (
    .clk, .rst_n,
    .start, .busy, .phase, .clear,
    .su_start, .su_mode, .s_done,
    .c_valid, .c_last, .c_row, .c_col, .c_rd_row, .c_rd_col, .c_done,
    .fc_valid, .fc_first, .fc_last, .fc_plane, .fc_rd_row, .fc_rd_col, .fc_w_addr, .fc_done,
    .act_valid, .act_idx, .recog_end
  );

  memory_unit u_mu (
    .clk, .phase,
    .sw_we, .sw_addr, .sw_elem, .sw_data,
    .fw_we, .fw_addr, .fw_elem, .fw_data,
    .s_w_addr, .s_w,
    .c1_rd_row, .c1_rd_col, .c1_win,
    .s_wr, .s_wr_row, .s_wr_col, .s_wr_data,
    .c_rd_row, .c_rd_col, .c_win,
    .c_wr, .c_wr_row, .c_wr_col, .c_wr_data,
    .fc_rd_row, .fc_rd_col, .fc_word,
    .fc_w_addr, .fc_w
  );

  pe_unit u_pes (
    .clk, .rst_n, .clear,
    .beat, .mask, .x, .s_w,
    .s_wr, .s_wr_row, .s_wr_col, .s_wr_data, .s_done,
    .c_valid, .c_last, .c_row, .c_col, .c_win,
    .c_wr, .c_wr_row, .c_wr_col, .c_wr_data, .c_done,
    .fc_valid, .fc_first, .fc_last, .fc_plane, .fc_word, .fc_w, .fc_done,
    .act_valid, .act_idx,
    .scores, .recog_code, .recog_end
  );

endmodule
