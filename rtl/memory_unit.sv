// memory_unit (MU): on-chip storage of the network: layer weights and the
// binary feature maps between layers.
//
//   s_wmem   S1 and S2 weights, one word = N_PE x LANES weights (see mneo_pkg
//            for the address map), read by the segmentation unit's w_addr
//   fc_wmem  FC weights, one word per input = N_CLASS signed weights
//   s1_map   28x28x4 one-hot S1 outputs   (SIMPL_1)
//   c1_map   13x13x4 C1 outputs           (Complex_1)
//   s2_map   10x10x16 one-hot S2 outputs  (SIMPL_2)
//   c2_map   4x4x16 C2 outputs            (Complex_2)
// The current phase routes the PE array's S and C writes to the map of that
// layer and selects which S map the C-layer window (c_win) comes from. All
// reads are registered: data follows its address by one clock.
// Position ports are POS_W bits wide for every map; the smaller maps use only
// their low address bits, so the upper bits of those ports are unused.
// The split into weight stores and SIMPL/Complex maps follows the published
// block diagram; the host write ports and the routing are this design's.
module memory_unit
  import mneo_pkg::*;
(
  input  logic                                    clk,
  input  phase_t                                  phase,
  // host loading of weights
  input  logic                                    sw_we,
  input  logic [SW_AW-1:0]                        sw_addr,
  input  logic [$clog2(N_PE*LANES)-1:0]           sw_elem,
  input  logic [PIX_W-1:0]                        sw_data,
  input  logic                                    fw_we,
  input  logic [FC_AW-1:0]                        fw_addr,
  input  logic [CODE_W-1:0]                       fw_elem,
  input  logic [FC_W-1:0]                         fw_data,
  // S weights to the PEs, addressed by the segmentation unit
  input  logic [SW_AW-1:0]                        s_w_addr,
  output logic [N_PE-1:0][LANES-1:0][PIX_W-1:0]   s_w,
  // C1 window to the segmentation unit (S2 input)
  input  logic [POS_W-1:0]                        c1_rd_row,
  input  logic [POS_W-1:0]                        c1_rd_col,
  output logic [S2_WIN-1:0][S2_WIN-1:0][S1_PLANES-1:0] c1_win,
  // S-layer results
  input  logic                                    s_wr,
  input  logic [POS_W-1:0]                        s_wr_row,
  input  logic [POS_W-1:0]                        s_wr_col,
  input  logic [S2_PLANES-1:0]                    s_wr_data,
  // C-layer window read and results
  input  logic [POS_W-1:0]                        c_rd_row,
  input  logic [POS_W-1:0]                        c_rd_col,
  output logic [C1_WIN-1:0][C1_WIN-1:0][S2_PLANES-1:0] c_win,
  input  logic                                    c_wr,
  input  logic [POS_W-1:0]                        c_wr_row,
  input  logic [POS_W-1:0]                        c_wr_col,
  input  logic [S2_PLANES-1:0]                    c_wr_data,
  // FC inputs and weights
  input  logic [POS_W-1:0]                        fc_rd_row,
  input  logic [POS_W-1:0]                        fc_rd_col,
  output logic [S2_PLANES-1:0]                    fc_word,
  input  logic [FC_AW-1:0]                        fc_w_addr,
  output logic [N_CLASS-1:0][FC_W-1:0]            fc_w
);

  localparam int A28 = $clog2(S1_OUT);
  localparam int A13 = $clog2(C1_OUT);
  localparam int A10 = $clog2(S2_OUT);
  localparam int A4  = $clog2(C2_OUT);

  // ---------------- weights ----------------
  logic [N_PE*LANES-1:0][PIX_W-1:0] s_word;

  weight_mem #(.DEPTH(SW_DEPTH), .ELEMS(N_PE * LANES), .W(PIX_W)) u_s_wmem (
    .clk, .we(sw_we), .wr_addr(sw_addr), .wr_elem(sw_elem), .wr_data(sw_data),
    .rd_addr(s_w_addr), .rd_data(s_word)
  );
  always_comb s_w = s_word;

  weight_mem #(.DEPTH(FC_IN), .ELEMS(N_CLASS), .W(FC_W)) u_fc_wmem (
    .clk, .we(fw_we), .wr_addr(fw_addr), .wr_elem(fw_elem), .wr_data(fw_data),
    .rd_addr(fc_w_addr), .rd_data(fc_w)
  );

  // ---------------- feature maps ----------------
  logic [C1_WIN-1:0][C1_WIN-1:0][S1_PLANES-1:0] s1_win;
  logic [C2_WIN-1:0][C2_WIN-1:0][S2_PLANES-1:0] s2_win;
  logic [0:0][0:0][S2_PLANES-1:0]               c2_word;

  feature_map_mem #(.P(S1_PLANES), .DIM(S1_OUT), .WIN(C1_WIN)) u_s1_map (
    .clk,
    .we(s_wr && phase == PH_S1), .wr_row(A28'(s_wr_row)), .wr_col(A28'(s_wr_col)),
    .wr_data(s_wr_data[S1_PLANES-1:0]),
    .rd_row(A28'(c_rd_row)), .rd_col(A28'(c_rd_col)), .rd_win(s1_win)
  );

  feature_map_mem #(.P(S1_PLANES), .DIM(C1_OUT), .WIN(S2_WIN)) u_c1_map (
    .clk,
    .we(c_wr && phase == PH_C1), .wr_row(A13'(c_wr_row)), .wr_col(A13'(c_wr_col)),
    .wr_data(c_wr_data[S1_PLANES-1:0]),
    .rd_row(A13'(c1_rd_row)), .rd_col(A13'(c1_rd_col)), .rd_win(c1_win)
  );

  feature_map_mem #(.P(S2_PLANES), .DIM(S2_OUT), .WIN(C2_WIN)) u_s2_map (
    .clk,
    .we(s_wr && phase == PH_S2), .wr_row(A10'(s_wr_row)), .wr_col(A10'(s_wr_col)),
    .wr_data(s_wr_data),
    .rd_row(A10'(c_rd_row)), .rd_col(A10'(c_rd_col)), .rd_win(s2_win)
  );

  feature_map_mem #(.P(S2_PLANES), .DIM(C2_OUT), .WIN(1)) u_c2_map (
    .clk,
    .we(c_wr && phase == PH_C2), .wr_row(A4'(c_wr_row)), .wr_col(A4'(c_wr_col)),
    .wr_data(c_wr_data),
    .rd_row(A4'(fc_rd_row)), .rd_col(A4'(fc_rd_col)), .rd_win(c2_word)
  );

  always_comb begin
    fc_word = c2_word[0][0];
    for (int i = 0; i < C1_WIN; i++)
      for (int j = 0; j < C1_WIN; j++)
        c_win[i][j] = (phase == PH_C2) ? s2_win[i][j] : S2_PLANES'(s1_win[i][j]);
  end

endmodule
