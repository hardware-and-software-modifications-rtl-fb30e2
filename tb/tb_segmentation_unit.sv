// tb_segmentation_unit: runs the segmentation unit over a whole S1 layer and a
// whole S2 layer. Behavioural one-clock memories here answer its image and C1
// window reads from random contents. Every beat is checked against the field
// order worked out here: lane data, lane mask, weight address (as returned a
// clock later), first / last flags, plane group and position; the number of
// beats (784 x 5 and 100 x 64) and their arrival one per clock are checked too.
module tb_segmentation_unit;
  import mneo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, mode = 1'b0;
  logic [POS_W-1:0] img_rd_row, img_rd_col, c1_rd_row, c1_rd_col;
  logic [LANES-1:0][PIX_W-1:0] img_data, x;
  logic [S2_WIN-1:0][S2_WIN-1:0][S1_PLANES-1:0] c1_win;
  logic [SW_AW-1:0] w_addr, w_addr_d;
  beat_t beat;
  logic [LANES-1:0] mask;
  logic busy;
  int checks = 0, failures = 0;

  int img [IMG_SIZE][IMG_SIZE];
  bit c1 [C1_OUT][C1_OUT][S1_PLANES];

  segmentation_unit u_dut (.*);

  // one-clock memories
  always @(posedge clk) begin
    for (int l = 0; l < LANES; l++)
      img_data[l] <= (int'(img_rd_col) + l < IMG_SIZE) ? PIX_W'(img[img_rd_row][int'(img_rd_col) + l]) : '0;
    for (int i = 0; i < S2_WIN; i++)
      for (int j = 0; j < S2_WIN; j++)
        for (int p = 0; p < S1_PLANES; p++)
          c1_win[i][j][p] <= (int'(c1_rd_row) + i < C1_OUT && int'(c1_rd_col) + j < C1_OUT) ?
                             c1[int'(c1_rd_row) + i][int'(c1_rd_col) + j][p] : 1'b0;
    w_addr_d <= w_addr;
  end

  task automatic expect_beat(bit m, int r, int c, int g, int pl, int i, int npos, int ng, int npl, int nrow);
    int e;
    checks++;
    if (!beat.valid) begin failures++; $display("missing beat (%0d,%0d) g%0d p%0d i%0d", r, c, g, pl, i); return; end
    if (beat.row != POS_W'(r) || beat.col != POS_W'(c) || beat.grp != GRP_W'(g) ||
        beat.first != (i == 0 && pl == 0) || beat.last_grp != (i == nrow-1 && pl == npl-1) ||
        beat.last_pos != (i == nrow-1 && pl == npl-1 && g == ng-1) ||
        beat.last_all != (i == nrow-1 && pl == npl-1 && g == ng-1 && r == npos-1 && c == npos-1)) begin
      failures++;
      if (failures < 10) $display("flags of beat (%0d,%0d) g%0d p%0d i%0d: %p", r, c, g, pl, i, beat);
    end
    checks++;
    e = m ? SW_S2_BASE + (g*S1_PLANES + pl)*S2_WIN + i : i;
    if (int'(w_addr_d) != e) begin failures++; if (failures < 10) $display("w_addr %0d expected %0d", w_addr_d, e); end
    for (int l = 0; l < LANES; l++) begin
      checks++;
      if (!m) e = img[r+i][c+l];
      else    e = (l < S2_WIN && c1[r+i][c+l][pl]) ? BIN_ONE : 0;
      if (int'(x[l]) != e || mask[l] != (!m || l < S2_WIN)) begin
        failures++;
        if (failures < 10) $display("lane %0d of beat (%0d,%0d) g%0d p%0d i%0d: %0d expected %0d", l, r, c, g, pl, i, x[l], e);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < IMG_SIZE; r++) for (int c = 0; c < IMG_SIZE; c++) img[r][c] = $urandom_range(511);
    for (int r = 0; r < C1_OUT; r++) for (int c = 0; c < C1_OUT; c++) for (int p = 0; p < S1_PLANES; p++) c1[r][c][p] = 1'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 2; m++) begin
      int npos, ng, npl, nrow;
      npos = m ? S2_OUT : S1_OUT; ng = m ? N_GRP : 1; npl = m ? S1_PLANES : 1; nrow = m ? S2_WIN : S1_WIN;
      start = 1; mode = 1'(m);
      @(negedge clk);
      start = 0;
      @(negedge clk);   // addresses of the first beat are answered now
      for (int r = 0; r < npos; r++)
        for (int c = 0; c < npos; c++)
          for (int g = 0; g < ng; g++)
            for (int pl = 0; pl < npl; pl++)
              for (int i = 0; i < nrow; i++) begin
                expect_beat(1'(m), r, c, g, pl, i, npos, ng, npl, nrow);
                @(negedge clk);
              end
      checks++;
      if (beat.valid) begin failures++; $display("extra beat after layer %0d", m); end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("still busy after layer %0d", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
