// tb_memory_unit: checks the memory unit's stores and its routing by phase.
// It loads random S and FC weights and reads every word back; then, phase by
// phase, writes random results through the S and C write ports (also writes
// issued in the wrong phase, which must be ignored) and reads them back
// through the C-layer window (S1 map in C1, S2 map in C2), the C1 window of
// the segmentation unit and the FC word port, all one clock after the address.
module tb_memory_unit;
  import mneo_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  phase_t phase = PH_IDLE;
  logic sw_we = 0, fw_we = 0, s_wr = 0, c_wr = 0;
  logic [SW_AW-1:0] sw_addr = '0, s_w_addr = '0;
  logic [$clog2(N_PE*LANES)-1:0] sw_elem = '0;
  logic [PIX_W-1:0] sw_data = '0;
  logic [FC_AW-1:0] fw_addr = '0, fc_w_addr = '0;
  logic [CODE_W-1:0] fw_elem = '0;
  logic [FC_W-1:0] fw_data = '0;
  logic [N_PE-1:0][LANES-1:0][PIX_W-1:0] s_w;
  logic [POS_W-1:0] c1_rd_row = '0, c1_rd_col = '0, s_wr_row = '0, s_wr_col = '0;
  logic [POS_W-1:0] c_rd_row = '0, c_rd_col = '0, c_wr_row = '0, c_wr_col = '0, fc_rd_row = '0, fc_rd_col = '0;
  logic [S2_WIN-1:0][S2_WIN-1:0][S1_PLANES-1:0] c1_win;
  logic [S2_PLANES-1:0] s_wr_data = '0, c_wr_data = '0, fc_word;
  logic [C1_WIN-1:0][C1_WIN-1:0][S2_PLANES-1:0] c_win;
  logic [N_CLASS-1:0][FC_W-1:0] fc_w;
  int checks = 0, failures = 0;

  int sw [SW_DEPTH][N_PE*LANES];
  int fw [FC_IN][N_CLASS];
  int s1 [S1_OUT][S1_OUT], c1 [C1_OUT][C1_OUT], s2 [S2_OUT][S2_OUT], c2 [C2_OUT][C2_OUT];

  memory_unit u_dut (.*);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("%s: %0h expected %0h", what, got, exp);
    end
  endtask


  initial begin
    @(negedge clk);
    // ---- weights ----
    for (int a = 0; a < SW_DEPTH; a++)
      for (int e = 0; e < N_PE*LANES; e++) begin
        sw[a][e] = $urandom_range(511);
        sw_we = 1; sw_addr = SW_AW'(a); sw_elem = 5'(e); sw_data = PIX_W'(sw[a][e]);
        @(negedge clk);
      end
    sw_we = 0;
    for (int a = 0; a < FC_IN; a++)
      for (int e = 0; e < N_CLASS; e++) begin
        fw[a][e] = $urandom_range(511);
        fw_we = 1; fw_addr = FC_AW'(a); fw_elem = CODE_W'(e); fw_data = FC_W'(fw[a][e]);
        @(negedge clk);
      end
    fw_we = 0;
    for (int a = 0; a < FC_IN; a++) begin
      s_w_addr = SW_AW'(a % SW_DEPTH); fc_w_addr = FC_AW'(a);
      @(negedge clk);
      for (int e = 0; e < N_PE*LANES; e++) chk("S weight", int'(s_w[e / LANES][e % LANES]), sw[a % SW_DEPTH][e]);
      for (int e = 0; e < N_CLASS; e++) chk("FC weight", int'(fc_w[e]), fw[a][e]);
    end
    // ---- S1: one-hot writes; C writes must not land ----
    phase = PH_S1;
    for (int r = 0; r < S1_OUT; r++)
      for (int c = 0; c < S1_OUT; c++) begin
        s1[r][c] = 1 << $urandom_range(S1_PLANES-1);
        s_wr = 1; s_wr_row = POS_W'(r); s_wr_col = POS_W'(c); s_wr_data = S2_PLANES'(s1[r][c]);
        c_wr = 1; c_wr_row = POS_W'(r % C1_OUT); c_wr_col = POS_W'(c % C1_OUT); c_wr_data = '1;
        @(negedge clk);
      end
    s_wr = 0; c_wr = 0;
    // ---- C1: window of S1, write C1 ----
    phase = PH_C1;
    for (int r = 0; r < C1_OUT; r++)
      for (int c = 0; c < C1_OUT; c++) begin
        c_rd_row = POS_W'(2*r); c_rd_col = POS_W'(2*c);
        c1[r][c] = $urandom_range(15);
        c_wr = 1; c_wr_row = POS_W'(r); c_wr_col = POS_W'(c); c_wr_data = S2_PLANES'(c1[r][c]);
        s_wr = 1; s_wr_row = POS_W'(r); s_wr_col = POS_W'(c); s_wr_data = '1;   // wrong phase
        @(negedge clk);
        for (int i = 0; i < C1_WIN; i++)
          for (int j = 0; j < C1_WIN; j++)
            chk("C1 window of S1", int'(c_win[i][j]), s1[2*r+i][2*c+j]);
      end
    c_wr = 0; s_wr = 0;
    // ---- S2: read C1 windows, write S2 ----
    phase = PH_S2;
    for (int r = 0; r < S2_OUT; r++)
      for (int c = 0; c < S2_OUT; c++) begin
        c1_rd_row = POS_W'(r); c1_rd_col = POS_W'(c);
        s2[r][c] = 1 << $urandom_range(S2_PLANES-1);
        s_wr = 1; s_wr_row = POS_W'(r); s_wr_col = POS_W'(c); s_wr_data = S2_PLANES'(s2[r][c]);
        c_wr = 1; c_wr_row = POS_W'(r); c_wr_col = POS_W'(c); c_wr_data = '0;     // wrong phase
        @(negedge clk);
        for (int i = 0; i < S2_WIN; i++)
          for (int j = 0; j < S2_WIN; j++)
            chk("S2 window of C1", int'(c1_win[i][j]), c1[r+i][c+j]);
      end
    c_wr = 0; s_wr = 0;
    // ---- C2: window of S2, write C2 ----
    phase = PH_C2;
    for (int r = 0; r < C2_OUT; r++)
      for (int c = 0; c < C2_OUT; c++) begin
        c_rd_row = POS_W'(2*r); c_rd_col = POS_W'(2*c);
        c2[r][c] = $urandom_range(65535);
        c_wr = 1; c_wr_row = POS_W'(r); c_wr_col = POS_W'(c); c_wr_data = S2_PLANES'(c2[r][c]);
        @(negedge clk);
        for (int i = 0; i < C2_WIN; i++)
          for (int j = 0; j < C2_WIN; j++)
            chk("C2 window of S2", int'(c_win[i][j]), s2[2*r+i][2*c+j]);
      end
    c_wr = 0;
    // ---- FC: words of C2; S1 map still intact ----
    phase = PH_FC;
    for (int r = 0; r < C2_OUT; r++)
      for (int c = 0; c < C2_OUT; c++) begin
        fc_rd_row = POS_W'(r); fc_rd_col = POS_W'(c);
        @(negedge clk);
        chk("FC word", int'(fc_word), c2[r][c]);
      end
    phase = PH_C1;
    for (int r = 0; r < C1_OUT; r++) begin
      c_rd_row = POS_W'(2*r); c_rd_col = POS_W'(2*r);
      @(negedge clk);
      chk("S1 map after later phases", int'(c_win[0][0]), s1[2*r][2*r]);
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
