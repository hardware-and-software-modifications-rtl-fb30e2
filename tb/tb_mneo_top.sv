// tb_mneo_top: end-to-end test of the recogniser at its full default size.
//
// For each of several runs it loads a random image and random S1, S2 and FC
// weights, starts a recognition and waits for recog_end. A behavioural model
// written here from the network equations (nearest-plane S layers, OR C
// layers, weight sums of the FC layer, real-valued satlin) gives the expected
// S1, C1, S2 and C2 maps, which are compared with the memory unit's maps, and
// the expected scores (within one output LSB) and class code.
// It also checks the S1 rate (5 beats per field, 20 connections per clock) and
// counts the mechanisms the design has: every S1 plane winning, S2 winners
// found in a later plane group, C cells at 1 and at 0, FC inputs at 1 and at
// 0, and satlin outputs in the low, linear and high regions. A mechanism that
// never happens counts as a failure.
module tb_mneo_top;
  import mneo_pkg::*;

  localparam int RUNS = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #10 clk = ~clk;   // 50 MHz

  logic                              img_we = 1'b0;
  logic [POS_W-1:0]                  img_row = '0, img_col = '0;
  logic [PIX_W-1:0]                  img_data = '0;
  logic                              sw_we = 1'b0;
  logic [SW_AW-1:0]                  sw_addr = '0;
  logic [$clog2(N_PE*LANES)-1:0]     sw_elem = '0;
  logic [PIX_W-1:0]                  sw_data = '0;
  logic                              fw_we = 1'b0;
  logic [FC_AW-1:0]                  fw_addr = '0;
  logic [CODE_W-1:0]                 fw_elem = '0;
  logic [FC_W-1:0]                   fw_data = '0;
  logic                              start = 1'b0;
  logic                              busy;
  logic [CODE_W-1:0]                 recog_code;
  logic                              recog_end;
  logic [N_CLASS-1:0][SAT_OUT_W-1:0] scores;

  mneo_top u_dut (.*);

  int checks = 0, failures = 0;

  // ---------------- reference data ----------------
  int img [IMG_SIZE][IMG_SIZE];
  int w1  [S1_PLANES][S1_WIN][S1_WIN];
  int w2  [S2_PLANES][S1_PLANES][S2_WIN][S2_WIN];
  int wf  [FC_IN][N_CLASS];
  int s1  [S1_OUT][S1_OUT];
  bit c1  [S1_PLANES][C1_OUT][C1_OUT];
  int s2  [S2_OUT][S2_OUT];
  bit c2  [S2_PLANES][C2_OUT][C2_OUT];
  int acc [N_CLASS];

  // mechanism counters
  int s1_wins [S1_PLANES];
  int s2_late_grp = 0, c_one = 0, c_zero = 0, fc_one = 0, fc_zero = 0;
  int sat_lo = 0, sat_lin = 0, sat_hi = 0, rate_ok = 0;

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  task automatic make_data(int run);
    for (int r = 0; r < IMG_SIZE; r++)
      for (int c = 0; c < IMG_SIZE; c++)
        img[r][c] = $urandom_range(255);
    for (int k = 0; k < S1_PLANES; k++)
      for (int i = 0; i < S1_WIN; i++)
        for (int j = 0; j < S1_WIN; j++)
          w1[k][i][j] = $urandom_range(255);
    for (int k = 0; k < S2_PLANES; k++)
      for (int p = 0; p < S1_PLANES; p++)
        for (int i = 0; i < S2_WIN; i++)
          for (int j = 0; j < S2_WIN; j++)
            w2[k][p][i][j] = $urandom_range(BIN_ONE);
    // one class leans positive, the next negative, the rest small random
    for (int n = 0; n < FC_IN; n++)
      for (int k = 0; k < N_CLASS; k++)
        if (k == (run*5) % N_CLASS)           wf[n][k] = int'($urandom_range(12)) - 2 + run;
        else if (k == (run*5 + 1) % N_CLASS) wf[n][k] = -int'($urandom_range(12)) + 2 - run;
        else                                 wf[n][k] = int'($urandom_range(8)) - 4;
  endtask

  task automatic model();
    int best, bd, d, idx;
    for (int r = 0; r < S1_OUT; r++)
      for (int c = 0; c < S1_OUT; c++) begin
        best = 0; bd = 0;
        for (int k = 0; k < S1_PLANES; k++) begin
          d = 0;
          for (int i = 0; i < S1_WIN; i++)
            for (int j = 0; j < S1_WIN; j++)
              d += iabs(img[r*S1_STRIDE+i][c*S1_STRIDE+j] - w1[k][i][j]);
          if (k == 0 || d < bd) begin bd = d; best = k; end
        end
        s1[r][c] = best;
        s1_wins[best]++;
      end
    for (int k = 0; k < S1_PLANES; k++)
      for (int r = 0; r < C1_OUT; r++)
        for (int c = 0; c < C1_OUT; c++) begin
          c1[k][r][c] = 0;
          for (int i = 0; i < C1_WIN; i++)
            for (int j = 0; j < C1_WIN; j++)
              if (s1[r*C1_STRIDE+i][c*C1_STRIDE+j] == k) c1[k][r][c] = 1;
          if (c1[k][r][c]) c_one++; else c_zero++;
        end
    for (int r = 0; r < S2_OUT; r++)
      for (int c = 0; c < S2_OUT; c++) begin
        best = 0; bd = 0;
        for (int k = 0; k < S2_PLANES; k++) begin
          d = 0;
          for (int p = 0; p < S1_PLANES; p++)
            for (int i = 0; i < S2_WIN; i++)
              for (int j = 0; j < S2_WIN; j++)
                d += iabs((c1[p][r+i][c+j] ? BIN_ONE : 0) - w2[k][p][i][j]);
          if (k == 0 || d < bd) begin bd = d; best = k; end
        end
        s2[r][c] = best;
        if (best >= N_PE) s2_late_grp++;
      end
    for (int k = 0; k < S2_PLANES; k++)
      for (int r = 0; r < C2_OUT; r++)
        for (int c = 0; c < C2_OUT; c++) begin
          c2[k][r][c] = 0;
          for (int i = 0; i < C2_WIN; i++)
            for (int j = 0; j < C2_WIN; j++)
              if (s2[r*C2_STRIDE+i][c*C2_STRIDE+j] == k) c2[k][r][c] = 1;
          if (c2[k][r][c]) c_one++; else c_zero++;
        end
    for (int n = 0; n < N_CLASS; n++) acc[n] = 0;
    for (int r = 0; r < C2_OUT; r++)
      for (int c = 0; c < C2_OUT; c++)
        for (int p = 0; p < S2_PLANES; p++) begin
          idx = (r*C2_OUT + c)*S2_PLANES + p;
          if (c2[p][r][c]) begin
            fc_one++;
            for (int n = 0; n < N_CLASS; n++) acc[n] += wf[idx][n];
          end else fc_zero++;
        end
  endtask

  task automatic load();
    @(negedge clk);
    for (int r = 0; r < IMG_SIZE; r++)
      for (int c = 0; c < IMG_SIZE; c++) begin
        img_we = 1; img_row = POS_W'(r); img_col = POS_W'(c); img_data = PIX_W'(img[r][c]);
        @(negedge clk);
      end
    img_we = 0;
    for (int k = 0; k < S1_PLANES; k++)
      for (int i = 0; i < S1_WIN; i++)
        for (int j = 0; j < S1_WIN; j++) begin
          sw_we = 1; sw_addr = SW_AW'(i); sw_elem = 5'(k*LANES + j); sw_data = PIX_W'(w1[k][i][j]);
          @(negedge clk);
        end
    for (int k = 0; k < S2_PLANES; k++)
      for (int p = 0; p < S1_PLANES; p++)
        for (int i = 0; i < S2_WIN; i++)
          for (int j = 0; j < S2_WIN; j++) begin
            sw_we = 1;
            sw_addr = SW_AW'(SW_S2_BASE + ((k / N_PE)*S1_PLANES + p)*S2_WIN + i);
            sw_elem = 5'((k % N_PE)*LANES + j);
            sw_data = PIX_W'(w2[k][p][i][j]);
            @(negedge clk);
          end
    sw_we = 0;
    for (int n = 0; n < FC_IN; n++)
      for (int k = 0; k < N_CLASS; k++) begin
        fw_we = 1; fw_addr = FC_AW'(n); fw_elem = CODE_W'(k); fw_data = FC_W'(wf[n][k]);
        @(negedge clk);
      end
    fw_we = 0;
  endtask

  // S1 phase length: one beat per clock, 5 beats per field
  int s1_cycles;
  always @(posedge clk) if (u_dut.phase == PH_S1) s1_cycles++;

  task automatic check_maps();
    logic [S2_PLANES-1:0] exp_w;
    for (int r = 0; r < S1_OUT; r++)
      for (int c = 0; c < S1_OUT; c++) begin
        checks++;
        if (u_dut.u_mu.u_s1_map.mem[r][c] != 4'(1 << s1[r][c])) begin
          failures++;
          if (failures < 10) $display("S1 map (%0d,%0d) = %b, expected plane %0d", r, c, u_dut.u_mu.u_s1_map.mem[r][c], s1[r][c]);
        end
      end
    for (int r = 0; r < C1_OUT; r++)
      for (int c = 0; c < C1_OUT; c++) begin
        for (int k = 0; k < S1_PLANES; k++) exp_w[k] = c1[k][r][c];
        checks++;
        if (u_dut.u_mu.u_c1_map.mem[r][c] != exp_w[S1_PLANES-1:0]) begin
          failures++;
          if (failures < 10) $display("C1 map (%0d,%0d) = %b, expected %b", r, c, u_dut.u_mu.u_c1_map.mem[r][c], exp_w[3:0]);
        end
      end
    for (int r = 0; r < S2_OUT; r++)
      for (int c = 0; c < S2_OUT; c++) begin
        checks++;
        if (u_dut.u_mu.u_s2_map.mem[r][c] != 16'(1 << s2[r][c])) begin
          failures++;
          if (failures < 10) $display("S2 map (%0d,%0d) = %h, expected plane %0d", r, c, u_dut.u_mu.u_s2_map.mem[r][c], s2[r][c]);
        end
      end
    for (int r = 0; r < C2_OUT; r++)
      for (int c = 0; c < C2_OUT; c++) begin
        for (int k = 0; k < S2_PLANES; k++) exp_w[k] = c2[k][r][c];
        checks++;
        if (u_dut.u_mu.u_c2_map.mem[r][c] != exp_w) begin
          failures++;
          if (failures < 10) $display("C2 map (%0d,%0d) = %h, expected %h", r, c, u_dut.u_mu.u_c2_map.mem[r][c], exp_w);
        end
      end
  endtask

  task automatic check_result();
    real yr;
    int  best_k, best_y;
    for (int n = 0; n < N_CLASS; n++) begin
      // real-valued satlin with th = 2.5, inputs in units of 2^-FC_FRAC
      yr = 0.5 + (real'(acc[n]) / real'(1 << FC_FRAC)) * 0.5 / 2.5;
      if (yr < 0.0) yr = 0.0;
      if (yr > 1.0) yr = 1.0;
      yr = yr * SAT_ONE;
      checks++;
      if (iabs(int'(scores[n]) - int'(yr)) > 1) begin
        failures++;
        $display("score %0d = %0d, expected %f (sum %0d)", n, scores[n], yr, acc[n]);
      end
      if (acc[n] <= -SAT_TH) sat_lo++;
      else if (acc[n] >= SAT_TH) sat_hi++;
      else sat_lin++;
    end
    best_k = 0; best_y = -1;
    for (int n = 0; n < N_CLASS; n++)
      if (int'(scores[n]) > best_y) begin best_y = int'(scores[n]); best_k = n; end
    checks++;
    if (int'(recog_code) != best_k) begin
      failures++;
      $display("recog_code %0d, expected %0d", recog_code, best_k);
    end
  endtask

  initial begin
    int t;
    for (int k = 0; k < S1_PLANES; k++) s1_wins[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < RUNS; run++) begin
      make_data(run);
      model();
      load();
      s1_cycles = 0;
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      // the end flag of the previous run drops within two clocks of start
      repeat (2) @(negedge clk);
      checks++;
      if (recog_end) begin failures++; $display("recog_end not cleared by start"); end
      checks++;
      if (!busy) begin failures++; $display("busy not raised"); end
      t = 0;
      while (!recog_end && t < 20000) begin @(negedge clk); t++; end
      checks++;
      if (!recog_end) begin failures++; $display("run %0d did not end", run); end
      repeat (3) @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("busy still high after the end"); end
      // S1 takes 784 fields x 5 beats plus a few clocks of pipeline
      checks++;
      if (s1_cycles >= S1_OUT*S1_OUT*S1_WIN && s1_cycles <= S1_OUT*S1_OUT*S1_WIN + 6) rate_ok++;
      else begin failures++; $display("S1 took %0d clocks", s1_cycles); end
      check_maps();
      check_result();
      $display("run %0d: code %0d after %0d clocks", run, recog_code, t);
    end
    // every mechanism must have happened
    for (int k = 0; k < S1_PLANES; k++) begin
      checks++;
      if (s1_wins[k] == 0) begin failures++; $display("S1 plane %0d never won", k); end
    end
    checks += 8;
    if (s2_late_grp == 0) begin failures++; $display("no S2 winner in a later plane group"); end
    if (c_one == 0 || c_zero == 0) begin failures++; $display("C cells never 1 or never 0"); end
    if (fc_one == 0 || fc_zero == 0) begin failures++; $display("FC inputs never 1 or never 0"); end
    if (sat_lo == 0) begin failures++; $display("satlin never saturated low"); end
    if (sat_hi == 0) begin failures++; $display("satlin never saturated high"); end
    if (sat_lin == 0) begin failures++; $display("satlin never linear"); end
    if (rate_ok == 0) begin failures++; $display("S1 rate never met"); end
    if (s1_cycles == 0) begin failures++; end
    $display("mechanisms: S1 wins %0d/%0d/%0d/%0d, S2 late-group wins %0d, C 1/0 %0d/%0d, FC 1/0 %0d/%0d, satlin lo/lin/hi %0d/%0d/%0d",
             s1_wins[0], s1_wins[1], s1_wins[2], s1_wins[3], s2_late_grp, c_one, c_zero, fc_one, fc_zero, sat_lo, sat_lin, sat_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
