// tb_pe_unit: exercises every datapath of the PE array on its own.
//  S layers: random fields, S1-like (one group of 5 full beats) and S2-like
//    (4 groups of 16 beats with 4 lanes), with random data and weights; the
//    nearest plane computed here must come out as a one-hot s_wr with the
//    field position, and s_done must mark the last field.
//  C layers: random S windows; each c_wr must carry the OR of every plane's
//    window, at the step's position, one clock after the step.
//  FC + activation: 256 steps of random map words and weights, then the 12
//    activation steps; scores must be within one LSB of the real satlin of the
//    sums computed here and recog_code must be their arg-max.
module tb_pe_unit;
  import mneo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear = 0;
  beat_t beat = '0;
  logic [LANES-1:0] mask = '0;
  logic [LANES-1:0][PIX_W-1:0] x = '0;
  logic [N_PE-1:0][LANES-1:0][PIX_W-1:0] s_w = '0;
  logic s_wr, s_done, c_wr, c_done, fc_done, recog_end;
  logic [POS_W-1:0] s_wr_row, s_wr_col, c_wr_row, c_wr_col;
  logic [S2_PLANES-1:0] s_wr_data, c_wr_data, fc_word = '0;
  logic c_valid = 0, c_last = 0, fc_valid = 0, fc_first = 0, fc_last = 0, act_valid = 0;
  logic [POS_W-1:0] c_row = '0, c_col = '0;
  logic [C1_WIN-1:0][C1_WIN-1:0][S2_PLANES-1:0] c_win = '0;
  logic [$clog2(S2_PLANES)-1:0] fc_plane = '0;
  logic [N_CLASS-1:0][FC_W-1:0] fc_w = '0;
  logic [CODE_W-1:0] act_idx = '0, recog_code;
  logic [N_CLASS-1:0][SAT_OUT_W-1:0] scores;
  int checks = 0, failures = 0;

  pe_unit u_dut (.*);

  // expected S results, in order
  int exp_pos [$], exp_win [$], exp_end [$];
  always @(posedge clk) if (rst_n && s_wr) begin
    checks++;
    if (exp_win.size() == 0) begin failures++; $display("unexpected s_wr"); end
    else begin
      int p, wn, e;
      p = exp_pos.pop_front(); wn = exp_win.pop_front(); e = exp_end.pop_front();
      if (s_wr_data != S2_PLANES'(1 << wn) || int'(s_wr_row) != p / 32 || int'(s_wr_col) != p % 32 || s_done != 1'(e)) begin
        failures++;
        if (failures < 10) $display("s_wr (%0d,%0d) %h done %b, expected (%0d,%0d) plane %0d done %0d",
                                    s_wr_row, s_wr_col, s_wr_data, s_done, p/32, p%32, wn, e);
      end
    end
  end

  task automatic s_field(bit s2, int r, int c, bit last_all);
    int ng, nb, d [S2_PLANES], best;
    ng = s2 ? N_GRP : 1;
    nb = s2 ? S1_PLANES * S2_WIN : S1_WIN;
    for (int k = 0; k < S2_PLANES; k++) d[k] = 0;
    for (int g = 0; g < ng; g++)
      for (int b = 0; b < nb; b++) begin
        beat.valid = 1; beat.first = (b == 0); beat.last_grp = (b == nb-1);
        beat.last_pos = (b == nb-1) && (g == ng-1); beat.last_all = beat.last_pos && last_all;
        beat.grp = GRP_W'(g); beat.row = POS_W'(r); beat.col = POS_W'(c);
        for (int l = 0; l < LANES; l++) begin
          mask[l] = !s2 || l < S2_WIN;
          x[l] = s2 ? ($urandom_range(1) ? PIX_W'(BIN_ONE) : '0) : PIX_W'($urandom_range(255));
          for (int p = 0; p < N_PE; p++) begin
            s_w[p][l] = PIX_W'($urandom_range(s2 ? BIN_ONE : 255));
            if (mask[l]) d[g*N_PE+p] += (x[l] > s_w[p][l]) ? int'(x[l] - s_w[p][l]) : int'(s_w[p][l] - x[l]);
          end
        end
        @(negedge clk);
        beat = '0;
      end
    best = 0;
    for (int k = 1; k < ng * N_PE; k++) if (d[k] < d[best]) best = k;
    exp_pos.push_back(r*32 + c); exp_win.push_back(best); exp_end.push_back(int'(last_all));
  endtask

  initial begin
    int acc [N_CLASS], wv, best_k, best_y, prev_r, prev_c;
    logic [C1_WIN-1:0][C1_WIN-1:0][S2_PLANES-1:0] prev_win;
    bit had_prev;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // ---------------- S layers ----------------
    for (int f = 0; f < 60; f++) s_field(0, f / 8, f % 8, f == 59);
    for (int f = 0; f < 30; f++) s_field(1, f / 5, f % 5, f == 29);
    repeat (4) @(negedge clk);
    checks++;
    if (exp_win.size() != 0) begin failures++; $display("%0d S results missing", exp_win.size()); end
    // ---------------- C layers ----------------
    had_prev = 0;
    for (int s = 0; s <= 40; s++) begin
      prev_win = c_win;
      if (s < 40) begin
        c_valid = 1; c_last = (s == 39); c_row = POS_W'(s / 7); c_col = POS_W'(s % 7);
      end else begin
        c_valid = 0; c_last = 0;
      end
      // window of the previous step arrives now
      for (int i = 0; i < C1_WIN; i++)
        for (int j = 0; j < C1_WIN; j++)
          c_win[i][j] = (s % 4 == 1) ? S2_PLANES'(0) : S2_PLANES'($urandom & $urandom & $urandom);
      #1;
      if (s > 0) begin
        logic [S2_PLANES-1:0] e;
        e = '0;
        for (int i = 0; i < C1_WIN; i++) for (int j = 0; j < C1_WIN; j++) e |= c_win[i][j];
        checks++;
        if (!c_wr || c_wr_data != e || int'(c_wr_row) != (s-1)/7 || int'(c_wr_col) != (s-1)%7 || c_done != (s == 40)) begin
          failures++;
          if (failures < 10) $display("C step %0d: wr %b data %h expected %h", s-1, c_wr, c_wr_data, e);
        end
      end
      @(negedge clk);
    end
    // ---------------- FC and activation ----------------
    for (int rep = 0; rep < 2; rep++) begin
      clear = 1; @(negedge clk); clear = 0;
      checks++;
      if (recog_end) begin failures++; $display("recog_end not cleared"); end
      for (int k = 0; k < N_CLASS; k++) acc[k] = 0;
      for (int n = 0; n <= FC_IN; n++) begin
        if (n < FC_IN) begin
          fc_valid = 1; fc_first = (n == 0); fc_last = (n == FC_IN-1); fc_plane = 4'(n % S2_PLANES);
        end else begin
          fc_valid = 0; fc_first = 0; fc_last = 0;
        end
        if (n > 0) begin
          fc_word = S2_PLANES'($urandom);
          for (int k = 0; k < N_CLASS; k++) begin
            wv = (k == 3 + rep) ? int'($urandom_range(20)) : (k == 7) ? -int'($urandom_range(20)) : int'($urandom_range(10)) - 5;
            fc_w[k] = FC_W'(wv);
            if (fc_word[(n-1) % S2_PLANES]) acc[k] += wv;
          end
        end
        @(negedge clk);
      end
      @(negedge clk);
      for (int k = 0; k <= N_CLASS; k++) begin
        act_valid = (k < N_CLASS); act_idx = CODE_W'(k % N_CLASS);
        @(negedge clk);
      end
      act_valid = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (!recog_end) begin failures++; $display("recog_end not raised"); end
      best_k = 0; best_y = -1;
      for (int k = 0; k < N_CLASS; k++) begin
        real e;
        e = 0.5 + (real'(acc[k]) / real'(1 << FC_FRAC)) * 0.2;
        if (e < 0.0) e = 0.0;
        if (e > 1.0) e = 1.0;
        e = e * SAT_ONE;
        checks++;
        if ((real'(scores[k]) - e) > 1.0 || (e - real'(scores[k])) > 1.0) begin
          failures++;
          $display("score %0d = %0d, expected %f (sum %0d)", k, scores[k], e, acc[k]);
        end
        if (int'(scores[k]) > best_y) begin best_y = int'(scores[k]); best_k = k; end
      end
      checks++;
      if (int'(recog_code) != best_k) begin failures++; $display("code %0d expected %0d", recog_code, best_k); end
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
