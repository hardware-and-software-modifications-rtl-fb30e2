// tb_control_unit: takes the control unit through two whole recognitions,
// standing in for the other blocks: the S layers answer su_start with s_done
// after a fixed delay, the C and FC layers answer with their done pulses one
// clock after their last step, and the activation answers with recog_end.
// It checks the phase order, the C-cell positions and S-map window addresses
// of both C layers (169 and 16, one per clock, stride 2), the 256 FC inputs
// in order with their map position, plane and weight address, the 12
// activation steps, start / clear / busy, and that a second start works.
module tb_control_unit;
  import mneo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, busy, clear, su_start, su_mode;
  phase_t phase;
  logic s_done = 1'b0, c_done = 1'b0, fc_done = 1'b0, recog_end = 1'b0;
  logic c_valid, c_last, fc_valid, fc_first, fc_last, act_valid;
  logic [POS_W-1:0] c_row, c_col, c_rd_row, c_rd_col, fc_rd_row, fc_rd_col;
  logic [$clog2(S2_PLANES)-1:0] fc_plane;
  logic [FC_AW-1:0] fc_w_addr;
  logic [CODE_W-1:0] act_idx;
  int checks = 0, failures = 0;

  control_unit u_dut (.*);

  // stand-ins for the rest of the design
  int s_timer = -1, c_cnt = 0, fc_cnt = 0, act_cnt = 0, su_starts = 0;
  int exp_c = 0, exp_n = 0, exp_k = 0;
  phase_t seen [$];
  phase_t last_ph = PH_IDLE;

  always @(posedge clk) begin
    s_done  <= 1'b0;
    c_done  <= 1'b0;
    fc_done <= 1'b0;
    if (phase != last_ph) seen.push_back(phase);
    last_ph <= phase;
    if (su_start) begin
      su_starts++;
      checks++;
      if (su_mode != (phase == PH_S2)) begin failures++; $display("su_mode %b in phase %0d", su_mode, phase); end
      s_timer <= 20;
    end else if (s_timer > 0) s_timer <= s_timer - 1;
    else if (s_timer == 0) begin s_done <= 1'b1; s_timer <= -1; end
    if (c_valid) begin
      int n, r, c;
      n = (phase == PH_C2) ? C2_OUT : C1_OUT;
      r = exp_c / n; c = exp_c % n;
      checks++;
      if (int'(c_row) != r || int'(c_col) != c || int'(c_rd_row) != 2*r || int'(c_rd_col) != 2*c || c_last != (exp_c == n*n-1)) begin
        failures++;
        if (failures < 10) $display("C step %0d: (%0d,%0d) rd (%0d,%0d) last %b", exp_c, c_row, c_col, c_rd_row, c_rd_col, c_last);
      end
      exp_c++; c_cnt++;
      if (c_last) begin c_done <= 1'b1; exp_c = 0; end
    end
    if (fc_valid) begin
      int pos;
      pos = exp_n / S2_PLANES;
      checks++;
      if (int'(fc_w_addr) != exp_n || int'(fc_plane) != exp_n % S2_PLANES || int'(fc_rd_row) != pos / C2_OUT ||
          int'(fc_rd_col) != pos % C2_OUT || fc_first != (exp_n == 0) || fc_last != (exp_n == FC_IN-1)) begin
        failures++;
        if (failures < 10) $display("FC step %0d: addr %0d plane %0d rd (%0d,%0d)", exp_n, fc_w_addr, fc_plane, fc_rd_row, fc_rd_col);
      end
      exp_n++; fc_cnt++;
      if (fc_last) begin fc_done <= 1'b1; exp_n = 0; end
    end
    if (act_valid) begin
      checks++;
      if (int'(act_idx) != exp_k) begin failures++; $display("act idx %0d expected %0d", act_idx, exp_k); end
      exp_k++; act_cnt++;
      if (int'(act_idx) == N_CLASS-1) begin recog_end <= 1'b1; exp_k = 0; end
    end
    if (clear) recog_end <= 1'b0;
  end

  initial begin
    int t;
    phase_t order [8];
    order = '{PH_S1, PH_C1, PH_S2, PH_C2, PH_FC, PH_ACT, PH_DONE, PH_IDLE};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("busy after reset"); end
    for (int run = 0; run < 2; run++) begin
      seen.delete();
      c_cnt = 0; fc_cnt = 0; act_cnt = 0; su_starts = 0;
      start = 1; @(negedge clk); start = 0;
      checks++;
      if (!busy || !clear) begin failures++; $display("busy/clear not raised by start"); end
      t = 0;
      while (busy && t < 5000) begin @(negedge clk); t++; end
      repeat (2) @(negedge clk);
      checks += 6;
      if (busy) begin failures++; $display("run %0d never finished", run); end
      if (c_cnt != C1_OUT*C1_OUT + C2_OUT*C2_OUT) begin failures++; $display("C steps %0d", c_cnt); end
      if (fc_cnt != FC_IN) begin failures++; $display("FC steps %0d", fc_cnt); end
      if (act_cnt != N_CLASS) begin failures++; $display("act steps %0d", act_cnt); end
      if (su_starts != 2) begin failures++; $display("su starts %0d", su_starts); end
      if (seen.size() != 8) begin failures++; $display("%0d phase changes", seen.size()); end
      else for (int i = 0; i < 8; i++) begin
        checks++;
        if (seen[i] != order[i]) begin failures++; $display("phase %0d is %0d, expected %0d", i, seen[i], order[i]); end
      end
      repeat (3) @(negedge clk);
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
