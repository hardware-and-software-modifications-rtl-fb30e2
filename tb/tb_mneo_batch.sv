// tb_mneo_batch: the recogniser on a batch like the face test set it was built
// for: weights loaded once, then 60 test images (12 classes x 5) classified one
// after another at the default size.
// Real face images are not available, so the data are synthetic: 12 random
// smooth prototype images stand for the 12 people, and each test image is a
// prototype with pixel noise and a small brightness change. S1 and S2 weights
// are random; the FC weights of class c are a template of prototype c's C2
// code (+1 LSB where its bit is 1, -1 LSB where it is 0), worked out here with
// the behavioural model of the network.
// Every result is checked against the model (code and scores), the clock
// count of each recognition is checked against the layer schedule, and the
// fraction of images assigned to their own prototype is reported.
module tb_mneo_batch;
  import mneo_pkg::*;

  localparam int N_IMG = 60;

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

  int proto [N_CLASS][IMG_SIZE][IMG_SIZE];
  int img   [IMG_SIZE][IMG_SIZE];
  int w1    [S1_PLANES][S1_WIN][S1_WIN];
  int w2    [S2_PLANES][S1_PLANES][S2_WIN][S2_WIN];
  int wf    [FC_IN][N_CLASS];
  bit feat  [FC_IN];          // C2 code of the current image, FC input order

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  // behavioural network: image -> 256-bit C2 code
  task automatic features();
    int s1 [S1_OUT][S1_OUT];
    bit c1 [S1_PLANES][C1_OUT][C1_OUT];
    int s2 [S2_OUT][S2_OUT];
    int best, bd, d;
    for (int r = 0; r < S1_OUT; r++)
      for (int c = 0; c < S1_OUT; c++) begin
        best = 0; bd = 0;
        for (int k = 0; k < S1_PLANES; k++) begin
          d = 0;
          for (int i = 0; i < S1_WIN; i++)
            for (int j = 0; j < S1_WIN; j++)
              d += iabs(img[r+i][c+j] - w1[k][i][j]);
          if (k == 0 || d < bd) begin bd = d; best = k; end
        end
        s1[r][c] = best;
      end
    for (int k = 0; k < S1_PLANES; k++)
      for (int r = 0; r < C1_OUT; r++)
        for (int c = 0; c < C1_OUT; c++) begin
          c1[k][r][c] = 0;
          for (int i = 0; i < C1_WIN; i++)
            for (int j = 0; j < C1_WIN; j++)
              if (s1[2*r+i][2*c+j] == k) c1[k][r][c] = 1;
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
      end
    for (int r = 0; r < C2_OUT; r++)
      for (int c = 0; c < C2_OUT; c++)
        for (int k = 0; k < S2_PLANES; k++) begin
          bit b;
          b = 0;
          for (int i = 0; i < C2_WIN; i++)
            for (int j = 0; j < C2_WIN; j++)
              if (s2[2*r+i][2*c+j] == k) b = 1;
          feat[(r*C2_OUT + c)*S2_PLANES + k] = b;
        end
  endtask

  task automatic load_image();
    for (int r = 0; r < IMG_SIZE; r++)
      for (int c = 0; c < IMG_SIZE; c++) begin
        img_we = 1; img_row = POS_W'(r); img_col = POS_W'(c); img_data = PIX_W'(img[r][c]);
        @(negedge clk);
      end
    img_we = 0;
  endtask

  initial begin
    int t, correct, acc, best_k, best_y, yexp;
    real yr;
    correct = 0;
    // prototypes: smooth random patterns (sum of a few random blobs)
    for (int n = 0; n < N_CLASS; n++) begin
      int cx [4], cy [4], a [4];
      for (int b = 0; b < 4; b++) begin cx[b] = $urandom_range(31); cy[b] = $urandom_range(31); a[b] = $urandom_range(200); end
      for (int r = 0; r < IMG_SIZE; r++)
        for (int c = 0; c < IMG_SIZE; c++) begin
          int v;
          v = 30;
          for (int b = 0; b < 4; b++) begin
            int dd;
            dd = (r-cy[b])*(r-cy[b]) + (c-cx[b])*(c-cx[b]);
            if (dd < 64) v += a[b] * (64 - dd) / 64;
          end
          proto[n][r][c] = v > 255 ? 255 : v;
        end
    end
    for (int k = 0; k < S1_PLANES; k++)
      for (int i = 0; i < S1_WIN; i++)
        for (int j = 0; j < S1_WIN; j++)
          w1[k][i][j] = 40 * k + $urandom_range(60);
    for (int k = 0; k < S2_PLANES; k++)
      for (int p = 0; p < S1_PLANES; p++)
        for (int i = 0; i < S2_WIN; i++)
          for (int j = 0; j < S2_WIN; j++)
            w2[k][p][i][j] = $urandom_range(BIN_ONE);
    // FC templates from the prototypes' codes
    for (int n = 0; n < N_CLASS; n++) begin
      img = proto[n];
      features();
      for (int i = 0; i < FC_IN; i++) wf[i][n] = feat[i] ? 1 : -1;
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // load all weights once
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
    for (int i = 0; i < FC_IN; i++)
      for (int n = 0; n < N_CLASS; n++) begin
        fw_we = 1; fw_addr = FC_AW'(i); fw_elem = CODE_W'(n); fw_data = FC_W'(wf[i][n]);
        @(negedge clk);
      end
    fw_we = 0;

    for (int m = 0; m < N_IMG; m++) begin
      int cls, shift;
      cls = m % N_CLASS;
      shift = int'($urandom_range(20)) - 10;
      for (int r = 0; r < IMG_SIZE; r++)
        for (int c = 0; c < IMG_SIZE; c++) begin
          int v;
          v = proto[cls][r][c] + shift + int'($urandom_range(16)) - 8;
          img[r][c] = v < 0 ? 0 : (v > 255 ? 255 : v);
        end
      features();
      load_image();
      start = 1; @(negedge clk); start = 0;
      t = 1;
      repeat (2) begin @(negedge clk); t++; end
      while (!recog_end && t < 20000) begin @(negedge clk); t++; end
      checks++;
      if (!recog_end) begin failures++; $display("image %0d did not finish", m); end
      // layer schedule: S1 + C1 + S2 + C2 + FC + ACT, plus pipeline fill
      checks++;
      if (t < 3920 + 169 + 6400 + 16 + 256 + 12 || t > 3920 + 169 + 6400 + 16 + 256 + 12 + 40) begin
        failures++; $display("image %0d took %0d clocks", m, t);
      end
      best_k = 0; best_y = -1;
      for (int n = 0; n < N_CLASS; n++) begin
        acc = 0;
        for (int i = 0; i < FC_IN; i++) if (feat[i]) acc += wf[i][n];
        yr = 0.5 + (real'(acc) / real'(1 << FC_FRAC)) * 0.5 / 2.5;
        if (yr < 0.0) yr = 0.0;
        if (yr > 1.0) yr = 1.0;
        yexp = int'(yr * SAT_ONE);
        checks++;
        if (iabs(int'(scores[n]) - yexp) > 1) begin
          failures++;
          if (failures < 10) $display("image %0d class %0d: score %0d expected %0d", m, n, scores[n], yexp);
        end
        if (int'(scores[n]) > best_y) begin best_y = int'(scores[n]); best_k = n; end
      end
      checks++;
      if (int'(recog_code) != best_k) begin failures++; $display("image %0d: code %0d expected %0d", m, recog_code, best_k); end
      if (int'(recog_code) == cls) correct++;
      @(negedge clk);
    end
    $display("batch: %0d of %0d images assigned to their own prototype; %0d clocks per recognition",
             correct, N_IMG, t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
