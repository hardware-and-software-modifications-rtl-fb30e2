// tb_feature_map_mem: writes random plane words to every position of a
// 28x28x4 map, then reads random 4x4 windows (also ones hanging over the
// lower and right edges, which must read zero there) and compares them, one
// clock after the address, with a copy kept here.
module tb_feature_map_mem;
  localparam int P = 4, DIM = 28, WIN = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we = 1'b0;
  logic [4:0] wr_row = '0, wr_col = '0, rd_row = '0, rd_col = '0;
  logic [P-1:0] wr_data = '0;
  logic [WIN-1:0][WIN-1:0][P-1:0] rd_win;
  int checks = 0, failures = 0;
  int ref_m [DIM][DIM];

  feature_map_mem u_dut (.*);

  initial begin
    int r, c, e;
    @(negedge clk);
    for (r = 0; r < DIM; r++)
      for (c = 0; c < DIM; c++) begin
        ref_m[r][c] = $urandom_range((1 << P) - 1);
        we = 1; wr_row = 5'(r); wr_col = 5'(c); wr_data = P'(ref_m[r][c]);
        @(negedge clk);
      end
    we = 0;
    for (int t = 0; t < 400; t++) begin
      r = $urandom_range(DIM-1); c = $urandom_range(DIM-1);
      rd_row = 5'(r); rd_col = 5'(c);
      @(negedge clk);
      for (int i = 0; i < WIN; i++)
        for (int j = 0; j < WIN; j++) begin
          e = (r + i < DIM && c + j < DIM) ? ref_m[r+i][c+j] : 0;
          checks++;
          if (int'(rd_win[i][j]) != e) begin
            failures++;
            if (failures < 10) $display("win (%0d,%0d)[%0d][%0d] = %0d expected %0d", r, c, i, j, rd_win[i][j], e);
          end
        end
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
