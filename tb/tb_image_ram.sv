// tb_image_ram: fills the image RAM with random pixels, then reads random
// five-pixel row segments (including ones running past the right edge) and
// compares them, one clock after the address, with a copy kept here.
module tb_image_ram;
  import mneo_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we = 1'b0;
  logic [POS_W-1:0] wr_row = '0, wr_col = '0, rd_row = '0, rd_col = '0;
  logic [PIX_W-1:0] wr_data = '0;
  logic [LANES-1:0][PIX_W-1:0] rd_data;
  int checks = 0, failures = 0;
  int ref_img [IMG_SIZE][IMG_SIZE];

  image_ram u_dut (.*);

  initial begin
    int r, c, e;
    @(negedge clk);
    for (r = 0; r < IMG_SIZE; r++)
      for (c = 0; c < IMG_SIZE; c++) begin
        ref_img[r][c] = $urandom_range(511);
        we = 1; wr_row = POS_W'(r); wr_col = POS_W'(c); wr_data = PIX_W'(ref_img[r][c]);
        @(negedge clk);
      end
    we = 0;
    for (int t = 0; t < 600; t++) begin
      r = $urandom_range(IMG_SIZE-1);
      c = (t < 32) ? t : $urandom_range(IMG_SIZE-1);
      rd_row = POS_W'(r); rd_col = POS_W'(c);
      @(negedge clk);
      for (int l = 0; l < LANES; l++) begin
        e = (c + l < IMG_SIZE) ? ref_img[r][c+l] : 0;
        checks++;
        if (int'(rd_data[l]) != e) begin
          failures++;
          if (failures < 10) $display("(%0d,%0d) lane %0d: %0d expected %0d", r, c, l, rd_data[l], e);
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
