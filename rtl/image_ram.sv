// image_ram: holds the input image and hands the segmentation unit one
// receptive-field row segment per clock.
//
// The image is IMG_SIZE x IMG_SIZE pixels of PIX_W bits. A host writes it one
// pixel per clock (we, wr_row, wr_col, wr_data). The read port returns LANES
// horizontally adjacent pixels starting at (rd_row, rd_col), registered, so the
// data appears one clock after the address. Columns past the right edge read
// as zero. The image RAM and its link to the segmentation unit follow the
// published block diagram; the LANES-wide read port and the host write port are
// this design's choice, made so the five-lane PE array can be fed every clock.
module image_ram
  import mneo_pkg::*;
#(
  parameter int SIZE  = IMG_SIZE,
  parameter int W     = PIX_W,
  parameter int NLANE = LANES,
  localparam int AW   = $clog2(SIZE)
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [AW-1:0]             wr_row,
  input  logic [AW-1:0]             wr_col,
  input  logic [W-1:0]              wr_data,
  input  logic [AW-1:0]             rd_row,
  input  logic [AW-1:0]             rd_col,
  output logic [NLANE-1:0][W-1:0]   rd_data
);

  logic [W-1:0] mem [SIZE][SIZE];

  always_ff @(posedge clk) begin
    if (we) mem[wr_row][wr_col] <= wr_data;
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < NLANE; l++) begin
      if (int'(rd_col) + l < SIZE) rd_data[l] <= mem[rd_row][int'(rd_col) + l];
      else                         rd_data[l] <= '0;
    end
  end

endmodule
