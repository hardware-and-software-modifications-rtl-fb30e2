// feature_map_mem: binary feature map of one layer (SIMPL_x or Complex_x of the
// memory unit).
//
// Every cell output in the network is a single bit, so a map of P planes and
// DIM x DIM positions is stored as DIM x DIM words of P bits, one bit per
// plane. A writer stores all planes of one position at once (an S layer writes
// the one-hot winner, a C layer the P OR results). The read port returns the
// WIN x WIN window whose top-left corner is (rd_row, rd_col), registered, one
// clock after the address; positions outside the map read as zero.
// Storing one bit per cell follows the published design; the word layout and
// the window read port are this design's choice.
module feature_map_mem #(
  parameter int P   = 4,
  parameter int DIM = 28,
  parameter int WIN = 4,
  localparam int AW = $clog2(DIM)
) (
  input  logic                                 clk,
  input  logic                                 we,
  input  logic [AW-1:0]                        wr_row,
  input  logic [AW-1:0]                        wr_col,
  input  logic [P-1:0]                         wr_data,
  input  logic [AW-1:0]                        rd_row,
  input  logic [AW-1:0]                        rd_col,
  output logic [WIN-1:0][WIN-1:0][P-1:0]       rd_win
);

  logic [P-1:0] mem [DIM][DIM];

  always_ff @(posedge clk) begin
    if (we) mem[wr_row][wr_col] <= wr_data;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < WIN; i++) begin
      for (int j = 0; j < WIN; j++) begin
        if (int'(rd_row) + i < DIM && int'(rd_col) + j < DIM)
          rd_win[i][j] <= mem[int'(rd_row) + i][int'(rd_col) + j];
        else
          rd_win[i][j] <= '0;
      end
    end
  end

endmodule
