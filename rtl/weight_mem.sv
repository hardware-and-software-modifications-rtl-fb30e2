// weight_mem: weight store of one layer (the "BROM weight_Lx" of the memory unit).
//
// DEPTH words, each ELEMS weights of W bits. The read port returns a whole word
// one clock after rd_addr, so that every PE (or every output cell) gets its
// weight in the same clock. Weights are trained off-line; here a host loads
// them one weight per clock through (we, wr_addr, wr_elem, wr_data) before a
// recognition run. The published design keeps trained weights in block ROMs;
// the write port replaces the ROM initialisation and is this design's choice.
module weight_mem #(
  parameter int DEPTH = 69,
  parameter int ELEMS = 20,
  parameter int W     = 9,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int EW   = (ELEMS > 1) ? $clog2(ELEMS) : 1
) (
  input  logic                    clk,
  input  logic                    we,
  input  logic [AW-1:0]           wr_addr,
  input  logic [EW-1:0]           wr_elem,
  input  logic [W-1:0]            wr_data,
  input  logic [AW-1:0]           rd_addr,
  output logic [ELEMS-1:0][W-1:0] rd_data
);

  logic [ELEMS-1:0][W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr][wr_elem] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
