// On-chip matrix buffer for the TTM processing element.
//
// Holds the whole dense input matrix, one row of COLS single-precision values
// per word, so that each nonzero's row is read from block RAM instead of from
// global memory. The matrix is written once, row by row, before computing
// starts; during computing one row is read per cycle. Keeping the matrix on
// chip follows the source article; its depth is this design's choice, sized from the
// extra RAM blocks the on-chip variant uses at 16 columns (about 40 K rows of
// 64 bytes), rounded down to a power of two.
// Interface: wr_en/wr_addr/wr_data write one row; rd_en/rd_addr read one row,
// rd_data is valid the cycle after rd_en (registered block-RAM read).
module matrix_buffer
  import sparse_pkg::*;
#(
  parameter int unsigned COLS = 16,
  parameter int unsigned ROWS = 32768,
  localparam int unsigned AW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_addr,
  input  logic [COLS*FP_W-1:0] wr_data,
  input  logic                 rd_en,
  input  logic [AW-1:0]        rd_addr,
  output logic [COLS*FP_W-1:0] rd_data
);

  logic [COLS*FP_W-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
