// cam_array: the SRAM cell array of one 128 KB in-SRAM accelerator, with
// bit-line CAM search in both directions.
//
// Storage is ROWS x COLS bits (2048 x 512 = 128 KB by default), held as one
// COLS-bit word per physical row.
//
// Search (combinational, one cycle): every row r carries a drive code
// {row_bl[r], row_blb[r]}. A driven BL passes the cell value, a driven BLB its
// inverse, and all passed values along a column are ANDed together, as the
// sense amplifiers and the AND gate under each column do in an SRAM CAM. Rows
// with code 00 take no part. col_match[c] is 1 when column c agrees with the
// driven pattern on every driven row.
// The transposed search is the same with rows and columns swapped: the
// column drive {col_bl, col_blb} selects lines of every row and row_match[r]
// reports the rows that agree.
//
// Writes (synchronous): a whole physical row per cycle (row_wr_*) or a whole
// column per cycle (col_wr_*, the transposed column driver used to refresh one
// sliding-window column). A write and a search in the same cycle see the old
// contents. The cells are not reset; they are written before they are searched.
module cam_array #(
  parameter int unsigned ROWS = 2048,
  parameter int unsigned COLS = 512
) (
  input  logic                    clk,
  // row write
  input  logic                    row_wr_en,
  input  logic [$clog2(ROWS)-1:0] row_wr_addr,
  input  logic [COLS-1:0]         row_wr_data,
  // column write
  input  logic                    col_wr_en,
  input  logic [$clog2(COLS)-1:0] col_wr_addr,
  input  logic [ROWS-1:0]         col_wr_data,
  // search along columns (rows driven)
  input  logic [ROWS-1:0]         row_bl,
  input  logic [ROWS-1:0]         row_blb,
  output logic [COLS-1:0]         col_match,
  // transposed search along rows (columns driven)
  input  logic [COLS-1:0]         col_bl,
  input  logic [COLS-1:0]         col_blb,
  output logic [ROWS-1:0]         row_match
);

  logic [COLS-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (row_wr_en) mem[row_wr_addr] <= row_wr_data;
    if (col_wr_en) begin
      for (int r = 0; r < int'(ROWS); r++) mem[r][col_wr_addr] <= col_wr_data[r];
    end
  end

  // Column-wise match lines
  always_comb begin
    col_match = '1;
    for (int r = 0; r < int'(ROWS); r++) begin
      if (row_bl[r])  col_match = col_match & mem[r];
      if (row_blb[r]) col_match = col_match & ~mem[r];
    end
  end

  // Row-wise match lines of the transposed search
  always_comb begin
    for (int r = 0; r < int'(ROWS); r++)
      row_match[r] = &((~col_bl | mem[r]) & (~col_blb | ~mem[r]));
  end

endmodule
