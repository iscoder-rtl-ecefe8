// sram_acc: one 128 KB-array SRAM accelerator, the execution unit shared by
// MatchC and LutC.
//
// It joins a row driver (MatchC byte search on one 8-row group), a transposed
// column driver (LutC search on one 8-column slot), the CAM cell array and the
// peripheral result logic. One command is taken per cycle on op:
//   ACC_WR_ROW     write physical row addr with row_data (LutC table fill)
//   ACC_WR_COL     write column addr with col_data (sliding-window fill)
//   ACC_SEARCH_ROW compare symbol sym with row group addr of all columns;
//                  hit/cur_pos answer in the same cycle, the length counter,
//                  pointer and mask update at the clock edge
//   ACC_SEARCH_COL compare sym with column slot addr of all rows; lut_hit and
//                  lut_pos of every 128-row lane are valid one cycle later
// iter_first, mask_init, mask_shift and shift_amt are passed to the peripheral
// (see acc_peripheral). In the default geometry the array has 2048 rows
// (256 symbols of 8 bits per column) and 512 columns (256 window columns plus
// 256 preload columns).
module sram_acc
  import iscoder_pkg::*;
#(
  parameter int unsigned NSYM  = 256,    // symbol slots per column
  parameter int unsigned NCOL  = 512,    // columns
  parameter int unsigned NWIN  = 256,    // window columns
  parameter int unsigned LSIZE = 128     // rows per LutC lane
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  acc_op_e                   op,
  input  logic [15:0]               addr,
  input  logic [SYM_W-1:0]          sym,
  input  logic [NCOL-1:0]           row_data,
  input  logic [NSYM*SYM_W-1:0]     col_data,
  input  logic                      iter_first,
  input  logic                      mask_init,
  input  logic                      mask_shift,
  input  logic [$clog2(NCOL):0]     shift_amt,
  output logic                      hit,
  output logic [$clog2(NCOL)-1:0]   cur_pos,
  output logic [8:0]                len,
  output logic [$clog2(NCOL)-1:0]   ptr_abs,
  output logic                      lut_valid,
  output logic [NSYM*SYM_W/LSIZE-1:0] lut_hit,
  output logic [NSYM*SYM_W/LSIZE-1:0][$clog2(LSIZE)-1:0] lut_pos
);

  localparam int unsigned NROW  = NSYM * SYM_W;
  localparam int unsigned NSLOT = NCOL / SYM_W;

  logic [NROW-1:0] row_bl, row_blb, row_match;
  logic [NCOL-1:0] col_bl, col_blb, col_match;
  logic            s_row, s_col;

  assign s_row = (op == ACC_SEARCH_ROW);
  assign s_col = (op == ACC_SEARCH_COL);

  row_driver #(.GROUPS(NSYM), .W(SYM_W)) u_row_drv (
    .en(s_row), .addr(addr[$clog2(NSYM)-1:0]), .sym(sym), .bl(row_bl), .blb(row_blb)
  );

  row_driver #(.GROUPS(NSLOT), .W(SYM_W)) u_col_drv (
    .en(s_col), .addr(addr[$clog2(NSLOT)-1:0]), .sym(sym), .bl(col_bl), .blb(col_blb)
  );

  cam_array #(.ROWS(NROW), .COLS(NCOL)) u_cam (
    .clk        (clk),
    .row_wr_en  (op == ACC_WR_ROW),
    .row_wr_addr(addr[$clog2(NROW)-1:0]),
    .row_wr_data(row_data),
    .col_wr_en  (op == ACC_WR_COL),
    .col_wr_addr(addr[$clog2(NCOL)-1:0]),
    .col_wr_data(col_data),
    .row_bl     (row_bl),
    .row_blb    (row_blb),
    .col_match  (col_match),
    .col_bl     (col_bl),
    .col_blb    (col_blb),
    .row_match  (row_match)
  );

  acc_peripheral #(.COLS(NCOL), .WIN(NWIN), .ROWS(NROW), .LSIZE(LSIZE)) u_periph (
    .clk       (clk),
    .rst_n     (rst_n),
    .col_match (col_match),
    .search_en (s_row),
    .iter_first(iter_first),
    .mask_init (mask_init),
    .mask_shift(mask_shift),
    .shift_amt (shift_amt),
    .hit       (hit),
    .cur_pos   (cur_pos),
    .len       (len),
    .ptr_abs   (ptr_abs),
    .row_match (row_match),
    .lut_en    (s_col),
    .lut_valid (lut_valid),
    .lut_hit   (lut_hit),
    .lut_pos   (lut_pos)
  );

endmodule
