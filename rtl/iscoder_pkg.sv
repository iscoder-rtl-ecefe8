// iscoder_pkg: shared constants and types of the iSCoder in-SRAM compression
// accelerator.
//
// The accelerator runs two coding kernels of the MPEG-G pipeline on the same
// SRAM arrays: MatchC (longest match in a 256-symbol sliding window) and LutC
// (position of a symbol inside a lookup-table row selected by the two previous
// symbols). Every array is 256x8 = 2048 rows by 256+256 = 512 columns (128 KB).
//
// Bit placement inside an array follows the row-driver example: the first line
// of an 8-line symbol group carries the symbol's most significant bit, so line
// g*8+k of a group holds bit (7-k). sym_lines() converts a symbol to that
// 8-line field and back.
package iscoder_pkg;

  // Array geometry (rows 256x8, columns 256+256, 128 KB)
  localparam int unsigned SYM_W      = 8;            // MatchC symbol width
  localparam int unsigned LUT_SYM_W  = 7;            // LutC symbol width
  localparam int unsigned ROW_SYMS   = 256;          // symbol slots per column
  localparam int unsigned ROWS       = ROW_SYMS * SYM_W;   // 2048
  localparam int unsigned WIN        = 256;          // sliding-window size
  localparam int unsigned EXTRA_COLS = 256;          // preload columns (PMS)
  localparam int unsigned COLS       = WIN + EXTRA_COLS;   // 512
  localparam int unsigned COL_SLOTS  = COLS / SYM_W;       // 64 transposed symbol slots

  // LutC layout (hybrid scheduled array-combined strategy)
  localparam int unsigned LUT_SIZE    = 128;         // symbols per table row, addr range
  localparam int unsigned ARRAYS_PE   = 16;          // arrays per LutC PE
  localparam int unsigned BLOCKS_ARR  = 8;           // addr1 data blocks per array (M)
  localparam int unsigned LANES       = ROWS / LUT_SIZE;   // 16 addr2 rows per search
  localparam int unsigned N_TUPLES    = 16;          // tuples per scheduler batch (N)
  localparam int unsigned HOT_LO      = 28;          // hot addr1 range
  localparam int unsigned HOT_HI      = 43;

  // Array commands
  typedef enum logic [2:0] {
    ACC_NOP        = 3'd0,
    ACC_WR_ROW     = 3'd1,   // write one physical row (512 bits)
    ACC_WR_COL     = 3'd2,   // write one column (2048 bits) via the column driver
    ACC_SEARCH_ROW = 3'd3,   // one-cycle byte search on an 8-row group (MatchC)
    ACC_SEARCH_COL = 3'd4    // transposed search on an 8-column slot (LutC)
  } acc_op_e;

  typedef enum logic {
    MODE_MATCHC = 1'b0,
    MODE_LUTC   = 1'b1
  } mode_e;

  // LutC input tuple (addr1, addr2, sym)
  typedef struct packed {
    logic [LUT_SYM_W-1:0] addr1;
    logic [LUT_SYM_W-1:0] addr2;
    logic [LUT_SYM_W-1:0] sym;
  } tuple_t;

  // Symbol position inside a block (blocks of up to 2**POS_W - 1 symbols)
  localparam int unsigned POS_W = 13;

  // One search issued by the scheduler to one array. It carries what the result
  // selector needs to file the answers: which tuples of the batch it serves,
  // the lane (addr2 % 16) of every tuple and the block position of tuple 0.
  typedef struct packed {
    logic [$clog2(COL_SLOTS)-1:0]       slot;    // transposed column slot
    logic [LUT_SYM_W-1:0]               sym;     // searched symbol
    logic [N_TUPLES-1:0]                mask;    // tuples served by this search
    logic [N_TUPLES-1:0][3:0]           lane;    // addr2 % 16 of every tuple
    logic [POS_W-1:0]                   base;    // block position of tuple 0
  } lut_req_t;

  // MatchC result: length of the longest match and its column in the window
  typedef struct packed {
    logic [7:0] length;
    logic [7:0] pointer;
  } match_res_t;

  // Symbol -> 8-line field (line 0 = MSB) and back; the mapping is its own inverse
  function automatic logic [SYM_W-1:0] sym_lines(input logic [SYM_W-1:0] s);
    for (int k = 0; k < SYM_W; k++) sym_lines[k] = s[SYM_W-1-k];
  endfunction

endpackage
