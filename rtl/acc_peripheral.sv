// acc_peripheral: the result logic under an in-SRAM CAM array.
//
// MatchC side (per column, COLS columns):
//   * D flip-flop and AND - every column keeps its match bit of the previous
//     cycle and ANDs it with the new one, so a match of L symbols is built one
//     8-row byte search per cycle (an array may not drive more than 64 rows at
//     once). On the first cycle of an iteration (iter_first) the raw result is
//     taken alone.
//   * Mask bit-vector AND - only the WIN columns of the current sliding window
//     count. mask_init sets columns 0..WIN-1; mask_shift moves the window
//     shift_amt columns toward higher column numbers (the preload & mask
//     strategy: the next window is already stored in the extra columns).
//   * Comparator "= 0?" - hit is 1 while any valid column still matches.
//   * FindPos tree - column of the rightmost surviving 1.
//   * Counter - counts the search cycles that hit; with the pointer register it
//     gives (length, pointer) of the longest match. len/ptr_abs read 0 during
//     the first cycle of an iteration.
// hit and cur_pos are combinational in the search cycle; the counter, the
// pointer register, the column flip-flops and the mask update at the clock edge
// of a cycle with search_en.
//
// LutC side (transposed search, ROWS row results): ROWS/LSIZE FindPos trees of
// LSIZE entries each give, one cycle after lut_en, the position of the match
// in every lane (one addr2 row per lane).
//
// Reset (active low, synchronous) clears the column flip-flops, the mask, the
// counter and the LutC output valid.
module acc_peripheral #(
  parameter int unsigned COLS  = 512,
  parameter int unsigned WIN   = 256,
  parameter int unsigned ROWS  = 2048,
  parameter int unsigned LSIZE = 128
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // MatchC
  input  logic [COLS-1:0]         col_match,
  input  logic                    search_en,
  input  logic                    iter_first,
  input  logic                    mask_init,
  input  logic                    mask_shift,
  input  logic [$clog2(COLS):0]   shift_amt,
  output logic                    hit,
  output logic [$clog2(COLS)-1:0] cur_pos,
  output logic [8:0]              len,
  output logic [$clog2(COLS)-1:0] ptr_abs,
  // LutC
  input  logic [ROWS-1:0]         row_match,
  input  logic                    lut_en,
  output logic                    lut_valid,
  output logic [ROWS/LSIZE-1:0]   lut_hit,
  output logic [ROWS/LSIZE-1:0][$clog2(LSIZE)-1:0] lut_pos
);

  localparam int unsigned LANES = ROWS / LSIZE;

  logic [COLS-1:0]         acc_q, mask_q, rv, masked;
  logic [8:0]              cnt_q;
  logic [$clog2(COLS)-1:0] ptr_q;
  logic                    any_valid;

  assign rv     = iter_first ? col_match : (col_match & acc_q);
  assign masked = rv & mask_q;
  assign hit    = |masked;                       // comparator "= 0?" inverted

  findpos_tree #(.W(COLS)) u_findpos (.vec(masked), .pos(cur_pos), .valid(any_valid));

  assign len     = iter_first ? '0 : cnt_q;
  assign ptr_abs = iter_first ? '0 : ptr_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q  <= '0;
      mask_q <= '0;
      cnt_q  <= '0;
      ptr_q  <= '0;
    end else begin
      if (search_en) begin
        acc_q <= rv;
        if (hit) begin
          cnt_q <= len + 9'd1;
          ptr_q <= cur_pos;
        end else if (iter_first) begin
          cnt_q <= '0;
          ptr_q <= '0;
        end
      end
      if (mask_init)       mask_q <= {{(COLS-WIN){1'b0}}, {WIN{1'b1}}};
      else if (mask_shift) mask_q <= mask_q << shift_amt;
    end
  end

  // LutC: one FindPos tree per lane, registered
  logic [LANES-1:0]                    lane_hit;
  logic [LANES-1:0][$clog2(LSIZE)-1:0] lane_pos;

  for (genvar l = 0; l < int'(LANES); l++) begin : g_lane
    findpos_tree #(.W(LSIZE)) u_tree (
      .vec  (row_match[l*LSIZE +: LSIZE]),
      .pos  (lane_pos[l]),
      .valid(lane_hit[l])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lut_valid <= 1'b0;
      lut_hit   <= '0;
      lut_pos   <= '0;
    end else begin
      lut_valid <= lut_en;
      if (lut_en) begin
        lut_hit <= lane_hit;
        lut_pos <= lane_pos;
      end
    end
  end

  // a hit always has a position
  assert property (@(posedge clk) disable iff (!rst_n) hit |-> any_valid);

endmodule
