// scratchpad_in: the input scratchpad. It holds the symbol blocks brought in
// from external memory, one bank per SRAM accelerator.
//
// BANKS banks of DEPTH 8-bit symbols. The host side writes one symbol per
// cycle (wr_*). Every bank has a wide read port: rd_off[b] selects a position
// and rd_win[b] returns the WSIZE symbols starting there, zeros past the end of
// the bank. The read is combinational, so a MatchC controller can rewrite one
// full array column (WSIZE symbols) per cycle. Contents are not reset.
// Bank count, depth and the wide port are this design's choices; the document
// only shows a scratchpad between external memory and the accelerator.
module scratchpad_in
  import iscoder_pkg::*;
#(
  parameter int unsigned BANKS = 16,
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WSIZE = 256
) (
  input  logic                                 clk,
  input  logic                                 wr_en,
  input  logic [$clog2(BANKS)-1:0]             wr_bank,
  input  logic [$clog2(DEPTH)-1:0]             wr_addr,
  input  logic [SYM_W-1:0]                     wr_data,
  input  logic [BANKS-1:0][POS_W-1:0]          rd_off,
  output logic [BANKS-1:0][WSIZE-1:0][SYM_W-1:0] rd_win
);

  logic [SYM_W-1:0] mem [BANKS][DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_bank][wr_addr] <= wr_data;
  end

  always_comb begin
    for (int b = 0; b < int'(BANKS); b++) begin
      for (int k = 0; k < int'(WSIZE); k++) begin
        if (32'(rd_off[b]) + 32'(k) < 32'(DEPTH))
          rd_win[b][k] = mem[b][$clog2(DEPTH)'(32'(rd_off[b]) + 32'(k))];
        else
          rd_win[b][k] = '0;
      end
    end
  end

endmodule
