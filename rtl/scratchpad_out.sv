// scratchpad_out: the output scratchpad. It collects coded results before
// they go back to external memory.
//
// BANKS banks of DEPTH 16-bit words, one write port per bank so that a result
// can be written for every accelerator (MatchC) or every tuple lane of a batch
// (LutC) in the same cycle. The host reads one word per cycle through rd_*;
// rd_data is registered (one cycle latency). Contents are not reset.
// Word formats are set by result_selector. Sizes are this design's choices.
module scratchpad_out #(
  parameter int unsigned BANKS = 16,
  parameter int unsigned DEPTH = 4096
) (
  input  logic                                  clk,
  input  logic [BANKS-1:0]                      wr_en,
  input  logic [BANKS-1:0][$clog2(DEPTH)-1:0]   wr_addr,
  input  logic [BANKS-1:0][15:0]                wr_data,
  input  logic [$clog2(BANKS)-1:0]              rd_bank,
  input  logic [$clog2(DEPTH)-1:0]              rd_addr,
  output logic [15:0]                           rd_data
);

  logic [15:0] mem [BANKS][DEPTH];

  always_ff @(posedge clk) begin
    for (int b = 0; b < int'(BANKS); b++)
      if (wr_en[b]) mem[b][wr_addr[b]] <= wr_data[b];
    rd_data <= mem[rd_bank][rd_addr];
  end

endmodule
