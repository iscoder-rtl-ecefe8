// sync_fifo: small synchronous FIFO between the scheduler's crossbar and one
// SRAM accelerator.
//
// DEPTH entries of WIDTH bits held in a register array with read and write
// pointers one bit wider than the index (full when they differ only in that
// bit). push is ignored when full, pop when empty; a push and a pop in the same
// cycle are both taken. rd_data shows the oldest entry (first-word
// fall-through), so an entry pushed in cycle t can be popped in cycle t+1.
// The document names the FIFOs but gives no depth or width; DEPTH = 4 is this
// design's choice. Synchronous active-low reset empties the FIFO.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full
);

  localparam int unsigned PW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW:0]      wp_q, rp_q;
  logic             do_push, do_pop;

  assign empty   = (wp_q == rp_q);
  assign full    = (wp_q[PW] != rp_q[PW]) && (wp_q[PW-1:0] == rp_q[PW-1:0]);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rd_data = mem[rp_q[PW-1:0]];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp_q <= '0;
      rp_q <= '0;
    end else begin
      if (do_push) begin
        mem[wp_q[PW-1:0]] <= wr_data;
        wp_q <= wp_q + 1'b1;
      end
      if (do_pop) rp_q <= rp_q + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));

endmodule
