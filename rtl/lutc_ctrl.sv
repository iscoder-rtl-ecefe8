// lutc_ctrl: runs the LutC kernel of one block on one LutC PE.
//
// LutC codes every quality-score symbol sym[k] (k >= 2) by its position in the
// lookup-table row selected by the two symbols before it, i.e. it codes the
// tuple (addr1, addr2, sym) = (sym[k-2], sym[k-1], sym[k]). The first two
// symbols are passed through as they are.
//
// Flow: after start the controller sends the two leading symbols to the result
// selector (h_en), then cuts the block into batches of N tuples, k = 2, 2+N,
// 2+2N, ... Each batch is read with one wide scratchpad read at position k-2
// (N+2 consecutive symbols give N tuples) and loaded into the N-tuple
// scheduler as soon as the scheduler has issued every tuple of the previous
// batch; tuples past the end of the block are marked invalid. When the last
// batch has been issued the controller waits until the result selector has
// written all n_syms results, then pulses done. A batch that needs g issue
// cycles costs g+1 cycles.
// Symbols are 7-bit; bit 7 of a scratchpad byte is ignored. Blocks shorter
// than two symbols finish at once without results.
module lutc_ctrl
  import iscoder_pkg::*;
#(
  parameter int unsigned N     = N_TUPLES,
  parameter int unsigned WSIZE = 256         // width of the scratchpad read port
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [POS_W-1:0]              n_syms,
  output logic [POS_W-1:0]              rd_off,
  input  logic [WSIZE-1:0][SYM_W-1:0]   rd_win,
  // scheduler
  output logic                          load,
  output tuple_t [N-1:0]                tuples,
  output logic   [N-1:0]                tvalid,
  output logic   [POS_W-1:0]            base,
  input  logic                          sched_busy,
  // result selector
  output logic                          h_en,
  output logic [LUT_SYM_W-1:0]          h_sym0,
  output logic [LUT_SYM_W-1:0]          h_sym1,
  input  logic [POS_W:0]                l_written,
  output logic                          busy,
  output logic                          done
);

  typedef enum logic [1:0] {L_IDLE, L_HEAD, L_BATCH, L_DRAIN} state_e;

  state_e           st_q;
  logic [POS_W:0]   i_q;
  logic [POS_W-1:0] n_q;

  assign rd_off = (st_q == L_BATCH) ? POS_W'(i_q - 2) : '0;
  assign h_en   = (st_q == L_HEAD);
  assign h_sym0 = rd_win[0][LUT_SYM_W-1:0];
  assign h_sym1 = rd_win[1][LUT_SYM_W-1:0];
  assign base   = POS_W'(i_q);
  assign load   = (st_q == L_BATCH) && !sched_busy && (i_q < (POS_W+1)'(n_q));
  assign busy   = (st_q != L_IDLE);

  always_comb begin
    for (int n = 0; n < int'(N); n++) begin
      tuples[n].addr1 = rd_win[n][LUT_SYM_W-1:0];
      tuples[n].addr2 = rd_win[n+1][LUT_SYM_W-1:0];
      tuples[n].sym   = rd_win[n+2][LUT_SYM_W-1:0];
      tvalid[n]       = (i_q + (POS_W+1)'(n)) < (POS_W+1)'(n_q);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q <= L_IDLE;
      i_q  <= '0;
      n_q  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st_q)
        L_IDLE: if (start) begin
          n_q <= n_syms;
          i_q <= (POS_W+1)'(2);
          if (n_syms >= POS_W'(2)) st_q <= L_HEAD;
          else                     done <= 1'b1;
        end
        L_HEAD: st_q <= L_BATCH;
        L_BATCH: begin
          if (load) i_q <= i_q + (POS_W+1)'(N);
          else if (!sched_busy && i_q >= (POS_W+1)'(n_q)) st_q <= L_DRAIN;
        end
        L_DRAIN: if (l_written == (POS_W+1)'(n_q)) begin
          st_q <= L_IDLE;
          done <= 1'b1;
        end
        default: st_q <= L_IDLE;
      endcase
    end
  end

endmodule
