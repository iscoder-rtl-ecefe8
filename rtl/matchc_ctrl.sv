// matchc_ctrl: runs the MatchC kernel on one SRAM accelerator (one MatchC PE).
//
// MatchC finds, for position i of a symbol block, the longest run of symbols
// starting at i that also starts somewhere in the WSIZE symbols before i, and
// emits (length, pointer); pointer is the column of the match inside the
// window (window start i-WSIZE+pointer). The block is then advanced by length
// symbols (by one when nothing matched) and the next search starts. Coding
// starts at i = WSIZE; the first WSIZE symbols only fill the first window.
//
// Memory layout: column c of the array holds the WSIZE symbols starting at block
// position fb+c (fb = fill base), one 8-row group per symbol. With NCOL = 2*WSIZE
// columns the array holds the current window and WSIZE future windows at once
// (preload & mask): the mask marks columns s..s+WSIZE-1 as the window, so
// i = fb + s + WSIZE.
//
// Per iteration: in cycle R (R = 0,1,...) byte search row group R with input
// symbol block[i+R]. The peripheral ANDs the column results over the cycles and
// counts the cycles that still hit. The first cycle without a hit (or the cap of
// WSIZE-1 matched symbols, or the end of the block) ends the iteration: the
// result is emitted in that cycle and the mask shifts by the advance at the
// same clock edge, so an iteration of length L takes L+1 cycles. When the
// shifted window would pass the last column, all NCOL columns are rewritten
// from the new base instead (one column per cycle, NCOL cycles), as is the
// first fill.
//
// Interface: start (pulse, while idle) with n_syms = block length. The block is
// read through a window port: rd_off selects a position, rd_win returns WSIZE
// symbols from there (zeros past the end). res_valid pulses with every result;
// done pulses after the last one; busy is high from start to done.
module matchc_ctrl
  import iscoder_pkg::*;
#(
  parameter int unsigned WSIZE  = 256,        // window size = symbols per column
  parameter int unsigned NCOL = 512,        // columns (WSIZE + preload columns)
  parameter int unsigned AW   = 13          // block position width
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [AW-1:0]             n_syms,
  output logic [AW-1:0]             rd_off,
  input  logic [WSIZE-1:0][SYM_W-1:0] rd_win,
  // array side
  output acc_op_e                   op,
  output logic [15:0]               addr,
  output logic [SYM_W-1:0]          sym,
  output logic [WSIZE*SYM_W-1:0]      col_data,
  output logic                      iter_first,
  output logic                      mask_init,
  output logic                      mask_shift,
  output logic [$clog2(NCOL):0]     shift_amt,
  input  logic                      hit,
  input  logic [8:0]                len,
  input  logic [$clog2(NCOL)-1:0]   ptr_abs,
  // results
  output logic                      res_valid,
  output match_res_t                res,
  output logic                      busy,
  output logic                      done
);

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_SEARCH} state_e;

  state_e                    st_q;
  logic [AW:0]               i_q, fb_q;          // one bit wider than a position
  logic [$clog2(NCOL):0]     s_q;                // mask start column
  logic [$clog2(NCOL)-1:0]   c_q;                // column being filled
  logic [$clog2(WSIZE)-1:0]    r_q;                // row group being searched
  logic                      first_q;
  logic [AW-1:0]             n_q;

  logic                      force_stop, stop, searching;
  logic [8:0]                adv;
  logic [AW:0]               i_next, srch_off;
  logic [AW:0]               fill_off;   // top bit unused: fills stay inside the bank
  logic [$clog2(NCOL):0]     s_next;

  assign fill_off = fb_q + (AW+1)'(c_q);
  assign srch_off = i_q + (AW+1)'(r_q);
  assign rd_off   = (st_q == S_FILL) ? fill_off[AW-1:0] : srch_off[AW-1:0];

  assign force_stop = (srch_off >= (AW+1)'(n_q)) || (r_q == $clog2(WSIZE)'(WSIZE-1));
  assign searching  = (st_q == S_SEARCH) && !force_stop;
  assign stop       = (st_q == S_SEARCH) && (force_stop || !hit);
  assign adv        = (len == 9'd0) ? 9'd1 : len;
  assign i_next     = i_q + (AW+1)'(adv);
  assign s_next     = s_q + ($clog2(NCOL)+1)'(adv);

  // array commands
  always_comb begin
    op         = ACC_NOP;
    addr       = '0;
    sym        = rd_win[0];
    iter_first = first_q;
    mask_init  = 1'b0;
    mask_shift = 1'b0;
    shift_amt  = ($clog2(NCOL)+1)'(adv);
    for (int k = 0; k < int'(WSIZE); k++) col_data[k*SYM_W +: SYM_W] = sym_lines(rd_win[k]);
    case (st_q)
      S_FILL: begin
        op        = ACC_WR_COL;
        addr      = 16'(c_q);
        mask_init = (c_q == $clog2(NCOL)'(NCOL-1));
      end
      S_SEARCH: begin
        if (searching) begin
          op   = ACC_SEARCH_ROW;
          addr = 16'(r_q);
        end
        mask_shift = stop && (i_next < (AW+1)'(n_q)) &&
                     (s_next <= ($clog2(NCOL)+1)'(NCOL-WSIZE));
      end
      default: ;
    endcase
  end

  // results
  assign res_valid   = stop;
  assign res.length  = len[7:0];
  assign res.pointer = (len == 9'd0) ? 8'd0 : 8'(ptr_abs - s_q[$clog2(NCOL)-1:0]);
  assign busy        = (st_q != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q    <= S_IDLE;
      i_q     <= '0;
      fb_q    <= '0;
      s_q     <= '0;
      c_q     <= '0;
      r_q     <= '0;
      first_q <= 1'b1;
      n_q     <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st_q)
        S_IDLE: if (start) begin
          n_q     <= n_syms;
          i_q     <= (AW+1)'(WSIZE);
          fb_q    <= '0;
          s_q     <= '0;
          c_q     <= '0;
          r_q     <= '0;
          first_q <= 1'b1;
          if (n_syms > AW'(WSIZE)) st_q <= S_FILL;
          else                   done <= 1'b1;
        end
        S_FILL: begin
          c_q <= c_q + 1'b1;
          if (c_q == $clog2(NCOL)'(NCOL-1)) begin
            st_q    <= S_SEARCH;
            r_q     <= '0;
            first_q <= 1'b1;
          end
        end
        S_SEARCH: begin
          if (!stop) begin
            r_q     <= r_q + 1'b1;
            first_q <= 1'b0;
          end else begin
            r_q     <= '0;
            first_q <= 1'b1;
            i_q     <= i_next;
            if (i_next >= (AW+1)'(n_q)) begin
              st_q <= S_IDLE;
              done <= 1'b1;
            end else if (s_next <= ($clog2(NCOL)+1)'(NCOL-WSIZE)) begin
              s_q <= s_next;
            end else begin
              fb_q <= fb_q + (AW+1)'(s_next);
              s_q  <= '0;
              c_q  <= '0;
              st_q <= S_FILL;
            end
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

endmodule
