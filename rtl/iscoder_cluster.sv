// iscoder_cluster: one iSCoder accelerator slice. NARR SRAM accelerators share
// an input scratchpad, an N-tuple scheduler with one FIFO per accelerator, a
// result selector and an output scratchpad. The same arrays serve both kernels:
//
//   MatchC mode - every accelerator is one MatchC PE with its own
//     matchc_ctrl and its own scratchpad bank; NARR blocks are coded at once.
//     Results go to output bank a as {length, pointer} words.
//   LutC mode  - the NARR accelerators together are one LutC PE holding the
//     whole 128x128x128 lookup table (8 addr1 blocks per array, transposed,
//     see addr1_remap and tuple_scheduler). lutc_ctrl reads the block from
//     bank 0, the scheduler issues up to one search per array per cycle through
//     the FIFOs, and the result selector files one position word per symbol
//     (symbol k at bank k%16, address k/16).
//
// Host side (the external-memory side of the scratchpads):
//   in_wr_*   write a symbol into an input bank;
//   len_wr_*  set the block length of a bank (LutC uses bank 0);
//   tbl_wr_*  write one physical row of an array (LutC table fill): entry j
//             of table row (addr1, addr2) lives in array newID/8, column slot
//             (newID%8)*8 + addr2/16, physical row (addr2%16)*128 + j, newID
//             being the remapped addr1; only while the cluster is idle;
//   start     (pulse, while idle) runs the kernel selected by mode; busy is
//             high until done pulses;
//   out_rd_*  read an output word (one cycle latency); cnt_rd_* read how many
//             MatchC results a bank holds; l_written counts LutC words.
// Synchronous active-low reset.
module iscoder_cluster
  import iscoder_pkg::*;
#(
  parameter int unsigned NARR   = ARRAYS_PE,   // accelerators in the slice
  parameter int unsigned WSIZE  = WIN,         // MatchC window size
  parameter int unsigned NCOL   = COLS,        // array columns (window + preload)
  parameter int unsigned DEPTH  = 4096,        // symbols per scratchpad bank
  parameter int unsigned FDEPTH = 4            // FIFO depth
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  mode_e                         mode,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  input  logic                          in_wr_en,
  input  logic [$clog2(NARR)-1:0]       in_wr_bank,
  input  logic [$clog2(DEPTH)-1:0]      in_wr_addr,
  input  logic [SYM_W-1:0]              in_wr_data,
  input  logic                          len_wr_en,
  input  logic [$clog2(NARR)-1:0]       len_wr_bank,
  input  logic [POS_W-1:0]              len_wr_val,
  input  logic                          tbl_wr_en,
  input  logic [$clog2(NARR)-1:0]       tbl_wr_arr,
  input  logic [$clog2(WSIZE*SYM_W)-1:0] tbl_wr_row,
  input  logic [NCOL-1:0]               tbl_wr_data,
  input  logic [$clog2(NARR)-1:0]       out_rd_bank,
  input  logic [$clog2(DEPTH)-1:0]      out_rd_addr,
  output logic [15:0]                   out_rd_data,
  input  logic [$clog2(NARR)-1:0]       cnt_rd_bank,
  output logic [POS_W-1:0]              cnt_rd_data,
  output logic [POS_W:0]                l_written
);

  localparam int unsigned RW = $clog2(NCOL) + 1;
  localparam int unsigned LW = $bits(lut_req_t);

  logic [NARR-1:0][POS_W-1:0] len_q;
  logic                       busy_q;

  // scratchpad_in
  logic [NARR-1:0][POS_W-1:0]               sp_off;
  logic [NARR-1:0][WSIZE-1:0][SYM_W-1:0]    sp_win;

  // per-array signals
  logic [NARR-1:0][POS_W-1:0]   mc_off;
  acc_op_e [NARR-1:0]           mc_op, acc_op;
  logic [NARR-1:0][15:0]        mc_addr, acc_addr;
  logic [NARR-1:0][SYM_W-1:0]   mc_sym, acc_sym;
  logic [NARR-1:0][WSIZE*SYM_W-1:0] mc_col;
  logic [NARR-1:0]              mc_first, mc_minit, mc_mshift, mc_busy, mc_done, mc_valid;
  logic [NARR-1:0][RW-1:0]      mc_amt;
  match_res_t [NARR-1:0]        mc_res;
  logic [NARR-1:0]              acc_hit, acc_lvalid;
  logic [NARR-1:0][RW-2:0]      acc_cpos, acc_ptr;
  logic [NARR-1:0][8:0]         acc_len;
  logic [NARR-1:0][LANES-1:0]   acc_lhit;
  logic [NARR-1:0][LANES-1:0][LUT_SYM_W-1:0] acc_lpos;

  // LutC path
  logic [POS_W-1:0]             lc_off, lc_base;
  logic                         lc_load, lc_busy, lc_done, lc_hen;
  tuple_t [N_TUPLES-1:0]        lc_tup;
  logic [N_TUPLES-1:0]          lc_tval;
  logic [LUT_SYM_W-1:0]         lc_h0, lc_h1;
  logic                         sch_busy;
  logic [NARR-1:0]              sch_valid, f_empty, f_full, f_pop;
  lut_req_t [NARR-1:0]          sch_req, f_head, tag_q;

  // result path
  logic [NARR-1:0]              rs_wen;
  logic [NARR-1:0][$clog2(DEPTH)-1:0] rs_waddr;
  logic [NARR-1:0][15:0]        rs_wdata;
  logic [NARR-1:0][POS_W-1:0]   rs_mcount;

  always_ff @(posedge clk) begin
    if (!rst_n) len_q <= '0;
    else if (len_wr_en) len_q[len_wr_bank] <= len_wr_val;
  end

  always_comb begin
    sp_off = mc_off;
    if (mode == MODE_LUTC) sp_off[0] = lc_off;
  end

  scratchpad_in #(.BANKS(NARR), .DEPTH(DEPTH), .WSIZE(WSIZE)) u_sp_in (
    .clk(clk), .wr_en(in_wr_en), .wr_bank(in_wr_bank), .wr_addr(in_wr_addr),
    .wr_data(in_wr_data), .rd_off(sp_off), .rd_win(sp_win)
  );

  for (genvar a = 0; a < int'(NARR); a++) begin : g_arr
    matchc_ctrl #(.WSIZE(WSIZE), .NCOL(NCOL), .AW(POS_W)) u_mc (
      .clk(clk), .rst_n(rst_n),
      .start(start && mode == MODE_MATCHC && !busy_q), .n_syms(len_q[a]),
      .rd_off(mc_off[a]), .rd_win(sp_win[a]),
      .op(mc_op[a]), .addr(mc_addr[a]), .sym(mc_sym[a]), .col_data(mc_col[a]),
      .iter_first(mc_first[a]), .mask_init(mc_minit[a]), .mask_shift(mc_mshift[a]),
      .shift_amt(mc_amt[a]), .hit(acc_hit[a]), .len(acc_len[a]), .ptr_abs(acc_ptr[a]),
      .res_valid(mc_valid[a]), .res(mc_res[a]), .busy(mc_busy[a]), .done(mc_done[a])
    );

    sync_fifo #(.WIDTH(LW), .DEPTH(FDEPTH)) u_fifo (
      .clk(clk), .rst_n(rst_n), .push(sch_valid[a]), .wr_data(sch_req[a]),
      .pop(f_pop[a]), .rd_data(f_head[a]), .empty(f_empty[a]), .full(f_full[a])
    );

    // command select: table write, then the kernel of the current mode
    always_comb begin
      f_pop[a]    = 1'b0;
      acc_op[a]   = ACC_NOP;
      acc_addr[a] = '0;
      acc_sym[a]  = mc_sym[a];
      if (tbl_wr_en && tbl_wr_arr == $clog2(NARR)'(a)) begin
        acc_op[a]   = ACC_WR_ROW;
        acc_addr[a] = 16'(tbl_wr_row);
      end else if (mode == MODE_MATCHC) begin
        acc_op[a]   = mc_op[a];
        acc_addr[a] = mc_addr[a];
      end else if (!f_empty[a]) begin
        f_pop[a]    = 1'b1;
        acc_op[a]   = ACC_SEARCH_COL;
        acc_addr[a] = 16'(f_head[a].slot);
        acc_sym[a]  = SYM_W'(f_head[a].sym);
      end
    end

    always_ff @(posedge clk) begin
      if (!rst_n)       tag_q[a] <= '0;
      else if (f_pop[a]) tag_q[a] <= f_head[a];
    end

    sram_acc #(.NSYM(WSIZE), .NCOL(NCOL), .NWIN(WSIZE), .LSIZE(LUT_SIZE)) u_acc (
      .clk(clk), .rst_n(rst_n), .op(acc_op[a]), .addr(acc_addr[a]), .sym(acc_sym[a]),
      .row_data(tbl_wr_data), .col_data(mc_col[a]), .iter_first(mc_first[a]),
      .mask_init(mc_minit[a]), .mask_shift(mc_mshift[a]), .shift_amt(mc_amt[a]),
      .hit(acc_hit[a]), .cur_pos(acc_cpos[a]), .len(acc_len[a]), .ptr_abs(acc_ptr[a]),
      .lut_valid(acc_lvalid[a]), .lut_hit(acc_lhit[a]), .lut_pos(acc_lpos[a])
    );
  end

  lutc_ctrl #(.N(N_TUPLES), .WSIZE(WSIZE)) u_lc (
    .clk(clk), .rst_n(rst_n), .start(start && mode == MODE_LUTC && !busy_q),
    .n_syms(len_q[0]), .rd_off(lc_off), .rd_win(sp_win[0]),
    .load(lc_load), .tuples(lc_tup), .tvalid(lc_tval), .base(lc_base),
    .sched_busy(sch_busy), .h_en(lc_hen), .h_sym0(lc_h0), .h_sym1(lc_h1),
    .l_written(l_written), .busy(lc_busy), .done(lc_done)
  );

  tuple_scheduler #(.N(N_TUPLES), .NARR(NARR)) u_sched (
    .clk(clk), .rst_n(rst_n), .load(lc_load), .tuples(lc_tup), .tvalid(lc_tval),
    .base(lc_base), .busy(sch_busy), .req_valid(sch_valid), .req(sch_req)
  );

  result_selector #(.NARR(NARR), .BANKS(NARR), .DEPTH(DEPTH)) u_rs (
    .clk(clk), .rst_n(rst_n), .mode(mode), .clear(start && !busy_q),
    .m_valid(mc_valid), .m_res(mc_res),
    .l_valid(acc_lvalid), .l_tag(tag_q), .l_hit(acc_lhit), .l_pos(acc_lpos),
    .h_en(lc_hen), .h_sym0(lc_h0), .h_sym1(lc_h1),
    .wr_en(rs_wen), .wr_addr(rs_waddr), .wr_data(rs_wdata),
    .m_count(rs_mcount), .l_written(l_written)
  );

  scratchpad_out #(.BANKS(NARR), .DEPTH(DEPTH)) u_sp_out (
    .clk(clk), .wr_en(rs_wen), .wr_addr(rs_waddr), .wr_data(rs_wdata),
    .rd_bank(out_rd_bank), .rd_addr(out_rd_addr), .rd_data(out_rd_data)
  );

  assign cnt_rd_data = rs_mcount[cnt_rd_bank];

  // run control
  assign busy = busy_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy_q) begin
        if (start) busy_q <= 1'b1;
      end else if ((mode == MODE_MATCHC && !(|mc_busy)) ||
                   (mode == MODE_LUTC && !lc_busy)) begin
        busy_q <= 1'b0;
        done   <= 1'b1;
      end
    end
  end

  // the FIFOs are drained every cycle in LutC mode, so they never fill
  assert property (@(posedge clk) disable iff (!rst_n) (sch_valid & f_full) == '0);
  // the table may only be written while the cluster is idle
  assert property (@(posedge clk) disable iff (!rst_n) tbl_wr_en |-> !busy_q);

endmodule
