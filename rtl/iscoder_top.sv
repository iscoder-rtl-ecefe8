// iscoder_top: the iSCoder accelerator with 256 in-SRAM arrays of 128 KB.
//
// The arrays are grouped in NCL clusters of NARR arrays (iscoder_cluster).
// In MatchC mode every array is a MatchC PE, so up to NCL*NARR = 256 blocks are
// coded in parallel; in LutC mode every cluster is one LutC PE of 16 arrays, so
// up to 16 blocks are coded in parallel. The mode input selects the kernel for
// all clusters; start is broadcast and busy stays high until every cluster has
// finished, then done pulses once.
//
// The host port stands for the external memory side of the scratchpads (the
// external DRAM itself is not part of the design). Every access carries a
// cluster number (*_cl) in addition to the cluster's own bank/array fields:
//   in_wr_*   symbol into input bank (cluster, bank, address);
//   len_wr_*  block length of a bank;
//   tbl_wr_*  one physical row of one array (LutC table fill, while idle);
//   out_rd_*  output word, one cycle latency;
//   cnt_rd_*  number of MatchC results in a bank;
//   lw_rd_cl  selects the cluster whose LutC word count shows on l_written.
// Synchronous active-low reset.
module iscoder_top
  import iscoder_pkg::*;
#(
  parameter int unsigned NCL   = 16,          // clusters (LutC PEs)
  parameter int unsigned NARR  = ARRAYS_PE,   // arrays per cluster
  parameter int unsigned WSIZE = WIN,         // MatchC window
  parameter int unsigned NCOL  = COLS,        // array columns
  parameter int unsigned DEPTH = 4096         // symbols per scratchpad bank
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  mode_e                          mode,
  input  logic                           start,
  output logic                           busy,
  output logic                           done,
  input  logic                           in_wr_en,
  input  logic [$clog2(NCL)-1:0]         in_wr_cl,
  input  logic [$clog2(NARR)-1:0]        in_wr_bank,
  input  logic [$clog2(DEPTH)-1:0]       in_wr_addr,
  input  logic [SYM_W-1:0]               in_wr_data,
  input  logic                           len_wr_en,
  input  logic [$clog2(NCL)-1:0]         len_wr_cl,
  input  logic [$clog2(NARR)-1:0]        len_wr_bank,
  input  logic [POS_W-1:0]               len_wr_val,
  input  logic                           tbl_wr_en,
  input  logic [$clog2(NCL)-1:0]         tbl_wr_cl,
  input  logic [$clog2(NARR)-1:0]        tbl_wr_arr,
  input  logic [$clog2(WSIZE*SYM_W)-1:0] tbl_wr_row,
  input  logic [NCOL-1:0]                tbl_wr_data,
  input  logic [$clog2(NCL)-1:0]         out_rd_cl,
  input  logic [$clog2(NARR)-1:0]        out_rd_bank,
  input  logic [$clog2(DEPTH)-1:0]       out_rd_addr,
  output logic [15:0]                    out_rd_data,
  input  logic [$clog2(NCL)-1:0]         cnt_rd_cl,
  input  logic [$clog2(NARR)-1:0]        cnt_rd_bank,
  output logic [POS_W-1:0]               cnt_rd_data,
  input  logic [$clog2(NCL)-1:0]         lw_rd_cl,
  output logic [POS_W:0]                 l_written
);

  logic [NCL-1:0]              cl_busy, cl_done;
  logic [NCL-1:0][15:0]        cl_out;
  logic [NCL-1:0][POS_W-1:0]   cl_cnt;
  logic [NCL-1:0][POS_W:0]     cl_lw;
  logic [$clog2(NCL)-1:0]      out_cl_q;
  logic                        busy_q;

  for (genvar c = 0; c < int'(NCL); c++) begin : g_cl
    iscoder_cluster #(.NARR(NARR), .WSIZE(WSIZE), .NCOL(NCOL), .DEPTH(DEPTH)) u_cl (
      .clk(clk), .rst_n(rst_n), .mode(mode), .start(start && !busy_q),
      .busy(cl_busy[c]), .done(cl_done[c]),
      .in_wr_en(in_wr_en && in_wr_cl == $clog2(NCL)'(c)), .in_wr_bank(in_wr_bank),
      .in_wr_addr(in_wr_addr), .in_wr_data(in_wr_data),
      .len_wr_en(len_wr_en && len_wr_cl == $clog2(NCL)'(c)), .len_wr_bank(len_wr_bank),
      .len_wr_val(len_wr_val),
      .tbl_wr_en(tbl_wr_en && tbl_wr_cl == $clog2(NCL)'(c)), .tbl_wr_arr(tbl_wr_arr),
      .tbl_wr_row(tbl_wr_row), .tbl_wr_data(tbl_wr_data),
      .out_rd_bank(out_rd_bank), .out_rd_addr(out_rd_addr), .out_rd_data(cl_out[c]),
      .cnt_rd_bank(cnt_rd_bank), .cnt_rd_data(cl_cnt[c]),
      .l_written(cl_lw[c])
    );
  end

  assign out_rd_data = cl_out[out_cl_q];
  assign cnt_rd_data = cl_cnt[cnt_rd_cl];
  assign l_written   = cl_lw[lw_rd_cl];
  assign busy        = busy_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_cl_q <= '0;
      busy_q   <= 1'b0;
      done     <= 1'b0;
    end else begin
      out_cl_q <= out_rd_cl;
      done     <= 1'b0;
      if (!busy_q) begin
        if (start) busy_q <= 1'b1;
      end else if (cl_busy == '0) begin
        busy_q <= 1'b0;
        done   <= 1'b1;
      end
    end
  end

endmodule
