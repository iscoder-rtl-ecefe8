// tb_iscoder_top: the whole accelerator run end to end through the host port,
// with two clusters (32 arrays) instead of 16 to keep the build small; every
// other parameter is at its default, and the clusters are identical copies.
// 1. MatchC mode: blocks are loaded into two banks of every cluster (4 MatchC
//    PEs working at once; the other banks have empty blocks) and coded; every
//    (length, pointer) word is compared with the software model.
// 2. Mode switch to LutC: the first and the last cluster get the lookup table
//    written row by row into their 16 arrays, each codes its own quality-score
//    block. Every position word is compared with a direct table lookup.
// Counted and required at least once: window refreshes, mask shifts,
// length-0 steps, capped matches (MatchC); scheduler waits and shared searches
// (LutC); the mode switch.
module tb_iscoder_top;
  import iscoder_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NCL = 2;                 // clusters simulated (16 in the full design)
  localparam int CLW = $clog2(NCL);

  mode_e mode = MODE_MATCHC;
  logic start = 0, busy, done;
  logic in_wr_en = 0, len_wr_en = 0, tbl_wr_en = 0;
  logic [CLW-1:0] in_wr_cl = '0, len_wr_cl = '0, tbl_wr_cl = '0, out_rd_cl = '0, cnt_rd_cl = '0, lw_rd_cl = '0;
  logic [3:0] in_wr_bank = '0, len_wr_bank = '0, tbl_wr_arr = '0, out_rd_bank = '0, cnt_rd_bank = '0;
  logic [11:0] in_wr_addr = '0, out_rd_addr = '0;
  logic [7:0] in_wr_data = '0;
  logic [POS_W-1:0] len_wr_val = '0, cnt_rd_data;
  logic [10:0] tbl_wr_row = '0;
  logic [511:0] tbl_wr_data = '0;
  logic [15:0] out_rd_data;
  logic [POS_W:0] l_written;

  iscoder_top #(.NCL(NCL)) dut (.*);

  `include "iscoder_tb_model.svh"

  int checks = 0, failures = 0;
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic put_sym(int c, int b, int a, logic [7:0] v);
    in_wr_en = 1; in_wr_cl = CLW'(c); in_wr_bank = 4'(b); in_wr_addr = 12'(a); in_wr_data = v;
    @(negedge clk);
    in_wr_en = 0;
  endtask

  task automatic set_len(int c, int b, int n);
    len_wr_en = 1; len_wr_cl = CLW'(c); len_wr_bank = 4'(b); len_wr_val = POS_W'(n);
    @(negedge clk);
    len_wr_en = 0;
  endtask

  task automatic read_out(int c, int b, int a, output logic [15:0] v);
    out_rd_cl = CLW'(c); out_rd_bank = 4'(b); out_rd_addr = 12'(a);
    @(negedge clk);
    v = out_rd_data;
  endtask

  task automatic run(output int cyc);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  // LutC scheduler activity in cluster 0
  int n_wait = 0, n_shared = 0, n_switch = 0;
  mode_e mode_d = MODE_MATCHC;
  always @(posedge clk) begin
    if (mode != mode_d) n_switch++;
    mode_d <= mode;
    if (mode == MODE_LUTC) begin
      for (int a = 0; a < 16; a++)
        if (dut.g_cl[0].u_cl.sch_valid[a] && $countones(dut.g_cl[0].u_cl.sch_req[a].mask) > 1) n_shared++;
      if ($countones(dut.g_cl[0].u_cl.u_sched.pend_q & ~dut.g_cl[0].u_cl.u_sched.grant) != 0) n_wait++;
    end
  end

  localparam int NMC = 2;                  // MatchC blocks per cluster
  int bank_of [NMC] = '{0, 15};
  int lutc_cl [2]   = '{0, NCL-1};

  initial begin
    int cyc, len, ml [], mp [], nres;
    logic [15:0] v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---------------- MatchC on 32 PEs ----------------
    for (int c = 0; c < NCL; c++)
      for (int i = 0; i < NMC; i++) begin
        len = 600 + 37 * c + 101 * i;
        gen_block(c * 16 + i + 1, len);
        for (int k = 0; k < len; k++) put_sym(c, bank_of[i], k, blk[k]);
        set_len(c, bank_of[i], len);
      end
    run(cyc);
    chk(!busy, "idle after MatchC");
    for (int c = 0; c < NCL; c++)
      for (int i = 0; i < NMC; i++) begin
        len = 600 + 37 * c + 101 * i;
        gen_block(c * 16 + i + 1, len);
        matchc_model(len, WIN, COLS, ml, mp, nres);
        cnt_rd_cl = CLW'(c); cnt_rd_bank = 4'(bank_of[i]);
        #1;
        chk(int'(cnt_rd_data) == nres, "MatchC result count");
        for (int r = 0; r < nres; r++) begin
          read_out(c, bank_of[i], r, v);
          chk(v == {8'(ml[r]), 8'(mp[r])}, "MatchC result");
        end
      end
    $display("MatchC: %0d blocks on %0d arrays in %0d cycles; refreshes=%0d shifts=%0d zero=%0d capped=%0d",
             2 * NCL, 16 * NCL, cyc, mdl_refresh, mdl_shift, mdl_zero, mdl_cap);
    // ---------------- LutC on the first and the last cluster ----------------
    mode = MODE_LUTC;
    for (int c = 0; c < NCL; c++)
      for (int i = 0; i < NMC; i++) set_len(c, bank_of[i], 0);
    for (int i = 0; i < 2; i++)
      for (int a = 0; a < 16; a++)
        for (int r = 0; r < 2048; r++) begin
          tbl_wr_en = 1; tbl_wr_cl = CLW'(lutc_cl[i]); tbl_wr_arr = 4'(a); tbl_wr_row = 11'(r);
          tbl_wr_data = lut_row(a, r);
          @(negedge clk);
        end
    tbl_wr_en = 0;
    for (int i = 0; i < 2; i++) begin
      gen_qs(5 + i, 500 + 200 * i);
      for (int k = 0; k < 500 + 200 * i; k++) put_sym(lutc_cl[i], 0, k, blk[k]);
      set_len(lutc_cl[i], 0, 500 + 200 * i);
    end
    run(cyc);
    for (int i = 0; i < 2; i++) begin
      len = 500 + 200 * i;
      gen_qs(5 + i, len);
      lw_rd_cl = CLW'(lutc_cl[i]);
      #1;
      chk(int'(l_written) == len, "LutC word count");
      for (int k = 0; k < len; k++) begin
        read_out(lutc_cl[i], k % 16, k / 16, v);
        if (k < 2) chk(v == 16'(blk[k]), "LutC head symbol");
        else       chk(v == 16'(lut_find(int'(blk[k-2]), int'(blk[k-1]), int'(blk[k]))), "LutC position");
      end
    end
    $display("LutC: 2 blocks in %0d cycles; scheduler waits=%0d shared searches=%0d mode switches=%0d",
             cyc, n_wait, n_shared, n_switch);
    chk(mdl_refresh > 0, "window refresh happened");
    chk(mdl_shift > 0, "mask shift happened");
    chk(mdl_zero > 0, "length-0 step happened");
    chk(mdl_cap > 0, "capped match happened");
    chk(n_wait > 0, "scheduler wait happened");
    chk(n_shared > 0, "shared search happened");
    chk(n_switch > 0, "mode switch happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
