// tb_iscoder_cluster: one accelerator slice (16 arrays) run end to end in
// both modes through its host port.
// MatchC: 16 blocks of different lengths (one too short to code) are loaded
// into the 16 banks and coded in parallel; every (length, pointer) word is
// compared with a software model of the kernel. LutC: the arrays are then
// refilled row by row with a 128x128x128 lookup table in the remapped,
// transposed layout, a quality-score-like block is loaded into bank 0 and
// coded; every output word is compared with a direct table lookup. The mode
// switch, scheduler waits and shared searches are counted.
module tb_iscoder_cluster;
  import iscoder_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mode_e mode = MODE_MATCHC;
  logic start = 0, busy, done;
  logic in_wr_en = 0, len_wr_en = 0, tbl_wr_en = 0;
  logic [3:0] in_wr_bank = '0, len_wr_bank = '0, tbl_wr_arr = '0, out_rd_bank = '0, cnt_rd_bank = '0;
  logic [11:0] in_wr_addr = '0, out_rd_addr = '0;
  logic [7:0] in_wr_data = '0;
  logic [POS_W-1:0] len_wr_val = '0, cnt_rd_data;
  logic [10:0] tbl_wr_row = '0;
  logic [511:0] tbl_wr_data = '0;
  logic [15:0] out_rd_data;
  logic [POS_W:0] l_written;

  iscoder_cluster dut (.*);

  `include "iscoder_tb_model.svh"

  int checks = 0, failures = 0;
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic put_sym(int b, int a, logic [7:0] v);
    in_wr_en = 1; in_wr_bank = 4'(b); in_wr_addr = 12'(a); in_wr_data = v;
    @(negedge clk);
    in_wr_en = 0;
  endtask

  task automatic set_len(int b, int n);
    len_wr_en = 1; len_wr_bank = 4'(b); len_wr_val = POS_W'(n);
    @(negedge clk);
    len_wr_en = 0;
  endtask

  task automatic read_out(int b, int a, output logic [15:0] v);
    out_rd_bank = 4'(b); out_rd_addr = 12'(a);
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

  int n_wait = 0, n_shared = 0;
  always @(posedge clk) if (mode == MODE_LUTC) begin
    for (int a = 0; a < 16; a++) if (dut.sch_valid[a] && $countones(dut.sch_req[a].mask) > 1) n_shared++;
    if (dut.sch_busy && dut.lc_load == 1'b0 && $countones(dut.u_sched.pend_q & ~dut.u_sched.grant) != 0) n_wait++;
  end

  initial begin
    int cyc, lens [16], ml [], mp [], nres;
    logic [15:0] v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---------------- MatchC ----------------
    for (int b = 0; b < 16; b++) begin
      lens[b] = (b == 5) ? 200 : 300 + 60 * b;
      gen_block(b * 7 + 1, lens[b]);
      for (int k = 0; k < lens[b]; k++) put_sym(b, k, blk[k]);
      set_len(b, lens[b]);
    end
    run(cyc);
    for (int b = 0; b < 16; b++) begin
      gen_block(b * 7 + 1, lens[b]);
      matchc_model(lens[b], WIN, COLS, ml, mp, nres);
      cnt_rd_bank = 4'(b);
      #1;
      chk(int'(cnt_rd_data) == nres, "MatchC result count");
      for (int r = 0; r < nres; r++) begin
        read_out(b, r, v);
        chk(v == {8'(ml[r]), 8'(mp[r])}, "MatchC result");
      end
    end
    $display("MatchC: 16 blocks coded in %0d cycles", cyc);
    // ---------------- LutC ----------------
    mode = MODE_LUTC;
    for (int a = 0; a < 16; a++)
      for (int r = 0; r < 2048; r++) begin
        tbl_wr_en = 1; tbl_wr_arr = 4'(a); tbl_wr_row = 11'(r); tbl_wr_data = lut_row(a, r);
        @(negedge clk);
      end
    tbl_wr_en = 0;
    gen_qs(3, 700);
    for (int k = 0; k < 700; k++) put_sym(0, k, blk[k]);
    set_len(0, 700);
    run(cyc);
    chk(int'(l_written) == 700, "LutC word count");
    for (int k = 0; k < 700; k++) begin
      read_out(k % 16, k / 16, v);
      if (k < 2) chk(v == 16'(blk[k]), "LutC head symbol");
      else       chk(v == 16'(lut_find(int'(blk[k-2]), int'(blk[k-1]), int'(blk[k]))), "LutC position");
    end
    $display("LutC: 698 tuples coded in %0d cycles, waits=%0d shared=%0d", cyc, n_wait, n_shared);
    chk(n_wait > 0 && n_shared > 0, "scheduler waits and shared searches occurred");
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
