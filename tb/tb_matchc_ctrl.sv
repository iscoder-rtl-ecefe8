// tb_matchc_ctrl: MatchC on one SRAM accelerator, checked against a software
// model of the kernel.
//
// The block is generated from a small alphabet with copied stretches so that
// short matches, long matches, the 255-symbol cap, pass-through (length 0)
// steps, mask shifts and window refreshes all occur. For every emitted result
// the testbench compares (length, pointer) with the model, which scans all
// WSIZE window starts for the longest run (ties to the latest start). It also
// checks the run time: NCOL cycles per window fill plus length+1 cycles per
// iteration.
module tb_matchc_ctrl;
  import iscoder_pkg::*;

  localparam int unsigned WSIZE = 256;
  localparam int unsigned NCOL  = 512;
  localparam int unsigned NS    = 2400;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  logic [7:0] blk [NS];
  logic [POS_W-1:0] rd_off;
  logic [WSIZE-1:0][SYM_W-1:0] rd_win;
  acc_op_e op;
  logic [15:0] addr;
  logic [SYM_W-1:0] sym;
  logic [WSIZE*SYM_W-1:0] col_data;
  logic iter_first, mask_init, mask_shift, hit, res_valid, busy, done, lut_valid;
  logic [9:0] shift_amt;
  logic [8:0] len, cur_pos, ptr_abs;
  match_res_t res;
  logic [15:0] lut_hit;
  logic [15:0][6:0] lut_pos;

  always_comb
    for (int k = 0; k < int'(WSIZE); k++)
      rd_win[k] = (int'(rd_off) + k < int'(NS)) ? blk[int'(rd_off) + k] : 8'h00;

  matchc_ctrl #(.WSIZE(WSIZE), .NCOL(NCOL), .AW(POS_W)) dut (
    .clk, .rst_n, .start, .n_syms(POS_W'(NS)), .rd_off, .rd_win, .op, .addr, .sym,
    .col_data, .iter_first, .mask_init, .mask_shift, .shift_amt, .hit, .len, .ptr_abs,
    .res_valid, .res, .busy, .done
  );

  sram_acc u_acc (
    .clk, .rst_n, .op, .addr, .sym, .row_data('0), .col_data, .iter_first, .mask_init,
    .mask_shift, .shift_amt, .hit, .cur_pos, .len, .ptr_abs, .lut_valid, .lut_hit, .lut_pos
  );

  // reference results
  int ref_len [NS], ref_ptr [NS], n_ref, exp_cycles, n_refresh, n_zero, n_cap, n_shift;

  task automatic build_ref();
    int i, s, bl, bc, l, adv;
    i = WSIZE; s = 0; n_ref = 0; n_refresh = 0; n_zero = 0; n_cap = 0; n_shift = 0;
    exp_cycles = NCOL;
    while (i < int'(NS)) begin
      bl = 0; bc = 0;
      for (int c = 0; c < int'(WSIZE); c++) begin
        l = 0;
        while (l < int'(WSIZE) - 1 && i + l < int'(NS) && blk[i - int'(WSIZE) + c + l] == blk[i + l]) l++;
        if (l > 0 && l >= bl) begin bl = l; bc = c; end
      end
      ref_len[n_ref] = bl; ref_ptr[n_ref] = bc; n_ref++;
      if (bl == 0) n_zero++;
      if (bl == int'(WSIZE) - 1) n_cap++;
      exp_cycles += bl + 1;
      adv = (bl == 0) ? 1 : bl;
      i += adv;
      if (i < int'(NS)) begin
        s += adv;
        if (s > int'(NCOL - WSIZE)) begin s = 0; n_refresh++; exp_cycles += NCOL; end
        else n_shift++;
      end
    end
  endtask

  int checks = 0, failures = 0, got = 0, cycles = 0;

  always @(posedge clk) if (busy) cycles++;

  always @(posedge clk) if (rst_n && res_valid) begin
    checks++;
    if (got >= n_ref || res.length != 8'(ref_len[got]) || res.pointer != 8'(ref_ptr[got])) begin
      failures++;
      if (failures < 10)
        $display("result %0d: got len=%0d ptr=%0d, expected len=%0d ptr=%0d", got,
                 res.length, res.pointer, ref_len[got], ref_ptr[got]);
    end
    got++;
  end

  initial begin
    // block: random symbols from {A,C,G,T}, with copied runs and a long repeat
    for (int k = 0; k < int'(NS); k++) blk[k] = 8'("ACGT" >> (8 * $urandom_range(0, 3)));
    for (int k = 300; k < 700; k++) blk[k] = blk[k - 1];             // long run -> cap
    for (int k = 900; k < 1000; k++) blk[k] = 8'(k * 37);             // novel symbols -> length 0
    for (int k = 1200; k < 1260; k++) blk[k] = blk[k - 150];          // copied stretch
    build_ref();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    wait (done);
    @(posedge clk);
    checks++;
    if (got != n_ref) begin failures++; $display("results: got %0d expected %0d", got, n_ref); end
    checks++;
    if (cycles != exp_cycles) begin
      failures++;
      $display("cycles: got %0d expected %0d", cycles, exp_cycles);
    end
    checks++;
    if (n_refresh == 0 || n_zero == 0 || n_cap == 0 || n_shift == 0) begin
      failures++;
      $display("mechanism missing: refresh=%0d zero=%0d cap=%0d shift=%0d", n_refresh, n_zero, n_cap, n_shift);
    end
    $display("results=%0d refreshes=%0d zero-length=%0d capped=%0d mask-shifts=%0d cycles=%0d",
             got, n_refresh, n_zero, n_cap, n_shift, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
