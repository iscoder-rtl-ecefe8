// tb_tuple_scheduler: the N-tuple scheduler against a cycle-by-cycle model.
// First the four-tuple example of the scheduler description: (31,35,35) goes
// to array 3, (35,35,37) and (35,37,37) share one search of array 7 in the
// first cycle and (35,35,35) waits for the second. Then random batches whose
// addr1 values cluster around the hot contexts, so that tuples collide on an
// array (and wait) and share searches. Every cycle the model picks, per
// array, the largest group of pending tuples with equal remapped addr1,
// addr2/16 and sym (ties to the earliest tuple); the requests must agree.
module tb_tuple_scheduler;
  import iscoder_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load = 0, busy;
  tuple_t [15:0] tuples;
  logic [15:0] tvalid;
  logic [POS_W-1:0] base = '0;
  logic [15:0] req_valid;
  lut_req_t [15:0] req;
  int checks = 0, failures = 0, n_wait = 0, n_shared = 0;

  tuple_scheduler dut (.*);

  function automatic int remap(int a);
    if (a >= 28 && a <= 43) return (a - 28) * 8;
    if (a == 96) return 33;
    if (a % 8 == 0) return a / 8 + 28;
    return a;
  endfunction

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // run one batch, comparing with the model; returns the cycles it took
  task automatic run_batch(output int cyc);
    bit pend [16];
    int key [16];
    for (int n = 0; n < 16; n++) begin
      pend[n] = tvalid[n];
      key[n]  = (remap(int'(tuples[n].addr1)) << 10) | (int'(tuples[n].addr2) / 16 << 7) | int'(tuples[n].sym);
    end
    load = 1;
    @(negedge clk);
    load = 0;
    cyc = 0;
    while (1) begin
      bit any;
      any = 0;
      for (int n = 0; n < 16; n++) any |= pend[n];
      chk(busy == any, "busy");
      if (!any) break;
      cyc++;
      for (int a = 0; a < 16; a++) begin
        int win, best, cnt;
        bit [15:0] m;
        win = -1; best = 0; m = '0;
        for (int n = 0; n < 16; n++) if (pend[n] && key[n] >> 13 == a) begin
          cnt = 0;
          for (int k = 0; k < 16; k++) if (pend[k] && key[k] == key[n]) cnt++;
          if (cnt > best) begin best = cnt; win = n; end
        end
        chk(req_valid[a] == (win >= 0), "req_valid");
        if (win >= 0) begin
          for (int n = 0; n < 16; n++) if (pend[n] && key[n] == key[win]) m[n] = 1;
          chk(req[a].mask == m, "mask");
          chk(req[a].sym == tuples[win].sym, "sym");
          chk(int'(req[a].slot) == (remap(int'(tuples[win].addr1)) % 8) * 8 + int'(tuples[win].addr2) / 16, "slot");
          chk(req[a].base == base, "base");
          for (int n = 0; n < 16; n++) if (m[n]) begin
            chk(req[a].lane[n] == tuples[n].addr2[3:0], "lane");
            pend[n] = 0;
          end
          if (best > 1) n_shared++;
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // example of the description (N = 4 of 16 slots used)
    tuples = '0; tvalid = 16'h000f;
    tuples[0] = '{addr1: 7'd31, addr2: 7'd35, sym: 7'd35};
    tuples[1] = '{addr1: 7'd35, addr2: 7'd35, sym: 7'd35};
    tuples[2] = '{addr1: 7'd35, addr2: 7'd35, sym: 7'd37};
    tuples[3] = '{addr1: 7'd35, addr2: 7'd37, sym: 7'd37};
    load = 1;
    @(negedge clk);
    load = 0;
    chk(req_valid == 16'h0088, "example: arrays 3 and 7 in cycle 1");
    chk(req[3].mask == 16'h0001 && req[7].mask == 16'h000c, "example: grouping in cycle 1");
    @(negedge clk);
    chk(req_valid == 16'h0080 && req[7].mask == 16'h0002, "example: (35,35,35) in cycle 2");
    @(negedge clk);
    chk(!busy, "example: done after two cycles");
    // random batches
    for (int b = 0; b < 300; b++) begin
      for (int n = 0; n < 16; n++) begin
        tuples[n].addr1 = ($urandom_range(0, 3) == 0) ? 7'($urandom) : 7'($urandom_range(30, 40));
        tuples[n].addr2 = ($urandom_range(0, 1) == 0) ? 7'($urandom_range(32, 47)) : 7'($urandom);
        tuples[n].sym   = 7'($urandom_range(34, 37));
        tvalid[n]       = (b % 10 != 9) || (n < 7);
      end
      base = POS_W'(2 + 16 * b);
      run_batch(cyc);
      if (cyc > 1) n_wait++;
    end
    chk(n_wait > 0 && n_shared > 0, "collisions and shared searches occurred");
    $display("batches that waited=%0d shared searches=%0d", n_wait, n_shared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
