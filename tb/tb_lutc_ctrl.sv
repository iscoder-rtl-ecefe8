// tb_lutc_ctrl: the LutC batch controller with the real N-tuple scheduler.
// A block of quality-score-like symbols is served from a model of the
// scratchpad window port. Checks: the two head symbols are passed through;
// every symbol k >= 2 is issued exactly once, to the array and slot of
// (sym[k-2], sym[k-1]) with lane sym[k-1] % 16 and symbol sym[k]; done comes
// after all results have been counted. Block lengths that are and are not a
// multiple of the batch size are both run.
module tb_lutc_ctrl;
  import iscoder_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, load, sched_busy, h_en, busy, done;
  logic [POS_W-1:0] n_syms, rd_off, base;
  logic [255:0][7:0] rd_win;
  tuple_t [15:0] tuples;
  logic [15:0] tvalid, req_valid;
  lut_req_t [15:0] req;
  logic [6:0] h_sym0, h_sym1;
  logic [POS_W:0] l_written = '0;
  logic [7:0] blk [1000];
  int issued [1000];
  int checks = 0, failures = 0;

  lutc_ctrl dut (.*);
  tuple_scheduler u_sched (.clk, .rst_n, .load, .tuples, .tvalid, .base, .busy(sched_busy),
                           .req_valid, .req);

  always_comb
    for (int k = 0; k < 256; k++) rd_win[k] = (int'(rd_off) + k < 1000) ? blk[int'(rd_off) + k] : 8'h0;

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

  // result counting stands in for the result selector
  always @(posedge clk) begin
    int c;
    c = 0;
    if (h_en) begin
      c += 2;
      chk(h_sym0 == blk[0][6:0] && h_sym1 == blk[1][6:0], "head symbols");
    end
    for (int a = 0; a < 16; a++) if (req_valid[a])
      for (int n = 0; n < 16; n++) if (req[a].mask[n]) begin
        int k, r;
        k = int'(req[a].base) + n;
        r = remap(int'(blk[k-2][6:0]));
        issued[k]++;
        c++;
        chk(a == r / 8, "array");
        chk(int'(req[a].slot) == (r % 8) * 8 + int'(blk[k-1][6:0]) / 16, "slot");
        chk(req[a].sym == blk[k][6:0] && req[a].lane[n] == blk[k-1][3:0], "sym/lane");
      end
    l_written <= l_written + (POS_W+1)'(c);
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 1000; k++) blk[k] = 8'(($urandom_range(0, 3) == 0) ? $urandom_range(0, 127) : $urandom_range(30, 41));
    foreach (n_syms_list[i]) begin
      for (int k = 0; k < 1000; k++) issued[k] = 0;
      l_written = '0;
      n_syms = POS_W'(n_syms_list[i]);
      start = 1;
      @(negedge clk);
      start = 0;
      wait (done);
      @(negedge clk);
      for (int k = 2; k < 1000; k++) chk(issued[k] == ((k < n_syms_list[i]) ? 1 : 0), "issued once");
      chk(!busy, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int n_syms_list [3] = '{998, 354, 50};

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
