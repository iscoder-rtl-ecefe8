// tb_result_selector: MatchC results from random accelerators must land in
// their own bank at consecutive addresses as {length, pointer}; LutC results
// of random batches, split over random arrays, must land at bank k%16,
// address k/16 with the position of the tuple's lane and the miss flag; the
// pass-through head symbols go to positions 0 and 1; the counters must agree.
module tb_result_selector;
  import iscoder_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  mode_e mode = MODE_MATCHC;
  logic clear = 0;
  logic [15:0] m_valid = '0;
  match_res_t [15:0] m_res;
  logic [15:0] l_valid = '0;
  lut_req_t [15:0] l_tag;
  logic [15:0][15:0] l_hit;
  logic [15:0][15:0][6:0] l_pos;
  logic h_en = 0;
  logic [6:0] h_sym0 = '0, h_sym1 = '0;
  logic [15:0] wr_en;
  logic [15:0][11:0] wr_addr;
  logic [15:0][15:0] wr_data;
  logic [15:0][POS_W-1:0] m_count;
  logic [POS_W:0] l_written;
  int checks = 0, failures = 0;
  int cnt [16];
  int nl;

  result_selector dut (.*);

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    l_tag = '0; l_hit = '0; l_pos = '0; m_res = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    clear = 1; @(negedge clk); clear = 0;
    for (int t = 0; t < 300; t++) begin
      for (int a = 0; a < 16; a++) begin
        m_valid[a] = ($urandom_range(0, 2) == 0);
        m_res[a]   = match_res_t'(16'($urandom));
      end
      #1;
      for (int a = 0; a < 16; a++) begin
        chk(wr_en[a] == m_valid[a], "matchc wr_en");
        if (m_valid[a]) begin
          chk(int'(wr_addr[a]) == cnt[a] && wr_data[a] == m_res[a], "matchc word");
          cnt[a]++;
        end
      end
      @(negedge clk);
    end
    m_valid = '0;
    for (int a = 0; a < 16; a++) chk(int'(m_count[a]) == cnt[a], "m_count");
    // LutC
    mode = MODE_LUTC;
    clear = 1; @(negedge clk); clear = 0;
    h_en = 1; h_sym0 = 7'd33; h_sym1 = 7'd90;
    #1;
    chk(wr_en == 16'h0003 && wr_addr[0] == 0 && wr_addr[1] == 0 &&
        wr_data[0] == 16'd33 && wr_data[1] == 16'd90, "head symbols");
    @(negedge clk);
    h_en = 0;
    nl = 2;
    for (int b = 0; b < 100; b++) begin
      int owner [16];
      l_valid = '0; l_tag = '0;
      for (int n = 0; n < 16; n++) begin
        owner[n] = $urandom_range(0, 15);
        l_valid[owner[n]] = 1;
        l_tag[owner[n]].mask[n] = 1;
      end
      for (int a = 0; a < 16; a++) begin
        l_tag[a].base = POS_W'(2 + 16 * b);
        for (int n = 0; n < 16; n++) l_tag[a].lane[n] = 4'($urandom);
        for (int l = 0; l < 16; l++) begin l_hit[a][l] = ($urandom_range(0, 9) != 0); l_pos[a][l] = 7'($urandom); end
      end
      #1;
      chk(wr_en == 16'hffff, "all banks written");
      for (int n = 0; n < 16; n++) begin
        int k, a, l;
        k = 2 + 16 * b + n; a = owner[n]; l = int'(l_tag[a].lane[n]);
        chk(int'(wr_addr[k % 16]) == k / 16, "lutc address");
        chk(wr_data[k % 16] == {~l_hit[a][l], 8'b0, l_pos[a][l]}, "lutc word");
      end
      nl += 16;
      @(negedge clk);
    end
    l_valid = '0;
    chk(int'(l_written) == nl, "l_written");
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
