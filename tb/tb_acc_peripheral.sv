// tb_acc_peripheral: drives the column match lines directly.
// MatchC side: iterations of random length in which a random set of columns
// keeps matching; checks hit, the running length, the pointer (rightmost
// surviving column inside the mask) and the mask after init and shifts.
// LutC side: one-hot (or empty) lanes of the row results; checks lut_hit and
// lut_pos one cycle after lut_en.
module tb_acc_peripheral;
  localparam int unsigned COLS = 512, WIN = 256, ROWS = 2048, LSIZE = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [COLS-1:0] col_match = '0;
  logic search_en = 0, iter_first = 0, mask_init = 0, mask_shift = 0, lut_en = 0;
  logic [9:0] shift_amt = '0;
  logic hit, lut_valid;
  logic [8:0] cur_pos, len, ptr_abs;
  logic [ROWS-1:0] row_match = '0;
  logic [15:0] lut_hit;
  logic [15:0][6:0] lut_pos;
  int checks = 0, failures = 0;

  acc_peripheral #(.COLS(COLS), .WIN(WIN), .ROWS(ROWS), .LSIZE(LSIZE)) dut (.*);

  logic [COLS-1:0] m_mask, m_acc;
  int m_len, m_ptr;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    mask_init = 1;
    @(negedge clk);
    mask_init = 0;
    m_mask = {{(COLS-WIN){1'b0}}, {WIN{1'b1}}};
    for (int it = 0; it < 150; it++) begin
      int L;
      logic [COLS-1:0] alive;
      L = $urandom_range(0, 6);
      alive = '0;
      for (int k = 0; k < 6; k++) alive[$urandom_range(0, COLS - 1)] = 1'b1;
      alive[$urandom_range(0, COLS - 1)] = 1'b1;
      m_len = 0; m_ptr = 0;
      for (int r = 0; r <= L; r++) begin
        logic [COLS-1:0] noise;
        for (int w = 0; w < int'(COLS) / 32; w++) noise[w*32 +: 32] = $urandom;
        // columns in 'alive' match for the first L cycles; other columns random
        col_match  = (r < L) ? (alive | noise) : noise & ~alive;
        if (r == L) col_match = col_match & ~(m_acc & m_mask);   // guarantee the end
        search_en  = 1;
        iter_first = (r == 0);
        m_acc      = (r == 0) ? col_match : (m_acc & col_match);
        #1;
        chk(hit == |(m_acc & m_mask), "hit");
        chk(int'(len) == m_len && int'(ptr_abs) == m_ptr, "len/ptr before edge");
        if (|(m_acc & m_mask)) begin
          for (int c = 0; c < int'(COLS); c++) if (m_acc[c] & m_mask[c]) m_ptr = c;
          chk(int'(cur_pos) == m_ptr, "FindPos");
          m_len++;
        end
        if (!hit) begin
          // end of iteration: shift the mask by max(len,1) unless it would run out
          int adv;
          adv = (m_len == 0) ? 1 : m_len;
          if ($urandom_range(0, 3) != 0) begin
            mask_shift = 1; shift_amt = 10'(adv);
            m_mask = m_mask << adv;
            if (m_mask == '0) begin mask_shift = 0; mask_init = 1; m_mask = {{(COLS-WIN){1'b0}}, {WIN{1'b1}}}; end
          end
        end
        @(negedge clk);
        mask_shift = 0; mask_init = 0;
        if (!hit) break;
      end
      search_en = 0;
      chk(dut.mask_q == m_mask, "mask");
    end
    // LutC lanes
    for (int t = 0; t < 100; t++) begin
      int ep [16];
      row_match = '0;
      for (int l = 0; l < 16; l++) begin
        ep[l] = ($urandom_range(0, 4) == 0) ? -1 : $urandom_range(0, LSIZE - 1);
        if (ep[l] >= 0) row_match[l*LSIZE + ep[l]] = 1'b1;
      end
      lut_en = 1;
      @(negedge clk);
      lut_en = 0;
      row_match = '1;       // must not disturb the registered result
      chk(lut_valid == 1'b1, "lut_valid");
      for (int l = 0; l < 16; l++) begin
        chk(lut_hit[l] == (ep[l] >= 0), "lut_hit");
        if (ep[l] >= 0) chk(int'(lut_pos[l]) == ep[l], "lut_pos");
      end
      @(negedge clk);
      chk(lut_valid == 1'b0, "lut_valid drops");
    end
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
