// tb_sram_acc: one 128 KB accelerator driven through its command port.
// MatchC part: all 512 columns are written with symbol columns, then byte
// searches on random row groups are compared with a symbol-level model (column
// c matches when its symbol in group R equals the input), including the mask
// of the first 256 columns and FindPos of the rightmost match.
// LutC part: rows are written with the transposed table layout (symbol slot s
// of physical row lane*128+j) and transposed searches must return, one cycle
// later, the position j of the symbol in every lane.
module tb_sram_acc;
  import iscoder_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  acc_op_e op = ACC_NOP;
  logic [15:0] addr = '0;
  logic [7:0] sym = '0;
  logic [511:0] row_data = '0;
  logic [2047:0] col_data = '0;
  logic iter_first = 1, mask_init = 0, mask_shift = 0;
  logic [9:0] shift_amt = '0;
  logic hit, lut_valid;
  logic [8:0] cur_pos, len, ptr_abs;
  logic [15:0] lut_hit;
  logic [15:0][6:0] lut_pos;
  int checks = 0, failures = 0;

  sram_acc dut (.*);

  logic [7:0] colsym [512][256];     // MatchC model: symbol R of column c
  logic [7:0] rowsym [2048][64];     // LutC model: slot s of row r

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 512; c++) begin
      for (int R = 0; R < 256; R++) begin
        colsym[c][R] = 8'($urandom_range(0, 7));
        col_data[R*8 +: 8] = sym_lines(colsym[c][R]);
      end
      op = ACC_WR_COL; addr = 16'(c);
      mask_init = (c == 511);
      @(negedge clk);
    end
    mask_init = 0;
    for (int t = 0; t < 300; t++) begin
      int R, ep;
      logic any;
      R = $urandom_range(0, 255);
      op = ACC_SEARCH_ROW; addr = 16'(R); sym = 8'($urandom_range(0, 7)); iter_first = 1;
      #1;
      any = 0; ep = 0;
      for (int c = 0; c < 256; c++) if (colsym[c][R] == sym) begin any = 1; ep = c; end
      chk(hit == any, "byte search hit");
      if (any) chk(int'(cur_pos) == ep, "byte search FindPos");
      @(negedge clk);
    end
    // LutC: write rows
    for (int r = 0; r < 2048; r++) begin
      for (int s = 0; s < 64; s++) begin
        // row j of lane l holds a permutation of 0..127 per slot
        rowsym[r][s] = 8'(((r % 128) * 5 + s * 3 + (r / 128) * 11) % 128);
        row_data[s*8 +: 8] = sym_lines(rowsym[r][s]);
      end
      op = ACC_WR_ROW; addr = 16'(r);
      @(negedge clk);
    end
    for (int t = 0; t < 200; t++) begin
      int s;
      s = $urandom_range(0, 63);
      op = ACC_SEARCH_COL; addr = 16'(s); sym = 8'($urandom_range(0, 127));
      @(negedge clk);
      op = ACC_NOP;
      chk(lut_valid, "lut_valid");
      for (int l = 0; l < 16; l++) begin
        int ej;
        ej = -1;
        for (int j = 0; j < 128; j++) if (rowsym[l*128 + j][s] == sym) ej = j;
        chk(lut_hit[l] == (ej >= 0), "lut hit");
        if (ej >= 0) chk(int'(lut_pos[l]) == ej, "lut pos");
      end
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
