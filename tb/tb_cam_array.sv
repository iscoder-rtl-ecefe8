// tb_cam_array: fills the 2048x512 array with row writes, overwrites some
// columns with column writes, and compares both search directions with a
// model of the array: a column (row) matches when it agrees with every driven
// line, BL demanding a 1 and BLB a 0. Drive patterns range from one 8-line
// symbol group to random sparse patterns.
module tb_cam_array;
  localparam int unsigned ROWS = 2048, COLS = 512;
  logic clk = 0;
  always #5 clk = ~clk;

  logic row_wr_en = 0, col_wr_en = 0;
  logic [10:0] row_wr_addr;
  logic [COLS-1:0] row_wr_data;
  logic [8:0] col_wr_addr;
  logic [ROWS-1:0] col_wr_data;
  logic [ROWS-1:0] row_bl = '0, row_blb = '0, row_match;
  logic [COLS-1:0] col_bl = '0, col_blb = '0, col_match;
  logic [COLS-1:0] model [ROWS];
  int checks = 0, failures = 0;

  cam_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  initial begin
    for (int r = 0; r < int'(ROWS); r++) begin
      for (int w = 0; w < int'(COLS) / 32; w++) model[r][w*32 +: 32] = $urandom;
      @(negedge clk);
      row_wr_en = 1; row_wr_addr = 11'(r); row_wr_data = model[r];
    end
    @(negedge clk) row_wr_en = 0;
    for (int t = 0; t < 40; t++) begin
      int c;
      c = $urandom_range(0, COLS - 1);
      for (int w = 0; w < int'(ROWS) / 32; w++) col_wr_data[w*32 +: 32] = $urandom;
      for (int r = 0; r < int'(ROWS); r++) model[r][c] = col_wr_data[r];
      col_wr_en = 1; col_wr_addr = 9'(c);
      @(negedge clk);
    end
    col_wr_en = 0;
    for (int t = 0; t < 200; t++) begin
      logic [COLS-1:0] ec;
      logic [ROWS-1:0] er;
      row_bl = '0; row_blb = '0; col_bl = '0; col_blb = '0;
      if (t % 2 == 0) begin
        // 8-line symbol group copied from a stored column so it matches at least once
        int g, c;
        g = $urandom_range(0, ROWS / 8 - 1); c = $urandom_range(0, COLS - 1);
        for (int k = 0; k < 8; k++) begin
          row_bl[g*8+k] = model[g*8+k][c]; row_blb[g*8+k] = !model[g*8+k][c];
        end
        g = $urandom_range(0, COLS / 8 - 1); c = $urandom_range(0, ROWS - 1);
        for (int k = 0; k < 8; k++) begin
          col_bl[g*8+k] = model[c][g*8+k]; col_blb[g*8+k] = !model[c][g*8+k];
        end
      end else begin
        for (int k = 0; k < 3; k++) begin
          int r;
          r = $urandom_range(0, ROWS - 1);
          if ($urandom_range(0, 1) == 1) row_bl[r] = 1; else row_blb[r] = 1;
          r = $urandom_range(0, COLS - 1);
          if ($urandom_range(0, 1) == 1) col_bl[r] = 1; else col_blb[r] = 1;
        end
      end
      #1;
      ec = '1;
      for (int r = 0; r < int'(ROWS); r++)
        for (int c = 0; c < int'(COLS); c++)
          if ((row_bl[r] && !model[r][c]) || (row_blb[r] && model[r][c])) ec[c] = 0;
      for (int r = 0; r < int'(ROWS); r++) begin
        er[r] = 1;
        for (int c = 0; c < int'(COLS); c++)
          if ((col_bl[c] && !model[r][c]) || (col_blb[c] && model[r][c])) er[r] = 0;
      end
      checks += 2;
      if (col_match !== ec) begin failures++; $display("t=%0d column match differs", t); end
      if (row_match !== er) begin failures++; $display("t=%0d row match differs", t); end
      if (t % 2 == 0) begin
        checks++;
        if (col_match == '0 || row_match == '0) begin failures++; $display("t=%0d no match", t); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
