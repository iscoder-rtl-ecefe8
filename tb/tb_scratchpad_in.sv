// tb_scratchpad_in: writes random symbols into every bank and compares wide
// window reads at random offsets (including ones running past the end of the
// bank, which must read as zeros) with a model.
module tb_scratchpad_in;
  import iscoder_pkg::*;
  localparam int unsigned BANKS = 16, DEPTH = 4096, WSIZE = 256;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0;
  logic [3:0] wr_bank;
  logic [11:0] wr_addr;
  logic [7:0] wr_data;
  logic [BANKS-1:0][POS_W-1:0] rd_off = '0;
  logic [BANKS-1:0][WSIZE-1:0][7:0] rd_win;
  logic [7:0] model [BANKS][DEPTH];
  int checks = 0, failures = 0;

  scratchpad_in #(.BANKS(BANKS), .DEPTH(DEPTH), .WSIZE(WSIZE)) dut (.*);

  initial begin
    for (int b = 0; b < int'(BANKS); b++)
      for (int a = 0; a < int'(DEPTH); a++) begin
        model[b][a] = 8'($urandom);
        @(negedge clk);
        wr_en = 1; wr_bank = 4'(b); wr_addr = 12'(a); wr_data = model[b][a];
      end
    @(negedge clk);
    wr_en = 0;
    for (int t = 0; t < 100; t++) begin
      for (int b = 0; b < int'(BANKS); b++) rd_off[b] = POS_W'($urandom_range(0, DEPTH + 100));
      #1;
      for (int b = 0; b < int'(BANKS); b++)
        for (int k = 0; k < int'(WSIZE); k++) begin
          int a;
          a = int'(rd_off[b]) + k;
          checks++;
          if (rd_win[b][k] != ((a < int'(DEPTH)) ? model[b][a] : 8'h00)) failures++;
        end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
