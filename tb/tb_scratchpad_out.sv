// tb_scratchpad_out: simultaneous writes to random subsets of the banks, then
// reads of every written word with the one-cycle read latency.
module tb_scratchpad_out;
  localparam int unsigned BANKS = 16, DEPTH = 4096;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [BANKS-1:0] wr_en = '0;
  logic [BANKS-1:0][11:0] wr_addr;
  logic [BANKS-1:0][15:0] wr_data;
  logic [3:0] rd_bank = '0;
  logic [11:0] rd_addr = '0;
  logic [15:0] rd_data;
  logic [15:0] model [BANKS][256];
  bit written [BANKS][256];
  int checks = 0, failures = 0;

  scratchpad_out #(.BANKS(BANKS), .DEPTH(DEPTH)) dut (.*);

  initial begin
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      for (int b = 0; b < int'(BANKS); b++) begin
        wr_en[b]   = ($urandom_range(0, 1) == 1);
        wr_addr[b] = 12'($urandom_range(0, 255));
        wr_data[b] = 16'($urandom);
        if (wr_en[b]) begin model[b][wr_addr[b]] = wr_data[b]; written[b][wr_addr[b]] = 1; end
      end
    end
    @(negedge clk);
    wr_en = '0;
    for (int b = 0; b < int'(BANKS); b++)
      for (int a = 0; a < 256; a++) if (written[b][a]) begin
        rd_bank = 4'(b); rd_addr = 12'(a);
        @(negedge clk);
        checks++;
        if (rd_data != model[b][a]) begin failures++; $display("bank %0d addr %0d", b, a); end
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
