// tb_sync_fifo: random pushes and pops against a queue model, checking the
// head data, empty and full, and that a push into a full FIFO is dropped.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, empty, full;
  logic [15:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0, n_full = 0;
  logic [15:0] q [$];

  sync_fifo #(.WIDTH(16), .DEPTH(4)) dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      push    = ($urandom_range(0, 2) != 0) && !full;
      pop     = ($urandom_range(0, 2) == 0);
      wr_data = 16'($urandom);
      #1;
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == 4)) begin
        failures++; $display("flags: empty=%b full=%b size=%0d", empty, full, q.size());
      end
      if (full) n_full++;
      if (!empty) begin
        checks++;
        if (rd_data != q[0]) begin failures++; $display("head %h expected %h", rd_data, q[0]); end
      end
      @(negedge clk);
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push && q.size() < 4 + (pop ? 1 : 0)) q.push_back(wr_data);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("never full"); end
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
