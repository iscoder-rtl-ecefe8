// tb_addr1_remap: the remap must be a permutation of 0..127, put the 16 hot
// contexts 28..43 into 16 different arrays (as block 0 of each), leave the
// ordinary contexts where they were, and reproduce the assignments of the
// scheduler example (addr1 31 -> array 3, addr1 35 -> array 7).
module tb_addr1_remap;
  logic [6:0] old_id, new_id;
  logic [3:0] array_id;
  logic [2:0] block_id;
  int checks = 0, failures = 0;
  bit seen [128];
  bit arr_hot [16];

  addr1_remap dut (.old_id, .new_id, .array_id, .block_id);

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (old=%0d new=%0d)", what, old_id, new_id); end
  endtask

  initial begin
    for (int k = 0; k < 128; k++) begin
      old_id = 7'(k);
      #1;
      chk(!seen[new_id], "new id used twice");
      seen[new_id] = 1;
      chk(int'(array_id) == int'(new_id) / 8 && int'(block_id) == int'(new_id) % 8, "array/block split");
      if (k >= 28 && k <= 43) begin
        chk(!arr_hot[array_id], "two hot contexts in one array");
        arr_hot[array_id] = 1;
        chk(block_id == 3'd0, "hot context not in block 0");
      end else if (k % 8 != 0) begin
        chk(new_id == old_id, "ordinary context moved");
      end
      if (k == 31) chk(array_id == 4'd3, "addr1 31 goes to array 3");
      if (k == 35) chk(array_id == 4'd7, "addr1 35 goes to array 7");
      if (k == 0)  chk(new_id == 7'd28, "addr1 0 goes to slot 28");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
