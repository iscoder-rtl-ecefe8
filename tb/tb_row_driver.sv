// tb_row_driver: checks the drive code of every line for random addresses and
// symbols: 10 for a 1 bit, 01 for a 0 bit on the addressed group (first line =
// most significant bit), 00 elsewhere and everywhere when disabled.
module tb_row_driver;
  localparam int unsigned GROUPS = 256, W = 8;
  logic en;
  logic [7:0] addr;
  logic [W-1:0] sym;
  logic [GROUPS*W-1:0] bl, blb;
  int checks = 0, failures = 0;

  row_driver #(.GROUPS(GROUPS), .W(W)) dut (.en, .addr, .sym, .bl, .blb);

  initial begin
    for (int t = 0; t < 300; t++) begin
      en   = (t % 10 != 9);
      addr = (t == 0) ? 8'd0 : 8'($urandom);
      sym  = (t == 0) ? 8'b00001001 : W'($urandom);
      #1;
      for (int l = 0; l < int'(GROUPS * W); l++) begin
        logic eb, ebb;
        eb  = en && (l / W == int'(addr)) && sym[W - 1 - (l % W)];
        ebb = en && (l / W == int'(addr)) && !sym[W - 1 - (l % W)];
        checks++;
        if (bl[l] !== eb || blb[l] !== ebb) begin
          failures++;
          if (failures < 5) $display("t=%0d line %0d: got %b%b expected %b%b", t, l, bl[l], blb[l], eb, ebb);
        end
      end
      // the published row-driver example: address 0, input 00001001
      if (t == 0) begin
        checks++;
        if ({bl[0], blb[0], bl[4], blb[4], bl[7], blb[7]} != 6'b01_10_10) failures++;
      end
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
