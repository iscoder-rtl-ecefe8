// tb_findpos_tree: the 128-entry tree and a 512-entry tree against a linear
// search for the highest set bit, on sparse and dense random vectors and on
// the all-zero vector (valid = 0).
module tb_findpos_tree;
  logic [127:0] v1;
  logic [6:0]   p1;
  logic         ok1;
  logic [511:0] v2;
  logic [8:0]   p2;
  logic         ok2;
  int checks = 0, failures = 0;

  findpos_tree #(.W(128)) dut1 (.vec(v1), .pos(p1), .valid(ok1));
  findpos_tree #(.W(512)) dut2 (.vec(v2), .pos(p2), .valid(ok2));

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int e1, e2, nb;
      v1 = '0; v2 = '0;
      nb = (t % 4 == 0) ? 0 : (t % 4 == 1) ? 1 : $urandom_range(1, 40);
      for (int k = 0; k < nb; k++) begin
        v1[$urandom_range(0, 127)] = 1'b1;
        v2[$urandom_range(0, 511)] = 1'b1;
      end
      #1;
      e1 = -1; e2 = -1;
      for (int k = 0; k < 128; k++) if (v1[k]) e1 = k;
      for (int k = 0; k < 512; k++) if (v2[k]) e2 = k;
      checks += 2;
      if (ok1 != (e1 >= 0) || (e1 >= 0 && int'(p1) != e1)) begin
        failures++; $display("128: vec=%h got %0d/%b expected %0d", v1, p1, ok1, e1);
      end
      if (ok2 != (e2 >= 0) || (e2 >= 0 && int'(p2) != e2)) begin
        failures++; $display("512: got %0d/%b expected %0d", p2, ok2, e2);
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
