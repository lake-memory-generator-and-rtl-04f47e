// tb_sync_groups: exhaustive check of the sync-group rule for two ports and
// two groups: a port goes only when it is requested and ready and so is every
// port that shares a group with it; `held` marks a ready port kept back.
module tb_sync_groups;
  logic [1:0][1:0] member;
  logic [1:0] ren, avail, go, held;
  int checks = 0, failures = 0;

  sync_groups #(.PORTS(2), .GROUPS(2)) dut (.member, .ren, .avail, .go, .held);

  initial begin
    logic [1:0] ok, exp_go;
    for (int v = 0; v < 256; v++) begin
      {member, ren, avail} = 8'(v);
      #1;
      ok = ren & avail;
      // shared group <=> the two member masks overlap
      if ((member[0] & member[1]) != 2'b00) exp_go = (ok == 2'b11) ? 2'b11 : 2'b00;
      else                                  exp_go = ok;
      checks++;
      if (go != exp_go || held != (ok & ~exp_go)) begin
        failures++;
        $display("FAIL member=%b ren=%b avail=%b go=%b exp %b", member, ren, avail, go, exp_go);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
