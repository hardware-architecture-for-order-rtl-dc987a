// tb_priority_decoder: checks SelOldest for every thermometer chain of a
// 16-cell array (ones from cell 0 up to the oldest cell), for random
// patterns (highest set bit wins) and for the all-zero input.
module tb_priority_decoder;

  localparam int LEN = 16;
  int checks = 0, failures = 0;

  logic [LEN-1:0] chain;
  logic [3:0]     sel;
  logic           valid;

  priority_decoder #(.LEN(LEN)) dut (.chain, .sel_oldest(sel), .valid);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < LEN; j++) begin
      chain = LEN'((32'd1 << (j + 1)) - 1);
      #1 chk(valid && sel == 4'(j), $sformatf("thermometer to %0d gave %0d", j, sel));
    end
    for (int n = 0; n < 200; n++) begin
      int hi;
      chain = LEN'($urandom);
      hi = -1;
      for (int j = 0; j < LEN; j++) if (chain[j]) hi = j;
      #1;
      if (hi < 0) chk(!valid, "empty chain flagged");
      else        chk(valid && sel == 4'(hi), $sformatf("chain %b gave %0d", chain, sel));
    end
    chain = '0;
    #1 chk(!valid && sel == 0, "all-zero chain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
