// tb_word_mux: fills the 16 inputs with random words and checks every
// select value, including selects past the end on a 12-input instance.
module tb_word_mux;

  int checks = 0, failures = 0;

  logic [11:0] d16 [16];
  logic [3:0]  s16;
  logic [11:0] y16;
  logic [11:0] d12 [12];
  logic [3:0]  s12;
  logic [11:0] y12;

  word_mux #(.N(16), .W(12)) dut16 (.d(d16), .sel(s16), .y(y16));
  word_mux #(.N(12), .W(12)) dut12 (.d(d12), .sel(s12), .y(y12));

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
    for (int r = 0; r < 20; r++) begin
      foreach (d16[i]) d16[i] = 12'($urandom);
      foreach (d12[i]) d12[i] = 12'($urandom);
      for (int s = 0; s < 16; s++) begin
        s16 = 4'(s); s12 = 4'(s);
        #1;
        chk(y16 == d16[s], $sformatf("16-input sel %0d", s));
        chk(y12 == ((s < 12) ? d12[s] : 12'd0), $sformatf("12-input sel %0d", s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
