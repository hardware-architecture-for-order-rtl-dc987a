// tb_guard_shift_register: shifts random samples with random stalls
// through the 9-cell guard / CUT line (8 guard cells) and checks every
// tap, the CUT (the middle cell, 5 insertions old) and the output (9
// insertions old) against a reference delay line.
module tb_guard_shift_register;

  localparam int W = 12, M = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         rst, en;
  logic [W-1:0] d, cut, q_out;
  logic [W-1:0] taps [M+1];

  guard_shift_register #(.DATA_W(W), .M(M)) dut (
    .clk, .rst, .en, .d, .taps, .cut, .q_out
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int q[$];
    rst = 1; en = 0; d = 0;
    @(posedge clk); #1 rst = 0;
    for (int j = 0; j <= M; j++) q.push_back(0);
    for (int n = 0; n < 1000; n++) begin
      en = ($urandom_range(0, 3) != 0);
      d  = W'($urandom);
      @(posedge clk); #1;
      if (en) begin
        q.push_front(int'(d));
        void'(q.pop_back());
      end
      for (int j = 0; j <= M; j++) chk(taps[j] == W'(q[j]), $sformatf("tap %0d", j));
      chk(cut == W'(q[M/2]), "CUT is the middle cell");
      chk(q_out == W'(q[M]), "output is the last cell");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
