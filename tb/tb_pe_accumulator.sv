// tb_pe_accumulator: feeds a 16-deep window with random 12-bit samples
// (random stalls included), keeps its own FIFO of the window, and checks
// after every edge that the sum equals the window total and the average
// equals the total divided by 16, truncated.
module tb_pe_accumulator;

  localparam int W = 12, N = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         rst, en;
  logic [W-1:0] newest, oldest;
  logic [15:0]  sum;
  logic [W-1:0] avg;

  pe_accumulator #(.DATA_W(W), .N(N)) dut (
    .clk, .rst, .en, .newest, .oldest, .sum_q(sum), .avg
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
    int total;
    rst = 1; en = 0; newest = 0; oldest = 0;
    @(posedge clk); #1 rst = 0;
    for (int j = 0; j < N; j++) q.push_back(0);
    for (int n = 0; n < 2000; n++) begin
      en     = ($urandom_range(0, 4) != 0);
      newest = W'($urandom);
      oldest = W'(q[N-1]);
      @(posedge clk); #1;
      if (en) begin
        q.push_front(int'(newest));
        void'(q.pop_back());
      end
      total = 0;
      foreach (q[j]) total += q[j];
      chk(sum == 16'(total), $sformatf("sum %0d exp %0d", sum, total));
      chk(avg == W'(total / N), $sformatf("avg %0d exp %0d", avg, total / N));
    end
    rst = 1; @(posedge clk); #1 rst = 0;
    chk(sum == 0, "reset clears the sum");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
