// tb_cfar_configs: runs the CFAR detector at the sizes of its resource
// study: 8, 16, 32 and 64 reference cells with 8 guard cells and 12-bit
// data, and 64 reference cells with 14-bit data, plus a 16-cell build with
// 2 guard cells. Each size is checked every cycle against a reference
// model; each must exercise all six detectors and produce both target and
// no-target decisions.
module tb_cfar_configs;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NS = 6;
  logic       done [NS];
  int         c [NS], f [NS], d1 [NS], d0 [NS];
  logic [5:0] seen [NS];

  cfar_size_check #(.NREF(8),  .MG(8), .W(12)) k0 (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]), .modes_seen(seen[0]), .n_det1(d1[0]), .n_det0(d0[0]));
  cfar_size_check #(.NREF(16), .MG(8), .W(12)) k1 (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]), .modes_seen(seen[1]), .n_det1(d1[1]), .n_det0(d0[1]));
  cfar_size_check #(.NREF(32), .MG(8), .W(12)) k2 (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]), .modes_seen(seen[2]), .n_det1(d1[2]), .n_det0(d0[2]));
  cfar_size_check #(.NREF(64), .MG(8), .W(12)) k3 (.clk, .done(done[3]), .checks(c[3]), .failures(f[3]), .modes_seen(seen[3]), .n_det1(d1[3]), .n_det0(d0[3]));
  cfar_size_check #(.NREF(64), .MG(8), .W(14)) k4 (.clk, .done(done[4]), .checks(c[4]), .failures(f[4]), .modes_seen(seen[4]), .n_det1(d1[4]), .n_det0(d0[4]));
  cfar_size_check #(.NREF(16), .MG(2), .W(12)) k5 (.clk, .done(done[5]), .checks(c[5]), .failures(f[5]), .modes_seen(seen[5]), .n_det1(d1[5]), .n_det0(d0[5]));

  int checks, failures;

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < NS; i++) begin checks += c[i]; failures += f[i]; end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    report();
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < NS; i++) all &= done[i];
    end while (!all);
    report();
    for (int i = 0; i < NS; i++) begin
      $display("size %0d: detectors seen %b, targets %0d, no-targets %0d", i, seen[i], d1[i], d0[i]);
      checks++;
      if (seen[i] != 6'b111111 || d1[i] == 0 || d0[i] == 0) begin
        failures++;
        $display("FAIL: size %0d did not exercise every detector and both decisions", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
