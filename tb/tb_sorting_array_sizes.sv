// tb_sorting_array_sizes: runs the FIFO insertion sorter at the array
// lengths and word sizes of its scalability study: 8, 16, 32, 64, 128 and
// 256 cells with 8- to 24-bit words (a selection of the grid, including
// both corners), plus a 49-cell array of 8-bit words. Each size is checked
// every clock against a reference FIFO (sorted order, tie order, ages).
module tb_sorting_array_sizes;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NS = 8;
  logic done [NS];
  int   c [NS], f [NS];

  sorter_size_check #(.LEN(8),   .W(8),  .NCYC(600)) s0 (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]));
  sorter_size_check #(.LEN(16),  .W(12), .NCYC(600)) s1 (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]));
  sorter_size_check #(.LEN(32),  .W(16), .NCYC(600)) s2 (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]));
  sorter_size_check #(.LEN(49),  .W(8),  .NCYC(600)) s3 (.clk, .done(done[3]), .checks(c[3]), .failures(f[3]));
  sorter_size_check #(.LEN(64),  .W(20), .NCYC(600)) s4 (.clk, .done(done[4]), .checks(c[4]), .failures(f[4]));
  sorter_size_check #(.LEN(128), .W(12), .NCYC(600)) s5 (.clk, .done(done[5]), .checks(c[5]), .failures(f[5]));
  sorter_size_check #(.LEN(256), .W(8),  .NCYC(700)) s6 (.clk, .done(done[6]), .checks(c[6]), .failures(f[6]));
  sorter_size_check #(.LEN(256), .W(24), .NCYC(700)) s7 (.clk, .done(done[7]), .checks(c[7]), .failures(f[7]));

  int checks, failures;

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < NS; i++) begin checks += c[i]; failures += f[i]; end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
