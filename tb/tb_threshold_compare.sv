// tb_threshold_compare: checks alpha * Z and the decision CUT >= alpha * Z
// with alpha = 973/1024 (0.9501953125) and with random factors, including
// CUT values right at and either side of the threshold, and exact
// equality with alpha = 1.0 and 0.5.
module tb_threshold_compare;

  localparam int W = 12, AW = 16, AF = 10;
  int checks = 0, failures = 0;

  logic [W-1:0]    z, cut;
  logic [AW-1:0]   alpha;
  logic [W+AW-1:0] thr;
  logic            det;

  threshold_compare #(.DATA_W(W), .ALPHA_W(AW), .ALPHA_FRAC(AF)) dut (
    .z, .alpha, .cut, .threshold(thr), .detect(det)
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog timeout");
    // exact equality: alpha = 1.0 and 0.5 with CUT equal to alpha * Z
    for (int n = 0; n < 200; n++) begin
      alpha = n[0] ? 16'd1024 : 16'd512;
      z     = W'($urandom) & 12'hFFE;
      cut   = n[0] ? z : z >> 1;
      #1;
      chk(det, $sformatf("equality z=%0d alpha=%0d cut=%0d", z, alpha, cut));
      cut   = cut - 1'b1;
      #1;
      chk(!det || z == 0, $sformatf("one below z=%0d alpha=%0d cut=%0d", z, alpha, cut));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint prod;
    for (int n = 0; n < 2000; n++) begin
      alpha = (n < 1000) ? 16'd973 : AW'($urandom_range(0, 8191));
      z     = W'($urandom);
      prod  = longint'(z) * longint'(alpha);
      case (n % 4)
        0: cut = W'($urandom);
        1: cut = W'(prod / 1024);        // at or just under the threshold
        2: cut = W'(prod / 1024 + 1);    // just over
        default: cut = (prod / 1024 > 0) ? W'(prod / 1024 - 1) : 12'd0;
      endcase
      #1;
      chk(longint'(thr) == prod, $sformatf("threshold %0d exp %0d", thr, prod));
      chk(det == (longint'(cut) * 1024 >= prod),
          $sformatf("z=%0d alpha=%0d cut=%0d det=%0b", z, alpha, cut, det));
    end
    // exact equality: alpha = 1.0 and 0.5 with CUT equal to alpha * Z
    for (int n = 0; n < 200; n++) begin
      alpha = n[0] ? 16'd1024 : 16'd512;
      z     = W'($urandom) & 12'hFFE;
      cut   = n[0] ? z : z >> 1;
      #1;
      chk(det, $sformatf("equality z=%0d alpha=%0d cut=%0d", z, alpha, cut));
      cut   = cut - 1'b1;
      #1;
      chk(!det || z == 0, $sformatf("one below z=%0d alpha=%0d cut=%0d", z, alpha, cut));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
