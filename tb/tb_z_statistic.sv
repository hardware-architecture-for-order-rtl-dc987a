// tb_z_statistic: drives random window averages and rank values and
// checks Z for each of the six detector codes against the defining
// formulas (mean, maximum, minimum of the averages or of the rank values),
// plus the corner values 0 and 4095.
module tb_z_statistic;
  import cfar_pkg::*;

  localparam int W = 12;
  int checks = 0, failures = 0;

  logic [W-1:0] a1, a2, r1, r2, z;
  det_mode_e    mode;

  z_statistic #(.DATA_W(W)) dut (
    .y1_avg(a1), .y2_avg(a2), .y1_rank(r1), .y2_rank(r2), .mode, .z
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int expect_z(det_mode_e m, int y1, int y2, int k1, int k2);
    case (m)
      DET_CA:    return (y1 + y2) / 2;
      DET_GO:    return (y1 > y2) ? y1 : y2;
      DET_SO:    return (y1 < y2) ? y1 : y2;
      DET_GOSCA: return (k1 + k2) / 2;
      DET_GOSGO: return (k1 > k2) ? k1 : k2;
      DET_GOSSO: return (k1 < k2) ? k1 : k2;
      default:   return -1;
    endcase
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    det_mode_e modes[6] = '{DET_CA, DET_GO, DET_SO, DET_GOSCA, DET_GOSGO, DET_GOSSO};
    for (int n = 0; n < 500; n++) begin
      if (n < 4) begin
        a1 = (n[0]) ? 12'hFFF : 12'h000; a2 = 12'hFFF;
        r1 = (n[1]) ? 12'hFFF : 12'h000; r2 = 12'hFFF;
      end else begin
        a1 = W'($urandom); a2 = W'($urandom); r1 = W'($urandom); r2 = W'($urandom);
      end
      foreach (modes[m]) begin
        mode = modes[m];
        #1 chk(int'(z) == expect_z(mode, a1, a2, r1, r2),
               $sformatf("%s: z=%0d exp %0d", mode.name(), z, expect_z(mode, a1, a2, r1, r2)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
