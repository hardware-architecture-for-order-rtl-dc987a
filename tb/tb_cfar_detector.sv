// tb_cfar_detector: end-to-end test of the CFAR detector at its default
// size (12-bit data, 32 reference cells, 8 guard cells, 16-bit alpha with
// 10 fraction bits).
//
// A synthetic range profile (noise floor, clutter patches with edges and
// point targets, some in clusters) is streamed through the detector with
// random stalls. An independent model keeps the last P = 41 samples,
// recomputes both windows from scratch every cycle (sum and a full sort of
// each window), and predicts the registered outputs: out_valid, CUT, Z,
// alpha * Z and the decision. The detector code, the two rank selects and
// alpha are changed at run time, and the stream is reset in the middle to
// check that the first decision again appears only after the window has
// refilled (N + M + 1 samples). Every mechanism is counted, and a mechanism
// that never happened counts as a failure: each of the six detectors, a
// stall, a run-time change of k / i / alpha, a mid-stream reset, target
// and no-target decisions.
module tb_cfar_detector;
  import cfar_pkg::*;

  localparam int W = 12, NREF = 32, MG = 8, AW = 16, AF = 10;
  localparam int NW = NREF / 2, P = NREF + MG + 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic            rst, in_valid;
  logic [W-1:0]    din;
  det_mode_e       mode;
  logic [3:0]      sel_k, sel_i;
  logic [AW-1:0]   alpha;
  logic            out_valid, detect;
  logic [W-1:0]    cut, z;
  logic [W+AW-1:0] threshold;

  cfar_detector dut (
    .clk, .rst, .in_valid, .din, .mode, .sel_k, .sel_i, .alpha,
    .out_valid, .detect, .cut, .z, .threshold
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- reference model ----------------
  int hist[$];     // hist[0] newest; always P entries
  int filled;      // samples since reset, saturating at P

  function automatic int sort_pick(int win[$], int idx);
    int s[$];
    s = win;
    s.sort();
    return s[idx];
  endfunction

  // expected outputs for the current window and parameters
  function automatic void model(det_mode_e m, int k, int i, int a,
                                output int e_cut, output int e_z,
                                output longint e_thr, output bit e_det);
    int lag[$], lead[$];
    int s1, s2, y1, y2, r1, r2, u, v;
    s1 = 0; s2 = 0;
    for (int j = 0; j < NW; j++) begin
      lag.push_back(hist[j]);              s1 += hist[j];
      lead.push_back(hist[NW + MG + 1 + j]); s2 += hist[NW + MG + 1 + j];
    end
    e_cut = hist[NW + MG / 2];
    y1 = s1 / NW;  y2 = s2 / NW;
    r1 = sort_pick(lag, k);  r2 = sort_pick(lead, i);
    u = m[2] ? r1 : y1;
    v = m[2] ? r2 : y2;
    case (m[1:0])
      2'b01:   e_z = (u > v) ? u : v;
      2'b10:   e_z = (u < v) ? u : v;
      default: e_z = (u + v) / 2;
    endcase
    e_thr = longint'(e_z) * longint'(a);
    e_det = (longint'(e_cut) << AF) >= e_thr;
  endfunction

  // ---------------- stimulus ----------------
  int sample_no = 0;
  int clutter = 0;

  function automatic int next_sample();
    int x;
    sample_no++;
    if (sample_no % 300 == 0) clutter = (clutter == 0) ? int'($urandom_range(600, 1500)) : 0;
    x = int'($urandom_range(0, 300)) + clutter;
    if ($urandom_range(0, 40) == 0) x += int'($urandom_range(800, 2500));   // target
    if (sample_no % 500 < 3) x += 1800;                                      // target cluster
    if ($urandom_range(0, 20) == 0) x = 250;                                 // repeated value
    return (x > 4095) ? 4095 : x;
  endfunction

  // mechanism counters
  int n_mode[8];
  int n_stall = 0, n_param_change = 0, n_reset = 0, n_det1 = 0, n_det0 = 0;
  int n_refill_ok = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    det_mode_e modes[6] = '{DET_CA, DET_GO, DET_SO, DET_GOSCA, DET_GOSGO, DET_GOSSO};
    bit        exp_valid, ins_last;
    int        e_cut, e_z;
    longint    e_thr;
    bit        e_det;
    int        first_valid_at, ins_since_reset, e_ins;

    rst = 1; in_valid = 0; din = 0; mode = DET_CA;
    sel_k = 4'd11; sel_i = 4'd11;    // k = i = 12
    alpha = 16'd973;                 // 0.9501953125
    repeat (2) @(posedge clk);
    #1 rst = 0;
    hist.delete();
    for (int j = 0; j < P; j++) hist.push_back(0);
    filled = 0;
    exp_valid = 0;
    ins_last  = 0;
    ins_since_reset = 0;
    first_valid_at = -1;

    for (int cyc = 0; cyc < 40000; cyc++) begin
      // ---- outputs registered at the last edge ----
      chk(out_valid == exp_valid, $sformatf("cycle %0d out_valid=%0b exp %0b", cyc, out_valid, exp_valid));
      if (exp_valid && out_valid) begin
        chk(int'(cut) == e_cut, $sformatf("cycle %0d cut %0d exp %0d", cyc, cut, e_cut));
        chk(int'(z) == e_z, $sformatf("cycle %0d %s z %0d exp %0d", cyc, mode.name(), z, e_z));
        chk(longint'(threshold) == e_thr, $sformatf("cycle %0d threshold", cyc));
        chk(detect == e_det, $sformatf("cycle %0d detect %0b exp %0b", cyc, detect, e_det));
        if (e_det) n_det1++; else n_det0++;
        if (first_valid_at < 0) begin
          first_valid_at = e_ins;
          chk(first_valid_at == P, $sformatf("first decision after %0d samples", first_valid_at));
          if (first_valid_at == P && n_reset > 0) n_refill_ok++;
        end
      end

      // ---- a mid-stream reset ----
      if (cyc == 20000) begin
        rst = 1;
        @(posedge clk); #1 rst = 0;
        n_reset++;
        hist.delete();
        for (int j = 0; j < P; j++) hist.push_back(0);
        filled = 0;
        ins_since_reset = 0;
        first_valid_at = -1;
        chk(!out_valid, "reset clears out_valid");
        exp_valid = 0;
        continue;
      end

      // ---- run-time parameters ----
      if (cyc % 1000 == 999) begin
        mode = modes[(cyc / 1000) % 6];
      end
      if (cyc % 1700 == 1699) begin
        sel_k = 4'($urandom_range(0, NW - 1));
        sel_i = 4'($urandom_range(0, NW - 1));
        alpha = ($urandom_range(0, 1) != 0) ? 16'd973 : AW'($urandom_range(512, 3072));
        n_param_change++;
      end

      // ---- next sample, with occasional stalls ----
      in_valid = ($urandom_range(0, 9) != 0);
      din      = in_valid ? W'(next_sample()) : W'($urandom);
      if (!in_valid) n_stall++;

      // ---- prediction for the next edge, from the window as it stands ----
      model(mode, int'(sel_k), int'(sel_i), int'(alpha), e_cut, e_z, e_thr, e_det);
      exp_valid = ins_last && (filled == P);
      e_ins     = ins_since_reset;
      if (exp_valid) n_mode[mode]++;
      ins_last = in_valid;

      @(posedge clk); #1;
      if (ins_last) begin
        hist.push_front(int'(din));
        void'(hist.pop_back());
        if (filled < P) filled++;
        ins_since_reset++;
      end
    end

    // ---- mechanisms ----
    foreach (modes[m]) begin
      $display("detector %-9s decisions checked: %0d", modes[m].name(), n_mode[modes[m]]);
      chk(n_mode[modes[m]] > 0, {"detector never exercised: ", modes[m].name()});
    end
    $display("stalls %0d, parameter changes %0d, resets %0d, refill checks %0d, targets %0d, no-targets %0d",
             n_stall, n_param_change, n_reset, n_refill_ok, n_det1, n_det0);
    chk(n_stall > 0, "stall never happened");
    chk(n_param_change > 0, "run-time k / i / alpha change never happened");
    chk(n_reset > 0 && n_refill_ok > 0, "mid-stream reset and refill never checked");
    chk(n_det1 > 0, "no target was ever declared");
    chk(n_det0 > 0, "no cell was ever declared target-free");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
