// cfar_size_check: test harness that runs one cfar_detector of a given
// size (reference cells, guard cells, data width) against a reference
// model of the sliding window.
//
// The model keeps the last P = N + M + 1 samples, recomputes both window
// sums and sorts every cycle and predicts out_valid, CUT, Z, alpha * Z and
// the decision one clock after each insertion. The harness streams NCYC
// synthetic samples with random stalls and cycles through the six
// detectors, changing k, i and alpha as it goes. It counts how many
// decisions it checked for each detector (modes_seen has a bit per
// detector that was exercised). Results are read by the enclosing
// testbench once done goes high.
module cfar_size_check
  import cfar_pkg::*;
#(
  parameter int NREF = 32,
  parameter int MG   = 8,
  parameter int W    = 12,
  parameter int NCYC = 3000
) (
  input  logic       clk,
  output logic       done,
  output int         checks,
  output int         failures,
  output logic [5:0] modes_seen,
  output int         n_det1,
  output int         n_det0
);

  localparam int AW = 16, AF = 10;
  localparam int NW = NREF / 2, P = NREF + MG + 1;
  localparam int SW = (NW > 1) ? $clog2(NW) : 1;

  logic            rst, in_valid;
  logic [W-1:0]    din;
  det_mode_e       mode;
  logic [SW-1:0]   sel_k, sel_i;
  logic [AW-1:0]   alpha;
  logic            out_valid, detect;
  logic [W-1:0]    cut, z;
  logic [W+AW-1:0] threshold;

  cfar_detector #(.DATA_W(W), .N_REF(NREF), .M_GUARD(MG)) dut (
    .clk, .rst, .in_valid, .din, .mode, .sel_k, .sel_i, .alpha,
    .out_valid, .detect, .cut, .z, .threshold
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (N=%0d M=%0d W=%0d): %s", NREF, MG, W, what);
    end
  endtask

  int hist[$];
  int filled;

  function automatic int sort_pick(int win[$], int idx);
    int s[$];
    s = win;
    s.sort();
    return s[idx];
  endfunction

  function automatic void model(det_mode_e m, int k, int i, int a,
                                output int e_cut, output int e_z,
                                output longint e_thr, output bit e_det);
    int lag[$], lead[$];
    int s1, s2, u, v;
    s1 = 0; s2 = 0;
    for (int j = 0; j < NW; j++) begin
      lag.push_back(hist[j]);                s1 += hist[j];
      lead.push_back(hist[NW + MG + 1 + j]); s2 += hist[NW + MG + 1 + j];
    end
    e_cut = hist[NW + MG / 2];
    u = m[2] ? sort_pick(lag, k)  : s1 / NW;
    v = m[2] ? sort_pick(lead, i) : s2 / NW;
    case (m[1:0])
      2'b01:   e_z = (u > v) ? u : v;
      2'b10:   e_z = (u < v) ? u : v;
      default: e_z = (u + v) / 2;
    endcase
    e_thr = longint'(e_z) * longint'(a);
    e_det = (longint'(e_cut) << AF) >= e_thr;
  endfunction

  function automatic int sample(int n);
    int x, top;
    top = (1 << W) - 1;
    x = int'($urandom_range(0, top / 12));
    if ((n / 200) % 2 == 1) x += top / 4;                       // clutter patch
    if ($urandom_range(0, 30) == 0) x += int'($urandom_range(top / 4, top / 2));  // target
    return (x > top) ? top : x;
  endfunction

  initial begin
    det_mode_e modes[6] = '{DET_CA, DET_GO, DET_SO, DET_GOSCA, DET_GOSGO, DET_GOSSO};
    bit     exp_valid, ins_last;
    int     e_cut, e_z;
    longint e_thr;
    bit     e_det;

    done = 0; checks = 0; failures = 0; modes_seen = '0; n_det1 = 0; n_det0 = 0;
    rst = 1; in_valid = 0; din = '0; mode = DET_CA;
    sel_k = SW'((3 * NW) / 4 - 1); sel_i = SW'((3 * NW) / 4 - 1);   // k = i = 0.75 n
    alpha = 16'd973;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int j = 0; j < P; j++) hist.push_back(0);
    filled = 0; exp_valid = 0; ins_last = 0;

    for (int cyc = 0; cyc < NCYC; cyc++) begin
      chk(out_valid == exp_valid, $sformatf("cycle %0d out_valid", cyc));
      if (exp_valid && out_valid) begin
        chk(int'(cut) == e_cut && int'(z) == e_z && longint'(threshold) == e_thr && detect == e_det,
            $sformatf("cycle %0d %s: cut %0d/%0d z %0d/%0d det %0b/%0b",
                      cyc, mode.name(), cut, e_cut, z, e_z, detect, e_det));
        if (e_det) n_det1++; else n_det0++;
      end
      if (cyc % 300 == 299) mode = modes[(cyc / 300) % 6];
      if (cyc % 450 == 449) begin
        sel_k = SW'($urandom_range(0, NW - 1));
        sel_i = SW'($urandom_range(0, NW - 1));
        alpha = AW'($urandom_range(700, 3000));
      end
      in_valid = ($urandom_range(0, 9) != 0);
      din      = in_valid ? W'(sample(cyc)) : W'($urandom);
      model(mode, int'(sel_k), int'(sel_i), int'(alpha), e_cut, e_z, e_thr, e_det);
      exp_valid = ins_last && (filled == P);
      if (exp_valid) modes_seen[(mode[2] ? 3 : 0) + int'(mode[1:0])] = 1'b1;
      ins_last = in_valid;
      @(posedge clk); #1;
      if (ins_last) begin
        hist.push_front(int'(din));
        void'(hist.pop_back());
        if (filled < P) filled++;
      end
    end
    done = 1;
  end

endmodule
