// sorter_size_check: test harness that runs one sorting_array of a given
// size against a reference FIFO model.
//
// After the synchronous reset it inserts NCYC random values (a narrow
// range first, to force ties, then the full word range), with random
// stalls, and checks after every clock that the array holds the last LEN
// inputs sorted ascending, ties newest first, each with its exact age.
// checks / failures are counted here and read by the enclosing testbench
// once done goes high.
module sorter_size_check #(
  parameter int LEN  = 8,
  parameter int W    = 8,
  parameter int NCYC = 1000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int CW = (LEN > 1) ? $clog2(LEN) : 1;

  logic          rst, en;
  logic [W-1:0]  d;
  logic [W-1:0]  val [LEN];
  logic [CW-1:0] age [LEN];
  logic [LEN-1:0] expv, chain, ins, pv, loadv, lrv;

  sorting_array #(.DATA_W(W), .LEN(LEN)) dut (
    .clk, .rst, .en, .d, .value(val), .age(age), .expired(expv),
    .cnt_chain(chain), .reset_vec(ins), .p_vec(pv), .load_vec(loadv), .lr_vec(lrv)
  );

  longint q[$];   // q[0] newest

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (%0d x %0d): %s", LEN, W, what);
    end
  endtask

  task automatic compare(input int n);
    longint v[$];
    int     a[$];
    longint tv;
    int     ta;
    for (int j = 0; j < LEN; j++) begin v.push_back(q[j]); a.push_back(j); end
    for (int x = 1; x < LEN; x++)
      for (int y = x; y > 0 && (v[y] < v[y-1] || (v[y] == v[y-1] && a[y] < a[y-1])); y--) begin
        tv = v[y]; v[y] = v[y-1]; v[y-1] = tv;
        ta = a[y]; a[y] = a[y-1]; a[y-1] = ta;
      end
    for (int i = 0; i < LEN; i++)
      chk(longint'(val[i]) == v[i] && int'(age[i]) == a[i],
          $sformatf("cycle %0d cell %0d: %0d/%0d exp %0d/%0d", n, i, val[i], age[i], v[i], a[i]));
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    rst = 1; en = 0; d = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int j = 0; j < LEN; j++) q.push_back(0);
    compare(-1);
    for (int n = 0; n < NCYC; n++) begin
      longint r;
      en = ($urandom_range(0, 7) != 0);
      r  = (n < NCYC / 2) ? longint'($urandom_range(0, 7))
                          : (longint'({$urandom, $urandom}) & ((longint'(1) << W) - 1));
      d  = W'(r);
      @(posedge clk); #1;
      if (en) begin
        q.push_front(r);
        void'(q.pop_back());
      end
      compare(n);
    end
    en = 0;
    done = 1;
  end

endmodule
