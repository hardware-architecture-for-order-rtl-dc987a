// tb_sorting_array: self-checking test of the FIFO linear insertion sorter.
//
// Part 1 (13 cells, 8-bit data) replays two worked examples of the
// sorter. After reset it inserts 6, 3, 5, 0, 1, 4 and checks, before each
// insertion, the comparator, expiry chain, load, LR and insertion vectors
// and, after it, every stored value and life period. It then inserts a
// 13-value sequence that leaves the array in a known mixed state (values
// 1 1 3 4 8 11 15 16 17 17 18 20 22) and replays the insertions 2, 18, 11,
// which exercise a right shift, a left shift with an equal value, and an
// insertion into the cell being vacated.
// Part 2 (the 32 x 16-bit default sorter) inserts random data with random
// stalls and compares every cycle with a reference FIFO: the array must
// hold the last 32 inputs sorted ascending, ties newest first, each with
// an age equal to the number of insertions since it entered. One
// insertion per clock is checked by comparing after every single edge.
module tb_sorting_array;

  localparam int L1 = 13, W1 = 8;
  localparam int L2 = 32, W2 = 16;
  localparam int C1 = $clog2(L1), C2 = $clog2(L2);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- DUT 1: worked examples ----------------
  logic          rst1, en1;
  logic [W1-1:0] d1;
  logic [W1-1:0] val1 [L1];
  logic [C1-1:0] age1 [L1];
  logic [L1-1:0] exp1, chain1, ins1, p1, load1, lr1;

  sorting_array #(.DATA_W(W1), .LEN(L1)) dut1 (
    .clk, .rst(rst1), .en(en1), .d(d1),
    .value(val1), .age(age1), .expired(exp1), .cnt_chain(chain1),
    .reset_vec(ins1), .p_vec(p1), .load_vec(load1), .lr_vec(lr1)
  );

  // ---------------- DUT 2: default size, random ----------------
  logic          rst2, en2;
  logic [W2-1:0] d2;
  logic [W2-1:0] val2 [L2];
  logic [C2-1:0] age2 [L2];
  logic [L2-1:0] exp2, chain2, ins2, p2, load2, lr2;

  sorting_array dut2 (
    .clk, .rst(rst2), .en(en2), .d(d2),
    .value(val2), .age(age2), .expired(exp2), .cnt_chain(chain2),
    .reset_vec(ins2), .p_vec(p2), .load_vec(load2), .lr_vec(lr2)
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // bit i of a vector written left (cell 0) to right as a string of 0/1
  function automatic logic [L1-1:0] vec(input string s);
    logic [L1-1:0] v;
    for (int i = 0; i < L1; i++) v[i] = (s[i] == "1");
    return v;
  endfunction

  // control vectors seen with d applied, before the edge
  task automatic check_ctrl(input string tag, input string p, input string cnt,
                            input string cnti, input string load,
                            input string lr, input string rs);
    #1;
    chk(p1     == vec(p),    {tag, " p"});
    chk(exp1   == vec(cnt),  {tag, " cnt"});
    chk(chain1 == vec(cnti), {tag, " cnt_i"});
    chk(load1  == vec(load), {tag, " load"});
    chk((lr1 & load1) == vec(lr), {tag, " LR"});
    chk(ins1   == vec(rs),   {tag, " reset"});
  endtask

  task automatic check_state(input string tag, input int v[L1], input int c[L1]);
    for (int i = 0; i < L1; i++) begin
      chk(val1[i] == W1'(v[i]), $sformatf("%s value[%0d]=%0d exp %0d", tag, i, val1[i], v[i]));
      chk(age1[i] == C1'(c[i]), $sformatf("%s cnt[%0d]=%0d exp %0d", tag, i, age1[i], c[i]));
    end
  endtask

  task automatic insert1(input int d);
    d1  = W1'(d);
    en1 = 1'b1;
    @(posedge clk);
    #1;
    en1 = 1'b0;
  endtask

  // ---------------- reference model for DUT 2 ----------------
  int q[$];   // q[0] newest

  task automatic check_model2(input string tag);
    int v[$], a[$];
    int tv, ta;
    for (int j = 0; j < L2; j++) begin v.push_back(q[j]); a.push_back(j); end
    // insertion sort by (value, age)
    for (int x = 1; x < L2; x++)
      for (int y = x; y > 0 && (v[y] < v[y-1] || (v[y] == v[y-1] && a[y] < a[y-1])); y--) begin
        tv = v[y]; v[y] = v[y-1]; v[y-1] = tv;
        ta = a[y]; a[y] = a[y-1]; a[y-1] = ta;
      end
    for (int i = 0; i < L2; i++) begin
      chk(val2[i] == W2'(v[i]) && age2[i] == C2'(a[i]),
          $sformatf("%s cell %0d: got %0d/%0d exp %0d/%0d", tag, i, val2[i], age2[i], v[i], a[i]));
    end
    chk($onehot(exp2) && age2[$clog2(exp2)] == C2'(L2-1), {tag, " oldest flag"});
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int s1[L1], c1[L1];
    int seq[13] = '{11, 8, 15, 22, 1, 4, 3, 17, 1, 16, 20, 18, 17};
    rst1 = 1'b1; en1 = 1'b0; d1 = '0;
    rst2 = 1'b1; en2 = 1'b0; d2 = '0;
    repeat (2) @(posedge clk);
    #1 rst1 = 1'b0; rst2 = 1'b0;

    // ---- initialisation example ----
    s1 = '{0,0,0,0,0,0,0,0,0,0,0,0,0};
    c1 = '{0,1,2,3,4,5,6,7,8,9,10,11,12};
    check_state("init", s1, c1);

    d1 = 6; en1 = 1;
    check_ctrl("init a", "1111111111111", "0000000000001", "1111111111111",
               "0000000000001", "0000000000001", "0000000000001");
    insert1(6);
    check_state("init b", '{0,0,0,0,0,0,0,0,0,0,0,0,6}, '{1,2,3,4,5,6,7,8,9,10,11,12,0});

    d1 = 3;
    check_ctrl("init b", "1111111111110", "0000000000010", "1111111111110",
               "0000000000010", "0000000000010", "0000000000010");
    insert1(3);
    check_state("init c", '{0,0,0,0,0,0,0,0,0,0,0,3,6}, '{2,3,4,5,6,7,8,9,10,11,12,0,1});

    d1 = 5;
    check_ctrl("init c", "1111111111110", "0000000000100", "1111111111100",
               "0000000000110", "0000000000110", "0000000000010");
    insert1(5);
    check_state("init d", '{0,0,0,0,0,0,0,0,0,0,3,5,6}, '{3,4,5,6,7,8,9,10,11,12,1,0,2});

    d1 = 0;
    check_ctrl("init d", "0000000000000", "0000000001000", "1111111111000",
               "1111111111000", "0000000000000", "1000000000000");
    insert1(0);
    check_state("init e", '{0,0,0,0,0,0,0,0,0,0,3,5,6}, '{0,4,5,6,7,8,9,10,11,12,2,1,3});

    d1 = 1;
    check_ctrl("init e", "1111111111000", "0000000001000", "1111111111000",
               "0000000001000", "0000000001000", "0000000001000");
    insert1(1);
    check_state("init f", '{0,0,0,0,0,0,0,0,0,1,3,5,6}, '{1,5,6,7,8,9,10,11,12,0,3,2,4});

    d1 = 4;
    check_ctrl("init f", "1111111111100", "0000000010000", "1111111110000",
               "0000000011100", "0000000011100", "0000000000100");
    insert1(4);
    check_state("init g", '{0,0,0,0,0,0,0,0,1,3,4,5,6}, '{2,6,7,8,9,10,11,12,1,4,0,3,5});

    // ---- a stall holds everything ----
    @(posedge clk); #1;
    check_state("stall", '{0,0,0,0,0,0,0,0,1,3,4,5,6}, '{2,6,7,8,9,10,11,12,1,4,0,3,5});

    // ---- mixed-state example ----
    rst1 = 1'b1; @(posedge clk); #1 rst1 = 1'b0;
    foreach (seq[j]) insert1(seq[j]);
    check_state("mixed a", '{1,1,3,4,8,11,15,16,17,17,18,20,22}, '{4,8,6,7,11,12,10,3,0,5,1,2,9});

    d1 = 2;
    check_ctrl("mixed a", "1100000000000", "0000010000000", "1111110000000",
               "0011110000000", "0000000000000", "0010000000000");
    insert1(2);
    check_state("mixed b", '{1,1,2,3,4,8,15,16,17,17,18,20,22}, '{5,9,0,7,8,12,11,4,1,6,2,3,10});

    d1 = 18;
    check_ctrl("mixed b", "1111111111000", "0000010000000", "1111110000000",
               "0000011111000", "0000011111000", "0000000001000");
    insert1(18);
    check_state("mixed c", '{1,1,2,3,4,15,16,17,17,18,18,20,22}, '{6,10,1,8,9,12,5,2,7,0,3,4,11});

    d1 = 11;
    check_ctrl("mixed c", "1111100000000", "0000010000000", "1111110000000",
               "0000010000000", "0000000000000", "0000010000000");
    insert1(11);
    check_state("mixed d", '{1,1,2,3,4,11,16,17,17,18,18,20,22}, '{7,11,2,9,10,0,6,3,8,1,4,5,12});

    // ---- random test of the default-size sorter ----
    q.delete();
    for (int j = 0; j < L2; j++) q.push_back(0);
    check_model2("reset");
    for (int n = 0; n < 3000; n++) begin
      int r;
      en2 = ($urandom_range(0, 7) != 0);
      r = (n < 1500) ? int'($urandom_range(0, 15)) : int'($urandom_range(0, 65535));
      d2 = W2'(r);
      @(posedge clk); #1;
      if (en2) begin
        q.push_front(r);
        void'(q.pop_back());
      end
      check_model2($sformatf("rand %0d", n));
    end
    en2 = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
