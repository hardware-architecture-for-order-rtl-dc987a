// tb_sbc: self-checking test of one Sorting Basic Cell.
//
// Two cells are instantiated in a 4-cell context: one at position 3,
// whose datum is the oldest after reset (CNT = 3), and one at position 0.
// With en low, every combination of comparator result, neighbour
// comparator outputs and incoming expiry flag is applied, and the load
// and reset outputs are compared with the two truth tables of the control
// equations, LR with p AND load, the expiry chain with an OR, and the
// neighbour outputs with the send rule (smaller-than-D sends its datum
// left). With en high, the register and counter updates are checked for
// the hold, left-shift, right-shift and take-D cases.
module tb_sbc;

  localparam int W = 8, LEN = 4, CW = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          rst, en;
  logic [W-1:0]  d;
  logic          pl, pr, cr;
  logic [W-1:0]  fl_d, fr_d;
  logic [CW-1:0] fl_c, fr_c;

  logic          p_a, cnti_a, exp_a, load_a, lr_a, rs_a;
  logic [W-1:0]  tl_a, tr_a, r_a;
  logic [CW-1:0] c_a;
  logic          p_b, cnti_b, exp_b, load_b, lr_b, rs_b;
  logic [W-1:0]  tl_b, tr_b, r_b;
  logic [CW-1:0] c_b;

  sbc #(.DATA_W(W), .LEN(LEN), .POS(3)) dut_a (
    .clk, .rst, .en, .d, .p_left(pl), .p_right(pr), .p(p_a),
    .cnti_right(cr), .cnti(cnti_a), .expired(exp_a),
    .from_left_d(fl_d), .from_left_cnt(fl_c), .from_right_d(fr_d), .from_right_cnt(fr_c),
    .to_left_d(tl_a), .to_right_d(tr_a), .r_q(r_a), .cnt_q(c_a),
    .load(load_a), .lr(lr_a), .reset_cnt(rs_a)
  );

  sbc #(.DATA_W(W), .LEN(LEN), .POS(0)) dut_b (
    .clk, .rst, .en, .d, .p_left(pl), .p_right(pr), .p(p_b),
    .cnti_right(cr), .cnti(cnti_b), .expired(exp_b),
    .from_left_d(fl_d), .from_left_cnt(fl_c), .from_right_d(fr_d), .from_right_cnt(fr_c),
    .to_left_d(tl_b), .to_right_d(tr_b), .r_q(r_b), .cnt_q(c_b),
    .load(load_b), .lr(lr_b), .reset_cnt(rs_b)
  );

  // Truth tables of the load and reset equations.
  // load indexed by {p, cnt_{i+1}, cnt}; reset by {load, p_{i-1}, p_i, p_{i+1}}.
  localparam bit LOAD_TT [8]   = '{0, 1, 1, 1, 1, 1, 0, 1};
  localparam bit RESET_TT [16] = '{0, 0, 0, 0, 0, 0, 0, 0,
                                   0, 0, 1, 0, 1, 1, 1, 0};

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic check_comb(input string tag, input logic p, input logic cnt,
                            input logic load, input logic lr, input logic rs,
                            input logic cnti, input logic [W-1:0] tl,
                            input logic [W-1:0] tr, input logic [W-1:0] r);
    logic exp_load, exp_rs;
    exp_load = LOAD_TT[{p, cr, cnt}];
    exp_rs   = RESET_TT[{exp_load, pl, p, pr}];
    chk(p == (r < d), {tag, " comparator"});
    chk(load == exp_load, $sformatf("%s load p=%0b cr=%0b cnt=%0b", tag, p, cr, cnt));
    chk(rs == exp_rs, $sformatf("%s reset pl=%0b p=%0b pr=%0b", tag, pl, p, pr));
    chk(lr == (p & exp_load), {tag, " LR"});
    chk(cnti == (cr | cnt), {tag, " cnt_i"});
    chk(tl == (p ? r : d) && tr == (p ? d : r), {tag, " send"});
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    rst = 1; en = 0; d = 0; pl = 0; pr = 0; cr = 0;
    fl_d = 8'd40; fr_d = 8'd90; fl_c = 2'd1; fr_c = 2'd2;
    @(posedge clk); #1 rst = 0;
    chk(r_a == 0 && c_a == 3 && exp_a, "reset state of cell 3");
    chk(r_b == 0 && c_b == 0 && !exp_b, "reset state of cell 0");

    // exhaustive control equations (state: R = 0, so p = (d != 0))
    for (int v = 0; v < 16; v++) begin
      {pl, pr, cr} = 3'(v);
      d = (v[3]) ? 8'd7 : 8'd0;
      #1;
      check_comb("cell3", p_a, exp_a, load_a, lr_a, rs_a, cnti_a, tl_a, tr_a, r_a);
      check_comb("cell0", p_b, exp_b, load_b, lr_b, rs_b, cnti_b, tl_b, tr_b, r_b);
    end

    // cell 0, d > R, no expiry to the right: left shift, takes the right entry
    // cell 3, oldest: d > R, so it also takes its right neighbour's entry
    d = 8'd7; pl = 1; pr = 1; cr = 0; en = 1;
    @(posedge clk); #1 en = 0;
    chk(r_b == 8'd90 && c_b == 2'd3, "cell0 left shift takes right entry, age+1");
    chk(r_a == 8'd90 && c_a == 2'd3, "cell3 expired takes right entry, age+1");

    // cell 0 now holds 90, d = 50 < 90 and an expiry to the right: right shift
    d = 8'd50; pl = 0; pr = 0; cr = 1; en = 1;
    #1 chk(load_b && !lr_b && !rs_b, "cell0 right-shift controls");
    @(posedge clk); #1 en = 0;
    chk(r_b == 8'd40 && c_b == 2'd2, "cell0 right shift takes left entry, age+1");

    // take D from the left neighbour: p_{i-1}=1, p_i=0, expiry to the right
    fl_d = 8'd50;
    d = 8'd30; pl = 1; pr = 0; cr = 1; en = 1;
    #1 chk(load_b && rs_b, "cell0 insertion controls");
    @(posedge clk); #1 en = 0;
    chk(r_b == 8'd50 && c_b == 2'd0, "cell0 takes inserted datum, age 0");

    // hold: d > R, expiry to the right -> no load, age increments
    d = 8'd99; pl = 1; pr = 1; cr = 1; en = 1;
    #1 chk(!load_b, "cell0 hold controls");
    @(posedge clk); #1 en = 0;
    chk(r_b == 8'd50 && c_b == 2'd1, "cell0 holds, age+1");

    // en low: nothing changes
    @(posedge clk); #1;
    chk(r_b == 8'd50 && c_b == 2'd1, "cell0 stalls");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
