// sbc: Sorting Basic Cell, one processing element of the FIFO linear
// insertion sorter (sorting_array).
//
// Each cell holds one datum R and its life period CNT, the number of
// insertions the datum has survived. Every insertion cycle (en = 1) the
// broadcast datum D is compared with R (p = R < D, strictly) and four
// control equations decide whether the cell holds, takes its right
// neighbour's entry (left shift), takes its left neighbour's entry (right
// shift) or takes D itself:
//   cnt_i = cnt_{i+1} | cnt                      (expiry seen at or right of i)
//   load  = (p_i ^ cnt_{i+1}) | cnt              (update this cell)
//   LR    = p_i & load                           (1: from the right)
//   reset = load & ((p_{i-1} & ~p_i) | (p_i & ~p_{i+1}))  (this cell gets D)
// where cnt = (CNT == LEN-1) marks the oldest datum, index i+1 is the right
// neighbour and the array is kept in ascending order from left to right.
// These equations, the comparator, the register, the counter and the four
// 2-1 multiplexers are those of the architecture description.
//
// Data sent to the neighbours: a cell whose datum is smaller than D sends
// R to the left and D to the right; otherwise it sends D to the left and R
// to the right. This orientation is the one the worked sorting examples
// require. A cell that loads a neighbour's entry also takes its CNT; the
// counter then counts that insertion, so moved and held entries both age
// by one per insertion while the cell that takes D restarts at zero.
//
// Timing: all decisions are combinational in the cycle D is presented; R
// and CNT change on the rising clock edge when en = 1. rst is synchronous
// and sets R = 0 and CNT = POS, the cell's position, so that exactly one
// cell (the rightmost) holds the oldest datum after reset.
module sbc #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned LEN    = 32,                 // cells in the array
  parameter int unsigned POS    = 0,                  // this cell's index, 0 = leftmost
  parameter int unsigned CNT_W  = (LEN > 1) ? $clog2(LEN) : 1
) (
  input  logic              clk,
  input  logic              rst,            // synchronous initialisation
  input  logic              en,             // a new datum D is inserted this cycle
  input  logic [DATA_W-1:0] d,              // incoming datum D (broadcast)
  // neighbour comparator outputs
  input  logic              p_left,         // p_{i-1}
  input  logic              p_right,        // p_{i+1}
  output logic              p,              // p_i = (R < D)
  // expiry chain, propagated from right to left
  input  logic              cnti_right,     // cnt_{i+1}
  output logic              cnti,           // cnt_i
  output logic              expired,        // cnt: this cell holds the oldest datum
  // entries offered by the neighbours
  input  logic [DATA_W-1:0] from_left_d,
  input  logic [CNT_W-1:0]  from_left_cnt,
  input  logic [DATA_W-1:0] from_right_d,
  input  logic [CNT_W-1:0]  from_right_cnt,
  // entries offered to the neighbours
  output logic [DATA_W-1:0] to_left_d,
  output logic [DATA_W-1:0] to_right_d,
  // stored state
  output logic [DATA_W-1:0] r_q,
  output logic [CNT_W-1:0]  cnt_q,
  // control signals, brought out for observation
  output logic              load,
  output logic              lr,
  output logic              reset_cnt
);

  localparam logic [CNT_W-1:0] CNT_LAST = CNT_W'(LEN - 1);
  localparam logic [CNT_W-1:0] CNT_INIT = CNT_W'(POS);

  logic [DATA_W-1:0] in_d;
  logic [CNT_W-1:0]  in_cnt;

  // comparator and the four control equations
  assign p         = (r_q < d);
  assign expired   = (cnt_q == CNT_LAST);
  assign cnti      = cnti_right | expired;
  assign load      = (p ^ cnti_right) | expired;
  assign lr        = p & load;
  assign reset_cnt = load & ((p_left & ~p) | (p & ~p_right));

  // output multiplexers, steered by the comparator
  assign to_left_d  = p ? r_q : d;
  assign to_right_d = p ? d   : r_q;

  // input multiplexers, steered by LR
  assign in_d   = lr ? from_right_d   : from_left_d;
  assign in_cnt = lr ? from_right_cnt : from_left_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      r_q   <= '0;
      cnt_q <= CNT_INIT;
    end else if (en) begin
      if (load) r_q <= in_d;
      if (reset_cnt)   cnt_q <= '0;
      else if (load)   cnt_q <= in_cnt + 1'b1;
      else             cnt_q <= cnt_q + 1'b1;
    end
  end

endmodule
