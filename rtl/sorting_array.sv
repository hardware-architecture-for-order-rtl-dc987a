// sorting_array: FIFO linear insertion sorter built from LEN identical
// Sorting Basic Cells (sbc).
//
// The array keeps the last LEN inserted data sorted in ascending order
// (index 0, the leftmost cell, holds the smallest). Each cycle with en = 1
// the oldest datum is discarded and the new datum d is inserted in its
// sorted place in a single clock: the cells between the insertion point
// and the discarded cell shift one place towards the discarded cell, all
// others hold. Equal values are placed to the left of an equal stored
// value, because each cell compares with a strict less-than.
//
// Boundary conditions follow the architecture description: the virtual
// cell left of cell 0 reports p = 1 (it is smaller than anything) and the
// virtual cell right of cell LEN-1 reports p = 0 and no expiry; both offer
// d, so an end cell that must take the new datum receives it. After the
// synchronous reset all data are zero and CNT[i] = i, so the array behaves
// as if LEN zeros had been inserted, the rightmost one first.
//
// Outputs are the stored data and ages, the one-hot expired vector (the
// cell that holds the oldest datum, which will be discarded by the next
// insertion) and the cnt_i chain, which is 1 from cell 0 up to that cell.
// The comparator, load and LR vectors are brought out for observation.
// All outputs are register outputs or combinational from registers and d.
// The parameter defaults are the 32-entry, 16-bit sorter whose results the
// description reports; the CFAR detector instantiates it at 16 x 12 bits.
module sorting_array #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned LEN    = 32,
  parameter int unsigned CNT_W  = (LEN > 1) ? $clog2(LEN) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] value   [LEN],   // sorted data, ascending
  output logic [CNT_W-1:0]  age     [LEN],   // life period of each datum
  output logic [LEN-1:0]    expired,         // one-hot: holder of the oldest datum
  output logic [LEN-1:0]    cnt_chain,       // cnt_i signals (thermometer)
  output logic [LEN-1:0]    reset_vec,       // one-hot: cell that takes d
  output logic [LEN-1:0]    p_vec,           // comparator outputs, value < d
  output logic [LEN-1:0]    load_vec,        // cells that update this cycle
  output logic [LEN-1:0]    lr_vec           // updating cells that take from the right
);

  logic [DATA_W-1:0] to_left  [LEN];
  logic [DATA_W-1:0] to_right [LEN];

  for (genvar i = 0; i < LEN; i++) begin : g_cell
    logic              p_l, p_r, cnti_r;
    logic [DATA_W-1:0] from_l_d, from_r_d;
    logic [CNT_W-1:0]  from_l_cnt, from_r_cnt;

    if (i == 0) begin : g_left_end
      assign p_l        = 1'b1;
      assign from_l_d   = d;
      assign from_l_cnt = '0;
    end else begin : g_left_nbr
      assign p_l        = p_vec[i-1];
      assign from_l_d   = to_right[i-1];
      assign from_l_cnt = age[i-1];
    end

    if (i == LEN - 1) begin : g_right_end
      assign p_r        = 1'b0;
      assign cnti_r     = 1'b0;
      assign from_r_d   = d;
      assign from_r_cnt = '0;
    end else begin : g_right_nbr
      assign p_r        = p_vec[i+1];
      assign cnti_r     = cnt_chain[i+1];
      assign from_r_d   = to_left[i+1];
      assign from_r_cnt = age[i+1];
    end

    sbc #(
      .DATA_W(DATA_W), .LEN(LEN), .POS(i), .CNT_W(CNT_W)
    ) u_sbc (
      .clk           (clk),
      .rst           (rst),
      .en            (en),
      .d             (d),
      .p_left        (p_l),
      .p_right       (p_r),
      .p             (p_vec[i]),
      .cnti_right    (cnti_r),
      .cnti          (cnt_chain[i]),
      .expired       (expired[i]),
      .from_left_d   (from_l_d),
      .from_left_cnt (from_l_cnt),
      .from_right_d  (from_r_d),
      .from_right_cnt(from_r_cnt),
      .to_left_d     (to_left[i]),
      .to_right_d    (to_right[i]),
      .r_q           (value[i]),
      .cnt_q         (age[i]),
      .load          (load_vec[i]),
      .lr            (lr_vec[i]),
      .reset_cnt     (reset_vec[i])
    );
  end

  // Exactly one datum is the oldest, and exactly one cell takes d.
  always_ff @(posedge clk) begin
    if (!rst && en) begin
      assert ($onehot(expired))
        else $error("sorting_array: expired vector not one-hot (%b)", expired);
      assert ($onehot(reset_vec))
        else $error("sorting_array: insertion vector not one-hot (%b)", reset_vec);
    end
  end

endmodule
