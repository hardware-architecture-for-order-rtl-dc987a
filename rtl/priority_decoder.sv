// priority_decoder: converts the cnt_i chain of a sorting array into
// SelOldest, the index of the cell holding the oldest datum.
//
// The chain is 1 from cell 0 up to the cell whose life period expired and
// 0 to its right, so the oldest cell is the highest-numbered cell whose
// bit is set. The decoder returns that index (a priority encoder that
// favours the highest index); valid is 0 when no bit is set, which does
// not happen in a running sorting array. The description names the
// decoder and its input and output buses; the priority encoding is this
// design's choice of how to build it. Purely combinational.
module priority_decoder #(
  parameter int unsigned LEN   = 16,
  parameter int unsigned SEL_W = (LEN > 1) ? $clog2(LEN) : 1
) (
  input  logic [LEN-1:0]   chain,
  output logic [SEL_W-1:0] sel_oldest,
  output logic             valid
);

  always_comb begin
    sel_oldest = '0;
    valid      = 1'b0;
    for (int unsigned i = 0; i < LEN; i++) begin
      if (chain[i]) begin
        sel_oldest = SEL_W'(i);
        valid      = 1'b1;
      end
    end
  end

endmodule
