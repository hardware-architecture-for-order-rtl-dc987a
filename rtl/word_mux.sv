// word_mux: N-to-1 multiplexer of W-bit words.
//
// The CFAR detector uses three of these on each sorting array's sorted
// outputs: one driven by Sel-k or Sel-i picks the rank-order value, and one
// driven by SelOldest picks the datum about to be discarded. A select
// value of N or more returns zero. Purely combinational.
module word_mux #(
  parameter int unsigned N     = 16,
  parameter int unsigned W     = 12,
  parameter int unsigned SEL_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [W-1:0]     d [N],
  input  logic [SEL_W-1:0] sel,
  output logic [W-1:0]     y
);

  always_comb begin
    y = '0;
    for (int unsigned i = 0; i < N; i++)
      if (sel == SEL_W'(i)) y = d[i];
  end

endmodule
