// guard_shift_register: the 2m+1 plain registers between the lagging and
// the leading sorting arrays: m guard cells, the cell under test (CUT) in
// the middle, and m more guard cells.
//
// On each insertion (en = 1) every register takes its left neighbour's
// value and register 0 takes d, the datum just discarded by the lagging
// sorting array. q_out, the last register, feeds the leading sorting
// array. This follows the architecture description; the synchronous clear
// on rst is this design's choice so that the whole delay line starts at
// zero like the sorting arrays.
module guard_shift_register #(
  parameter int unsigned DATA_W = 12,
  parameter int unsigned M      = 8                      // guard cells, both sides together
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] taps [M+1],
  output logic [DATA_W-1:0] cut,
  output logic [DATA_W-1:0] q_out
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i <= M; i++) taps[i] <= '0;
    end else if (en) begin
      taps[0] <= d;
      for (int unsigned i = 1; i <= M; i++) taps[i] <= taps[i-1];
    end
  end

  assign cut   = taps[M/2];
  assign q_out = taps[M];

endmodule
