// z_statistic: forms the CFAR Z statistic from the two reference windows.
//
// Two 2-1 multiplexers, steered by SelOp, choose for each window either
// its average (Y1 lagging, Y2 leading, from the accumulators) or its
// rank-order value (Y(1) = k-th of the lagging window, Y(2) = i-th of the
// leading window). An ALU-like stage, steered by SelDet, then returns the
// mean, the larger or the smaller of the two. With SelOp = 0 this gives
// CA-, GO- and SO-CFAR; with SelOp = 1, GOSCA-, GOSGO- and GOSSO-CFAR.
// The mean is (a + b) >> 1, truncated. The structure follows the
// architecture description; the truncating mean is this design's choice.
// Purely combinational.
module z_statistic
  import cfar_pkg::*;
#(
  parameter int unsigned DATA_W = 12
) (
  input  logic [DATA_W-1:0] y1_avg,     // lagging window average
  input  logic [DATA_W-1:0] y2_avg,     // leading window average
  input  logic [DATA_W-1:0] y1_rank,    // k-th value of the lagging window
  input  logic [DATA_W-1:0] y2_rank,    // i-th value of the leading window
  input  det_mode_e         mode,       // {SelOp, SelDet}
  output logic [DATA_W-1:0] z
);

  logic [DATA_W-1:0] a, b;
  logic [DATA_W:0]   sum;

  always_comb begin
    a   = mode[2] ? y1_rank : y1_avg;
    b   = mode[2] ? y2_rank : y2_avg;
    sum = {1'b0, a} + {1'b0, b};
    unique case (zop_e'(mode[1:0]))
      ZOP_MAX: z = (a > b) ? a : b;
      ZOP_MIN: z = (a < b) ? a : b;
      default: z = DATA_W'(sum >> 1);
    endcase
  end

endmodule
