// threshold_compare: scales Z by alpha and decides whether the cell under
// test holds a target.
//
// alpha is an unsigned fixed-point number with ALPHA_FRAC fractional bits
// (the default 16-bit word with 10 fractional bits holds the 0.9501953125
// = 973/1024 factor used when validating the design). The threshold
// alpha * Z is kept at full precision, with ALPHA_FRAC fractional bits, and
// the decision is detect = (CUT >= alpha * Z), evaluated exactly by
// aligning the CUT to the same binary point. The multiplier and comparator
// follow the architecture description; the full-precision comparison and
// the alpha word format are this design's choices. Purely combinational.
module threshold_compare #(
  parameter int unsigned DATA_W     = 12,
  parameter int unsigned ALPHA_W    = 16,
  parameter int unsigned ALPHA_FRAC = 10
) (
  input  logic [DATA_W-1:0]         z,
  input  logic [ALPHA_W-1:0]        alpha,
  input  logic [DATA_W-1:0]         cut,
  output logic [DATA_W+ALPHA_W-1:0] threshold,   // alpha * Z, ALPHA_FRAC fraction bits
  output logic                      detect
);

  localparam int unsigned PW = DATA_W + ALPHA_W;

  logic [PW-1:0] cut_aligned;

  assign threshold   = PW'(z) * PW'(alpha);
  assign cut_aligned = PW'(cut) << ALPHA_FRAC;
  assign detect      = (cut_aligned >= threshold);

endmodule
