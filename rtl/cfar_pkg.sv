// cfar_pkg: types and constants shared by the CFAR detector blocks.
//
// The detector is chosen at run time by a 3-bit code that concatenates
// the one-bit SelOp (0: take the windows' averages, 1: take the rank-order
// values) with the two-bit SelDet (how the two window values are combined
// into the Z statistic: mean, maximum or minimum). Grouping SelOp and
// SelDet into one bus follows the architecture description; the exact bit
// encoding below is this design's own choice. Code 2'b11 of SelDet is
// unused and behaves as the mean.
package cfar_pkg;

  // How the two window values Y1 and Y2 are combined into Z (SelDet).
  typedef enum logic [1:0] {
    ZOP_MEAN = 2'b00,   // Z = (Y1 + Y2) / 2
    ZOP_MAX  = 2'b01,   // Z = max(Y1, Y2)
    ZOP_MIN  = 2'b10    // Z = min(Y1, Y2)
  } zop_e;

  // Full detector selection: {SelOp, SelDet}.
  typedef enum logic [2:0] {
    DET_CA    = 3'b000,  // cell averaging
    DET_GO    = 3'b001,  // greatest-of averages
    DET_SO    = 3'b010,  // smallest-of averages
    DET_GOSCA = 3'b100,  // mean of the k-th (lagging) and i-th (leading) ranks
    DET_GOSGO = 3'b101,  // greatest of the two rank values
    DET_GOSSO = 3'b110   // smallest of the two rank values
  } det_mode_e;

endpackage
