// cfar_detector: one-dimensional CFAR target detector supporting six
// detectors selectable at run time: CA, GO and SO (window averages) and
// GOSCA, GOSGO and GOSSO (generalised order statistics).
//
// Samples stream through a sliding window of P = N + M + 1 range cells:
//   din -> lagging sorting array (n = N/2 cells)
//       -> guard / CUT shift register (M + 1 cells, CUT in the middle)
//       -> leading sorting array (n cells) -> discarded.
// Each sorting array keeps its window sorted, so a rank-order value is a
// plain multiplexer read: Y(1) = k-th smallest of the lagging window
// (sel_k = k - 1) and Y(2) = i-th smallest of the leading window
// (sel_i = i - 1). A priority decoder on each array's expiry chain
// locates the datum about to be discarded; a multiplexer reads it, it is
// forwarded to the next stage and subtracted from that window's running
// sum (pe_accumulator), whose shifted value is the window average. The Z
// unit combines the two window values, the threshold unit multiplies by
// alpha and compares with the CUT: detect = (CUT >= alpha * Z).
//
// Interface and timing:
//   * one sample per clock when in_valid = 1; with in_valid = 0 the whole
//     window holds (a stall);
//   * rst is synchronous and empties the window (all cells zero);
//   * mode, sel_k, sel_i and alpha may change at any cycle; they are
//     applied to the window as it stands in that cycle;
//   * one clock after each sample has been inserted, out_valid pulses with
//     the decision for the window that sample completed, provided at
//     least P samples have been inserted since reset (the fill latency of
//     N + M + 1 samples). cut, z and threshold come with it.
// The dataflow, the blocks and the run-time / build-time split of the
// parameters follow the architecture description. The in_valid stall, the
// registered output stage, the fill counter and the 0-based rank selects
// are this design's own choices. N must be twice a power of two and M
// even. Defaults: 12-bit data, 32 reference cells, 8 guard cells.
module cfar_detector
  import cfar_pkg::*;
#(
  parameter int unsigned DATA_W     = 12,
  parameter int unsigned N_REF      = 32,   // reference cells, both windows
  parameter int unsigned M_GUARD    = 8,    // guard cells, both sides
  parameter int unsigned ALPHA_W    = 16,
  parameter int unsigned ALPHA_FRAC = 10,
  parameter int unsigned NW         = N_REF / 2,                    // cells per window
  parameter int unsigned SEL_W      = (NW > 1) ? $clog2(NW) : 1
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      in_valid,
  input  logic [DATA_W-1:0]         din,
  input  det_mode_e                 mode,        // {SelOp, SelDet}
  input  logic [SEL_W-1:0]          sel_k,       // lagging rank k, minus one
  input  logic [SEL_W-1:0]          sel_i,       // leading rank i, minus one
  input  logic [ALPHA_W-1:0]        alpha,       // scaling factor, ALPHA_FRAC fraction bits
  output logic                      out_valid,
  output logic                      detect,
  output logic [DATA_W-1:0]         cut,
  output logic [DATA_W-1:0]         z,
  output logic [DATA_W+ALPHA_W-1:0] threshold
);

  localparam int unsigned P      = N_REF + M_GUARD + 1;
  localparam int unsigned FILL_W = $clog2(P + 1);

  if (N_REF % 2 != 0 || M_GUARD % 2 != 0) begin : g_bad_size
    $error("cfar_detector: N_REF and M_GUARD must be even");
  end

  // ------------------------------------------------------------------
  // Lagging window
  // ------------------------------------------------------------------
  logic [DATA_W-1:0] lag_val [NW];
  logic [NW-1:0]     lag_chain;
  logic [SEL_W-1:0]  lag_sel_old;
  logic              lag_old_ok;
  logic [DATA_W-1:0] lag_oldest, lag_rank, lag_avg;

  sorting_array #(.DATA_W(DATA_W), .LEN(NW)) u_lag_sort (
    .clk, .rst, .en(in_valid), .d(din),
    .value(lag_val), .age(), .expired(),
    .cnt_chain(lag_chain), .reset_vec(), .p_vec(), .load_vec(), .lr_vec()
  );

  priority_decoder #(.LEN(NW)) u_lag_dec (
    .chain(lag_chain), .sel_oldest(lag_sel_old), .valid(lag_old_ok)
  );

  word_mux #(.N(NW), .W(DATA_W)) u_lag_old_mux (
    .d(lag_val), .sel(lag_sel_old), .y(lag_oldest)
  );

  word_mux #(.N(NW), .W(DATA_W)) u_lag_rank_mux (
    .d(lag_val), .sel(sel_k), .y(lag_rank)
  );

  pe_accumulator #(.DATA_W(DATA_W), .N(NW)) u_lag_acc (
    .clk, .rst, .en(in_valid), .newest(din), .oldest(lag_oldest),
    .sum_q(), .avg(lag_avg)
  );

  // ------------------------------------------------------------------
  // Guard cells and cell under test
  // ------------------------------------------------------------------
  logic [DATA_W-1:0] g_cut, g_out;

  guard_shift_register #(.DATA_W(DATA_W), .M(M_GUARD)) u_guard (
    .clk, .rst, .en(in_valid), .d(lag_oldest),
    .taps(), .cut(g_cut), .q_out(g_out)
  );

  // ------------------------------------------------------------------
  // Leading window
  // ------------------------------------------------------------------
  logic [DATA_W-1:0] lead_val [NW];
  logic [NW-1:0]     lead_chain;
  logic [SEL_W-1:0]  lead_sel_old;
  logic              lead_old_ok;
  logic [DATA_W-1:0] lead_oldest, lead_rank, lead_avg;

  sorting_array #(.DATA_W(DATA_W), .LEN(NW)) u_lead_sort (
    .clk, .rst, .en(in_valid), .d(g_out),
    .value(lead_val), .age(), .expired(),
    .cnt_chain(lead_chain), .reset_vec(), .p_vec(), .load_vec(), .lr_vec()
  );

  priority_decoder #(.LEN(NW)) u_lead_dec (
    .chain(lead_chain), .sel_oldest(lead_sel_old), .valid(lead_old_ok)
  );

  word_mux #(.N(NW), .W(DATA_W)) u_lead_old_mux (
    .d(lead_val), .sel(lead_sel_old), .y(lead_oldest)
  );

  word_mux #(.N(NW), .W(DATA_W)) u_lead_rank_mux (
    .d(lead_val), .sel(sel_i), .y(lead_rank)
  );

  pe_accumulator #(.DATA_W(DATA_W), .N(NW)) u_lead_acc (
    .clk, .rst, .en(in_valid), .newest(g_out), .oldest(lead_oldest),
    .sum_q(), .avg(lead_avg)
  );

  // ------------------------------------------------------------------
  // Z statistic, scaling and decision
  // ------------------------------------------------------------------
  logic [DATA_W-1:0]         z_c;
  logic [DATA_W+ALPHA_W-1:0] thr_c;
  logic                      det_c;

  z_statistic #(.DATA_W(DATA_W)) u_z (
    .y1_avg(lag_avg), .y2_avg(lead_avg),
    .y1_rank(lag_rank), .y2_rank(lead_rank),
    .mode(mode), .z(z_c)
  );

  threshold_compare #(
    .DATA_W(DATA_W), .ALPHA_W(ALPHA_W), .ALPHA_FRAC(ALPHA_FRAC)
  ) u_thr (
    .z(z_c), .alpha(alpha), .cut(g_cut), .threshold(thr_c), .detect(det_c)
  );

  // ------------------------------------------------------------------
  // Fill counter and output register
  // ------------------------------------------------------------------
  logic [FILL_W-1:0] fill_q;
  logic              upd_q;      // the window changed at the last edge

  always_ff @(posedge clk) begin
    if (rst) begin
      fill_q    <= '0;
      upd_q     <= 1'b0;
      out_valid <= 1'b0;
      detect    <= 1'b0;
      cut       <= '0;
      z         <= '0;
      threshold <= '0;
    end else begin
      if (in_valid && fill_q != FILL_W'(P)) fill_q <= fill_q + 1'b1;
      upd_q     <= in_valid;
      out_valid <= upd_q && (fill_q == FILL_W'(P));
      detect    <= det_c;
      cut       <= g_cut;
      z         <= z_c;
      threshold <= thr_c;
    end
  end

  // The expiry chains always locate one oldest datum per window.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (lag_old_ok && lead_old_ok)
        else $error("cfar_detector: a sorting array has no oldest datum");
    end
  end

endmodule
