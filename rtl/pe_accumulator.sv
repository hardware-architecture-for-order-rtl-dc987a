// pe_accumulator: running sum of one reference window and its average.
//
// Instead of adding all n window values every cycle, the sum is updated
// incrementally: on each insertion (en = 1) the newest value entering the
// window is added and the oldest value leaving it is subtracted. The
// average Y = sum / n is a shift by log2(n) bits, so n must be a power of
// two; the shift truncates toward zero. This adder / register / shifter
// structure follows the architecture description (which calls the shifter
// a left shifter; a division is a shift toward the least significant
// bit, which is what is built). rst clears the sum, matching the all-zero
// sorting array after its reset.
//
// Timing: sum_q changes on the rising edge when en = 1; avg is
// combinational from sum_q.
module pe_accumulator #(
  parameter int unsigned DATA_W = 12,
  parameter int unsigned N      = 16,                    // window length, power of two
  parameter int unsigned SUM_W  = DATA_W + $clog2(N)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic [DATA_W-1:0] newest,
  input  logic [DATA_W-1:0] oldest,
  output logic [SUM_W-1:0]  sum_q,
  output logic [DATA_W-1:0] avg
);

  localparam int unsigned SHIFT = $clog2(N);

  // Shifting by log2(n) divides exactly only when n is a power of two.
  if ((1 << SHIFT) != N) begin : g_bad_n
    $error("pe_accumulator: N must be a power of two");
  end

  always_ff @(posedge clk) begin
    if (rst)     sum_q <= '0;
    else if (en) sum_q <= sum_q + SUM_W'(newest) - SUM_W'(oldest);
  end

  assign avg = DATA_W'(sum_q >> SHIFT);

endmodule
