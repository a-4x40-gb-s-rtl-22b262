// jitter_smoothing_filter: the high-frequency jitter filter of the split-path CDR.
//
// The edge PI follows the loop filter with minimum latency and so dithers; the data PI must
// not. This filter sits outside the timing loop and turns the edge code into a smoothed data
// code with a programmable exponential average:
//   acc <= acc + wrap(code_in - acc) / 2^avg_shift
// The difference is taken modulo one clock period (256 codes) and read as a signed number, so
// the average follows the code across its wrap-around. acc has SF_FRAC fraction bits and
// code_out is acc rounded to the nearest code. avg_shift = 0 makes code_out equal to code_in one
// clock later (no split path). The split path and its programmable averaging follow the
// published design; the first-order exponential average is this implementation's choice.
// Timing: one update per clock with en high; code_out is the rounded register value and
// changes on the clock after the update.
module jitter_smoothing_filter #(
  parameter int unsigned PI_BITS = 8,
  parameter int unsigned SF_FRAC = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [PI_BITS-1:0] code_in,
  input  logic [2:0]         avg_shift,
  output logic [PI_BITS-1:0] code_out
);
  localparam int unsigned W = PI_BITS + SF_FRAC;

  logic [W-1:0]        acc, acc_next;
  logic signed [W-1:0] diff;

  always_comb begin
    diff     = signed'({code_in, {SF_FRAC{1'b0}}} - acc);
    acc_next = acc + W'(diff >>> avg_shift);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0;
    end else if (en) begin
      acc <= acc_next;
    end
  end

  // Round to nearest code; wraps naturally at the top of the range.
  logic [W-1:0] acc_rnd;
  assign acc_rnd  = acc + W'(1 << (SF_FRAC - 1));
  assign code_out = acc_rnd[W-1:SF_FRAC];
endmodule
