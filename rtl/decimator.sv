// decimator: the "down by D" stage between the phase detector and the loop filter.
//
// It adds the signed PD votes of D = 2^dec_log2 consecutive words and, after the D-th word,
// issues one bang-bang decision: +1, 0 or -1, the sign of the sum (a majority vote). The loop
// filter therefore updates once every D digital clocks. The block's place in the loop follows
// the published architecture; summing and taking the sign, and D being a power of two, are this
// implementation's choice. dec_log2 is sampled at the start of each window.
// Timing: bb/out_valid are registered and appear one clock after the last vote of a window.
module decimator
  import cdr_pkg::*;
#(
  parameter int unsigned DEC_MAX_LOG2 = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [VOTE_W-1:0] vote,
  input  logic [2:0]               dec_log2,
  output logic signed [1:0]        bb,
  output logic                     out_valid
);
  localparam int unsigned SUM_W = VOTE_W + DEC_MAX_LOG2 + 1;

  logic signed [SUM_W-1:0] sum, sum_next;
  logic [DEC_MAX_LOG2:0]   cnt;        // words accumulated so far in this window
  logic [DEC_MAX_LOG2:0]   len;        // window length
  logic [2:0]              dl;

  always_comb begin
    dl  = (dec_log2 > 3'(DEC_MAX_LOG2)) ? 3'(DEC_MAX_LOG2) : dec_log2;
    len = (DEC_MAX_LOG2+1)'(1) << dl;
    sum_next = sum + SUM_W'(vote);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum       <= '0;
      cnt       <= '0;
      bb        <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (cnt + 1'b1 >= len) begin
          out_valid <= 1'b1;
          bb        <= (sum_next > 0) ? 2'sd1 : (sum_next < 0) ? -2'sd1 : 2'sd0;
          sum       <= '0;
          cnt       <= '0;
        end else begin
          sum <= sum_next;
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
