// dfe_unrolled: resolution of the loop-unrolled first-tap DFE on 64-UI words.
//
// At 40 Gb/s the first post-cursor cannot be cancelled by direct feedback in time, so each UI is
// sampled twice, once against +h1 (dp) and once against -h1 (dn), and the previous decided bit
// selects which of the two is the decision: d[i] = d[i-1] ? dp[i] : dn[i]. Bit 0 uses the last
// bit of the previous word. Loop unrolling of the first tap follows the published design;
// doing the selection on deserialized words is this implementation's choice.
// Timing: d/out_valid registered, one clock after in_valid.
module dfe_unrolled #(
  parameter int unsigned WORD_W = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [WORD_W-1:0] dp,
  input  logic [WORD_W-1:0] dn,
  output logic [WORD_W-1:0] d,
  output logic              out_valid
);
  logic [WORD_W-1:0] dc;
  logic              prev;

  always_comb begin
    prev = d[WORD_W-1];
    for (int i = 0; i < WORD_W; i++) begin
      dc[i] = prev ? dp[i] : dn[i];
      prev  = dc[i];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) d <= dc;
    end
  end
endmodule
