// dsm_mash11: second-order (MASH 1-1) delta-sigma modulator for the shared rotator.
//
// Input x is a signed rotation rate with FRAC fraction bits, in rotator codes per digital clock.
// Its integer part passes straight through; its fraction drives two cascaded first-order
// accumulators. With c1, c2 their carries, the output step is
//   y = int(x) + c1 + c2 - c2(previous)
// whose average equals x exactly and whose quantization error is pushed to high frequencies
// (second-order shaping), where the shared PLL's low-pass response removes it. A delta-sigma
// modulator in front of the rotator accumulator follows the published design; its order and
// structure are this implementation's choice. y must fit DSM_Y_W bits, so |floor(x)| <= 5;
// a simulation assertion flags a rate outside that range.
// Timing: y is registered, one step per clock with en high.
module dsm_mash11
  import cdr_pkg::*;
#(
  parameter int unsigned IN_W = 24,
  parameter int unsigned FRAC = 10
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic signed [IN_W-1:0]    x,
  output logic signed [DSM_Y_W-1:0] y
);
  logic [FRAC-1:0]           e1, e2;
  logic [FRAC:0]             s1, s2;
  logic                      c2_d;
  logic signed [IN_W-FRAC-1:0] xi;

  always_comb begin
    xi = x[IN_W-1:FRAC];                 // floor(x)
    s1 = {1'b0, e1} + {1'b0, x[FRAC-1:0]};
    s2 = {1'b0, e2} + {1'b0, s1[FRAC-1:0]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e1   <= '0;
      e2   <= '0;
      c2_d <= 1'b0;
      y    <= '0;
    end else if (en) begin
      e1   <= s1[FRAC-1:0];
      e2   <= s2[FRAC-1:0];
      c2_d <= s2[FRAC];
      y    <= DSM_Y_W'(xi) + DSM_Y_W'({1'b0, s1[FRAC]}) + DSM_Y_W'({1'b0, s2[FRAC]})
            - DSM_Y_W'({1'b0, c2_d});
    end
  end

  // The output step must fit: integer part of the rate within +-YMAX.
  localparam int YMAX = (1 << (DSM_Y_W - 1)) - 3;
  always_ff @(posedge clk) begin
    if (rst_n && en) begin
      assert (int'(xi) <= YMAX && int'(xi) >= -YMAX)
        else $error("delta-sigma input %0d out of range", xi);
    end
  end
endmodule
