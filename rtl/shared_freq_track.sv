// shared_freq_track: frequency tracking shared by all lanes, steering the PLL feedback rotator.
//
// The frequency offset between the far-end transmitter and the local reference is the same for
// every lane, so instead of each lane rotating its own PI continuously, the lanes' frequency
// integrators are added, scaled by Ks, and turned into a rotation of a phase rotator inside the
// shared PLL's feedback path. Each digital clock:
//   rate     = (sum of lane integ) >>> ks_shift      (FRAC fraction bits, codes per clock)
//   step     = delta-sigma(rate)                      (integer, noise shaped)
//   rot_code <= rot_code + step                       (the "Acc." of the rotator)
// Rotating the feedback phase makes the PLL a fractional-N PLL whose VCO follows the incoming
// data rate; the rotator's quantization noise is shaped by the modulator and low-pass filtered
// by the PLL. The sum, Ks, modulator and accumulator chain follows the published architecture;
// the shift form of Ks and the widths are this implementation's choices.
// With ft_en low the modulator and rotator code are held.
// Timing: one update per clock with en high; rot_code changes two clocks after an integ change.
module shared_freq_track
  import cdr_pkg::*;
#(
  parameter int unsigned LANES    = CDR_LANES,
  parameter int unsigned INT_W    = CDR_INT_W,
  parameter int unsigned ROT_BITS = CDR_ROT_BITS,
  parameter int unsigned FRAC     = 10
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            en,
  input  logic signed [LANES-1:0][INT_W-1:0] integ,
  input  shared_cfg_t                     cfg,
  output logic [ROT_BITS-1:0]             rot_code,
  output logic signed [DSM_Y_W-1:0]       dsm_out
);
  localparam int unsigned SUM_W = INT_W + $clog2(LANES) + 1;

  logic signed [SUM_W-1:0] sum, rate;

  always_comb begin
    sum = '0;
    for (int l = 0; l < LANES; l++) sum = sum + SUM_W'(signed'(integ[l]));   // element selects are unsigned
    rate = sum >>> cfg.ks_shift;
  end

  dsm_mash11 #(.IN_W(SUM_W), .FRAC(FRAC)) u_dsm (
    .clk, .rst_n,
    .en (en && cfg.ft_en),
    .x  (rate),
    .y  (dsm_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rot_code <= '0;
    end else if (en && cfg.ft_en) begin
      rot_code <= rot_code + ROT_BITS'(dsm_out);
    end
  end
endmodule
