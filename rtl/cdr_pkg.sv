// cdr_pkg: sizes, sampler bundle and configuration types shared by the quad-lane CDR.
//
// The receiver is a quarter-rate design: each 10 GHz clock cycle delivers 4 samples per
// sampler, and the synthesizable loop runs at 625 MHz on 64-UI words (1:64 deserialization).
// Phase codes resolve 64 steps per UI, so one quarter-rate clock period (4 UI) is 256 codes and
// an 8-bit code wraps exactly once per period. Lane count, word width, quarter rate and the
// 64-codes-per-UI resolution follow the published design; everything else here (gains as
// power-of-two shifts, fractional widths) is this implementation's choice.
package cdr_pkg;

  localparam int unsigned CDR_LANES    = 4;   // lanes sharing one PLL
  localparam int unsigned CDR_QR       = 4;   // samples per sampler per fast clock (quarter rate)
  localparam int unsigned CDR_WORD_W   = 64;  // UI per digital clock cycle
  localparam int unsigned CDR_PI_BITS  = 8;   // 64 codes/UI x 4 UI per clock period
  localparam int unsigned CDR_ROT_BITS = 8;   // shared PLL feedback rotator code
  localparam int unsigned CDR_INT_W    = 20;  // lane frequency integrator width
  localparam int unsigned VOTE_W   = 8;   // signed PD vote, |vote| <= WORD_W
  localparam int unsigned CNT_W    = 7;   // transition counts 0..WORD_W
  localparam int unsigned DSM_Y_W  = 4;   // signed delta-sigma output step

  // One fast clock cycle of sampler outputs for one lane, bit 0 earliest.
  typedef struct packed {
    logic [CDR_QR-1:0] sp;   // PD data sampler, threshold +alpha (edge PI clock)
    logic [CDR_QR-1:0] sn;   // PD data sampler, threshold -alpha (edge PI clock)
    logic [CDR_QR-1:0] e;    // PD edge sampler, threshold 0, half a UI before sp/sn
    logic [CDR_QR-1:0] dp;   // DFE speculative sampler, threshold +h1 (data PI clock)
    logic [CDR_QR-1:0] dn;   // DFE speculative sampler, threshold -h1 (data PI clock)
  } lane_samples_t;

  // Per-lane loop settings.
  typedef struct packed {
    logic [2:0] dec_log2;   // decimation D = 2^dec_log2 words per loop update
    logic [4:0] kp_shift;   // proportional step = 2^kp_shift / 2^16 codes
    logic [4:0] ki_shift;   // integral gain = 2^(6-ki_shift) / 2^16 codes per integrator LSB
    logic       ki_en;      // local integral path into the lane phase accumulator
    logic [2:0] avg_shift;  // smoothing weight 2^-avg_shift (0: data code = edge code)
  } lane_cfg_t;

  // Shared frequency tracking settings.
  typedef struct packed {
    logic       ft_en;      // shared rotator tracking on
    logic [4:0] ks_shift;   // Ks = 2^-ks_shift applied to the sum of lane integrators
  } shared_cfg_t;

endpackage
