// ddj_filter_pd: data-dependent-jitter filtering bang-bang phase detector, one 64-UI word per
// digital clock.
//
// The PD has two data samplers per UI, with thresholds +alpha (sp) and -alpha (sn), and one edge
// sampler per UI (e). Edge sample e[i] sits half a UI before data sample i, i.e. on the boundary
// between UI i-1 and UI i. A boundary is used only when the signal is settled well beyond the
// thresholds on both sides: rising when UI i-1 is below -alpha (sn=0) and UI i is above +alpha
// (sp=1), falling when UI i-1 is above +alpha (sp=1) and UI i is below -alpha (sn=0). Transitions
// that start or end inside the +/-alpha band come from ISI-heavy patterns and are ignored, so the
// edge distribution the loop sees is narrow and centred on the low-ISI crossings. For a used
// boundary the edge sample is compared with the bit before it (Alexander PD): equal means the
// clock is early (vote +1, increase the phase code), different means late (vote -1).
// Setting alpha to 0 at the samplers makes sp = sn and the detector then uses every transition.
//
// The threshold-qualified transitions follow the published design; the exact qualification rule,
// the vote sign and the one-cycle registered output are this implementation's reading.
// Timing: outputs are registered; out_valid follows in_valid by one clock.
module ddj_filter_pd
  import cdr_pkg::*;
#(
  parameter int unsigned WORD_W = CDR_WORD_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [WORD_W-1:0]        sp,
  input  logic [WORD_W-1:0]        sn,
  input  logic [WORD_W-1:0]        e,
  output logic signed [VOTE_W-1:0] vote,      // #early - #late
  output logic [CNT_W-1:0]         n_valid,   // boundaries that passed the filter
  output logic                     out_valid
);
  // Last UI of the previous word, needed for boundary 0.
  logic sp_prev, sn_prev;

  logic [WORD_W-1:0] sp_a, sn_a;       // sample before each boundary
  logic [WORD_W-1:0] rise, fall, early, late;
  logic [CNT_W-1:0]  n_early, n_late, n_used;

  always_comb begin
    sp_a = {sp[WORD_W-2:0], sp_prev};
    sn_a = {sn[WORD_W-2:0], sn_prev};
    rise  = ~sn_a & sp;
    fall  =  sp_a & ~sn;
    early = (rise & ~e) | (fall & e);
    late  = (rise & e)  | (fall & ~e);
    n_early = '0;
    n_late  = '0;
    n_used  = '0;
    for (int i = 0; i < WORD_W; i++) begin
      n_early = n_early + CNT_W'(early[i]);
      n_late  = n_late  + CNT_W'(late[i]);
      n_used  = n_used  + CNT_W'(rise[i] | fall[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sp_prev   <= 1'b0;
      sn_prev   <= 1'b0;
      vote      <= '0;
      n_valid   <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sp_prev <= sp[WORD_W-1];
        sn_prev <= sn[WORD_W-1];
        vote    <= VOTE_W'(signed'({1'b0, n_early})) - VOTE_W'(signed'({1'b0, n_late}));
        n_valid <= n_used;
      end
    end
  end
endmodule
