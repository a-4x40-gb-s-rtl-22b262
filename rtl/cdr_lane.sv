// cdr_lane: the digital part of one receive lane of the split-path CDR.
//
// Five samplers feed the lane, four samples per 10 GHz clock each, and are deserialized into
// 64-UI words: the +alpha / -alpha data samplers and the edge sampler of the phase detector,
// clocked by the low-latency edge PI, and the +h1 / -h1 speculative samplers of the DFE,
// clocked by the low-jitter data PI. Per word:
//   ddj_filter_pd  -> decimator (D words) -> cdr_loop_filter -> edge_code (edge PI)
//                                                            -> jitter_smoothing_filter -> data_code (data PI)
//   dfe_unrolled   -> data_word
// The loop filter's frequency integrator goes out as `integ` to the shared frequency tracking.
// The split of one loop output into a fast edge code and a smoothed data code, the DDJ filtering
// PD and the unrolled DFE follow the published lane; clocking the whole lane from the 10 GHz
// clock with a 1-in-16 word strobe is this implementation's choice.
// Timing: with D = 1, edge_code reacts to a word on the third rising edge after the edge that
// completes it (word_stb high): PD, decimator and loop filter registers. data_code follows on
// the next word_stb.
module cdr_lane
  import cdr_pkg::*;
#(
  parameter int unsigned WORD_W = CDR_WORD_W,
  parameter int unsigned QR     = CDR_QR
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    word_stb,
  input  lane_samples_t           smp,
  input  lane_cfg_t               cfg,
  output logic [CDR_PI_BITS-1:0]      edge_code,
  output logic [CDR_PI_BITS-1:0]      data_code,
  output logic signed [CDR_INT_W-1:0] integ,
  output logic [WORD_W-1:0]       data_word,
  output logic                    data_valid,
  output logic [CNT_W-1:0]        pd_valid_cnt
);
  logic [WORD_W-1:0] w_sp, w_sn, w_e, w_dp, w_dn;
  logic              wv, wv_sn, wv_e, wv_dp, wv_dn;

  deserializer #(.IN_W(QR), .OUT_W(WORD_W)) u_des_sp (.clk, .rst_n, .word_stb, .din(smp.sp), .word(w_sp), .valid(wv));
  deserializer #(.IN_W(QR), .OUT_W(WORD_W)) u_des_sn (.clk, .rst_n, .word_stb, .din(smp.sn), .word(w_sn), .valid(wv_sn));
  deserializer #(.IN_W(QR), .OUT_W(WORD_W)) u_des_e  (.clk, .rst_n, .word_stb, .din(smp.e),  .word(w_e),  .valid(wv_e));
  deserializer #(.IN_W(QR), .OUT_W(WORD_W)) u_des_dp (.clk, .rst_n, .word_stb, .din(smp.dp), .word(w_dp), .valid(wv_dp));
  deserializer #(.IN_W(QR), .OUT_W(WORD_W)) u_des_dn (.clk, .rst_n, .word_stb, .din(smp.dn), .word(w_dn), .valid(wv_dn));

  // All five deserializers share word_stb, so their valids are identical; one is used.
  logic unused_valids;
  assign unused_valids = wv_sn ^ wv_e ^ wv_dp ^ wv_dn;

  logic signed [VOTE_W-1:0] vote;
  logic                     vote_valid;

  ddj_filter_pd #(.WORD_W(WORD_W)) u_pd (
    .clk, .rst_n, .in_valid(wv), .sp(w_sp), .sn(w_sn), .e(w_e),
    .vote, .n_valid(pd_valid_cnt), .out_valid(vote_valid)
  );

  logic signed [1:0] bb;
  logic              bb_valid;

  decimator u_dec (
    .clk, .rst_n, .in_valid(vote_valid), .vote, .dec_log2(cfg.dec_log2),
    .bb, .out_valid(bb_valid)
  );

  cdr_loop_filter #(.PI_BITS(CDR_PI_BITS), .INT_W(CDR_INT_W)) u_lf (
    .clk, .rst_n, .in_valid(bb_valid), .bb,
    .kp_shift(cfg.kp_shift), .ki_shift(cfg.ki_shift), .ki_en(cfg.ki_en),
    .code(edge_code), .integ
  );

  jitter_smoothing_filter #(.PI_BITS(CDR_PI_BITS)) u_sf (
    .clk, .rst_n, .en(word_stb), .code_in(edge_code), .avg_shift(cfg.avg_shift),
    .code_out(data_code)
  );

  dfe_unrolled #(.WORD_W(WORD_W)) u_dfe (
    .clk, .rst_n, .in_valid(wv), .dp(w_dp), .dn(w_dn), .d(data_word), .out_valid(data_valid)
  );
endmodule
