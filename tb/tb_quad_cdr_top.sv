// tb_quad_cdr_top: end-to-end test of the four-lane CDR core at its default size.
//
// A behavioural receiver front end closes the loop around the digital core. Each lane receives
// its own pseudo-random 40 Gb/s stream through a channel with one pre-cursor and one post-cursor
// (pulse levels A, H1, HM1), from a transmitter whose bit rate is off by PPM from the local
// reference. Time is measured in phase codes (64 per UI). A sampler taken at time t sees the
// channel waveform, linearly interpolated between bit centres, so the zero crossing of a
// transition moves with the surrounding bits (data-dependent jitter). The samplers' clock phase
// is the lane's PI code plus the shared PLL rotator code (both unwrapped), so the lane PI and
// the PLL rotation together must follow the frequency offset.
//
// Scenario (all words are 64 UI):
//   1. lock with the DDJ filter on (alpha = 70), D = 1, split path on, shared tracking on;
//   2. check error-free recovered data, sampling phase near the eye centre, total rotation
//      equal to the offset and most of it carried by the shared PLL rotator;
//   3. switch to D = 2, then to alpha = 0 (every transition used) and check the lock holds.
// Mechanisms counted: DDJ rejections, split-path smoothing, delta-sigma steps, rotator and
// lane PI wrap-around, decimation change, filter-off mode. Each must occur at least once.
module tb_quad_cdr_top;
  import cdr_pkg::*;

  localparam int L = CDR_LANES;
  localparam int W = CDR_WORD_W;

  // Channel and sampler model
  localparam real A     = 100.0;
  localparam real H1    = 30.0;     // first post-cursor
  localparam real HM1   = 30.0;     // first pre-cursor
  localparam real PPM   = 300.0;    // transmitter faster than the local reference
  localparam real UI_TX = 64.0 * (1.0 - PPM * 1.0e-6);

  localparam int LOCK_WORDS  = 2500;
  localparam int P2_WORDS    = 1500;  // words measured for rate and data
  localparam int P3_WORDS    = 400;   // D = 2
  localparam int P4_WORDS    = 400;   // alpha = 0
  localparam int TOTAL_WORDS = LOCK_WORDS + P2_WORDS + P3_WORDS + P4_WORDS;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  lane_samples_t [L-1:0]           smp;
  lane_cfg_t     [L-1:0]           lane_cfg;
  shared_cfg_t                     shared_cfg;
  logic                            word_stb;
  logic [L-1:0][CDR_PI_BITS-1:0]   edge_code, data_code;
  logic [CDR_ROT_BITS-1:0]         rot_code;
  logic [L-1:0][W-1:0]             data_word;
  logic                            data_valid;
  logic [L-1:0][CNT_W-1:0]         pd_valid_cnt;
  logic signed [DSM_Y_W-1:0]       dsm_out;

  quad_cdr_top dut (.*);

  always #1 clk = ~clk;   // one time unit = 50 ps: 10 GHz clock

  int checks = 0, failures = 0;
  real alpha = 70.0;

  // ---------------- transmitter and channel ----------------
  function automatic real txb(input int lane, input longint n);
    logic [31:0] x;
    x = 32'(n) * 32'h9E3779B1 ^ (32'(lane) * 32'h85EBCA6B) ^ 32'h27d4eb2f;
    x = x ^ (x >> 15);
    x = x * 32'h2C1B3C6D;
    x = x ^ (x >> 12);
    x = x * 32'h297A2D39;
    x = x ^ (x >> 15);
    return x[7] ? 1.0 : -1.0;
  endfunction

  function automatic real level(input int lane, input longint n);
    return A * txb(lane, n) + H1 * txb(lane, n - 1) + HM1 * txb(lane, n + 1);
  endfunction

  real t0 [L];   // per-lane skew of the incoming data, in codes

  function automatic real wave(input int lane, input real t);
    real    u, fr;
    longint n;
    u  = (t - t0[lane]) / UI_TX;
    n  = longint'($floor(u));
    fr = u - real'(n);
    return level(lane, n) * (1.0 - fr) + level(lane, n + 1) * fr;
  endfunction

  // ---------------- unwrapped PI / rotator phases ----------------
  real ph_e [L], ph_d [L], ph_r;
  logic [CDR_PI_BITS-1:0]  pe_q [L], pd_q [L];
  logic [CDR_ROT_BITS-1:0] pr_q;

  // Expected data: nearest transmitted bit to each DFE sampling instant, ring buffer per lane.
  localparam int RING = 4096;
  logic exp_bit [L][RING];
  real  samp_off [L][RING];    // DFE sampling instant minus nearest bit centre, codes

  longint fc = 0;              // fast cycles since reset release

  // Mechanism counters
  int n_ddj_reject = 0, n_smooth = 0, n_dsm_step = 0, n_rot_wrap = 0, n_pi_wrap = 0;
  int n_dec2_words = 0, n_alpha0_words = 0, n_dsm_var = 0;
  logic signed [DSM_Y_W-1:0] dsm_prev = '0;

  always @(negedge clk) begin
    if (rst_n) begin
      // unwrap the codes in effect
      for (int l = 0; l < L; l++) begin
        logic signed [CDR_PI_BITS-1:0] de, dd;
        de = signed'(edge_code[l] - pe_q[l]);
        dd = signed'(data_code[l] - pd_q[l]);
        if (edge_code[l] < 8'd32 && pe_q[l] > 8'd224 || edge_code[l] > 8'd224 && pe_q[l] < 8'd32)
          n_pi_wrap++;
        ph_e[l] += real'(de);
        ph_d[l] += real'(dd);
        pe_q[l] = edge_code[l];
        pd_q[l] = data_code[l];
        if (edge_code[l] != data_code[l]) n_smooth++;
      end
      begin
        logic signed [CDR_ROT_BITS-1:0] dr;
        dr = signed'(rot_code - pr_q);
        if (rot_code < 8'd32 && pr_q > 8'd224 || rot_code > 8'd224 && pr_q < 8'd32) n_rot_wrap++;
        ph_r += real'(dr);
        pr_q = rot_code;
      end
      // sampler outputs for the samples latched at the next rising edge
      for (int l = 0; l < L; l++) begin
        for (int q = 0; q < CDR_QR; q++) begin
          longint k;
          real te, td, v, u;
          longint nn;
          k  = fc * CDR_QR + q;
          te = real'(k) * 64.0 + ph_e[l] + ph_r;
          v  = wave(l, te);
          smp[l].e[q]  = (v > 0.0);
          v  = wave(l, te + 32.0);
          smp[l].sp[q] = (v > alpha);
          smp[l].sn[q] = (v > -alpha);
          td = real'(k) * 64.0 + ph_d[l] + ph_r + 32.0;
          v  = wave(l, td);
          smp[l].dp[q] = (v > H1);
          smp[l].dn[q] = (v > -H1);
          u  = (td - t0[l]) / UI_TX;
          nn = longint'($floor(u + 0.5));
          exp_bit[l][k % RING]  = (txb(l, nn) > 0.0);
          samp_off[l][k % RING] = (u - real'(nn)) * 64.0;
        end
      end
    end
  end

  always @(posedge clk) if (rst_n) fc <= fc + 1;

  // ---------------- checking recovered words ----------------
  int word_no = 0;
  real rot_at_p2, tot_at_p2 [L], rot_at_p2e, tot_at_p2e [L];
  int  max_off_bad = 0;

  always @(posedge clk) begin
    if (rst_n && word_stb) begin
      if (dsm_out != 0) n_dsm_step++;
      if (dsm_out != dsm_prev) n_dsm_var++;
      dsm_prev <= dsm_out;
    end
    if (rst_n && data_valid) begin
      if (word_no > LOCK_WORDS) begin
        for (int l = 0; l < L; l++) begin
          int errs, trans;
          real worst;
          errs = 0; worst = 0.0; trans = 0;
          for (int j = 0; j < W; j++) begin
            longint k;
            k = longint'(word_no) * W + j;
            if (data_word[l][j] != exp_bit[l][k % RING]) errs++;
            if ((samp_off[l][k % RING] > worst) || (-samp_off[l][k % RING] > worst))
              worst = (samp_off[l][k % RING] > 0.0) ? samp_off[l][k % RING] : -samp_off[l][k % RING];
            if (j > 0 && data_word[l][j] != data_word[l][j-1]) trans++;
          end
          checks++;
          if (errs != 0) begin
            failures++;
            if (failures < 10) $display("lane %0d word %0d: %0d bit errors", l, word_no, errs);
          end
          checks++;
          if (worst > 16.0) begin
            failures++;
            if (failures < 10) $display("lane %0d word %0d: sampling %0.1f codes from centre", l, word_no, worst);
          end
          if (alpha > 0.0 && pd_valid_cnt[l] < CNT_W'(trans)) n_ddj_reject++;
        end
      end
      word_no <= word_no + 1;
    end
  end

  // ---------------- scenario ----------------
  initial begin
    for (int l = 0; l < L; l++) begin
      t0[l] = 23.0 * real'(l) + 5.0;
      ph_e[l] = 0.0; ph_d[l] = 0.0; pe_q[l] = '0; pd_q[l] = '0;
      lane_cfg[l] = '{dec_log2: 3'd0, kp_shift: 5'd16, ki_shift: 5'd2, ki_en: 1'b1, avg_shift: 3'd3};
      smp[l] = '0;
    end
    ph_r = 0.0; pr_q = '0;
    shared_cfg = '{ft_en: 1'b1, ks_shift: 5'd0};
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    wait (word_no == LOCK_WORDS);
    rot_at_p2 = ph_r;
    for (int l = 0; l < L; l++) tot_at_p2[l] = ph_e[l] + ph_r;
    wait (word_no == LOCK_WORDS + P2_WORDS);
    rot_at_p2e = ph_r;
    for (int l = 0; l < L; l++) tot_at_p2e[l] = ph_e[l] + ph_r;
    begin
      real want, got, shr;
      want = (UI_TX - 64.0) * real'(W) * real'(P2_WORDS);   // codes over the window
      for (int l = 0; l < L; l++) begin
        got = tot_at_p2e[l] - tot_at_p2[l];
        checks++;
        if ((got - want) > 0.05 * (-want) || (want - got) > 0.05 * (-want)) begin
          failures++;
          $display("lane %0d rotation %0.1f codes, offset needs %0.1f", l, got, want);
        end
      end
      shr = (rot_at_p2e - rot_at_p2) / want;
      $display("rotation needed %0.1f codes over %0d words, shared rotator share %0.2f", want, P2_WORDS, shr);
      checks++;
      if (shr < 0.6) begin
        failures++;
        $display("shared rotator carries only %0.2f of the frequency offset", shr);
      end
    end

    for (int l = 0; l < L; l++) lane_cfg[l].dec_log2 = 3'd1;
    wait (word_no == LOCK_WORDS + P2_WORDS + P3_WORDS);
    n_dec2_words = P3_WORDS;
    alpha = 0.0;
    wait (word_no == TOTAL_WORDS);
    n_alpha0_words = P4_WORDS;

    $display("mechanisms: ddj_reject=%0d smooth=%0d dsm_step=%0d dsm_var=%0d rot_wrap=%0d pi_wrap=%0d dec2_words=%0d alpha0_words=%0d",
             n_ddj_reject, n_smooth, n_dsm_step, n_dsm_var, n_rot_wrap, n_pi_wrap, n_dec2_words, n_alpha0_words);
    checks++; if (n_ddj_reject == 0)   failures++;
    checks++; if (n_smooth == 0)       failures++;
    checks++; if (n_dsm_step == 0)     failures++;
    checks++; if (n_dsm_var == 0)      failures++;
    checks++; if (n_rot_wrap == 0)     failures++;
    checks++; if (n_pi_wrap == 0)      failures++;
    checks++; if (n_dec2_words == 0)   failures++;
    checks++; if (n_alpha0_words == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat ((TOTAL_WORDS + 100) * (W / CDR_QR) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired at word %0d", word_no);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
