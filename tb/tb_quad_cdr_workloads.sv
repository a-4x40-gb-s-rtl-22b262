// tb_quad_cdr_workloads: the four-lane core under the operating conditions the design targets.
//
// Same behavioural front end as tb_quad_cdr_top (pseudo-random data through a channel with one
// pre- and one post-cursor, samplers placed by the unwrapped PI and PLL rotator codes), now with
// a settable frequency offset and sinusoidal jitter (SJ) on the incoming data. Each scenario
// resets the core, lets it lock for LOCK_WORDS words and then, for MEAS_WORDS words, requires
// error-free recovered data on all four lanes; without SJ it also requires the total rotation to
// match the offset within 5 % and the PLL rotator to carry most of it (none when the shared
// tracking is off). The mean and rms distance of the data sampling instant from the bit centre
// are printed. Scenarios: 100 ppm, +344 ppm, -344 ppm offset; 100 ppm with the shared tracking
// off, so the lane PIs rotate alone; 0.5 UIpp SJ at 1 MHz and 0.2 UIpp SJ at 80 MHz; and an eye
// with about 0.8 UIpp of DDJ (cursors 100/45/45: zero crossings spread from 5.8 to 58.2 codes),
// once with alpha = 0 and once with alpha = 55. The channel is symmetric, so both lock at the
// centre; the filtered case must do so with only the 1100/0011 transitions it keeps.
// Time base: 64 codes per 25 ps UI.
module tb_quad_cdr_workloads;
  import cdr_pkg::*;

  localparam int L = CDR_LANES;
  localparam int W = CDR_WORD_W;

  // Channel and sampler model
  localparam real A     = 100.0;
  real H1  = 30.0;                  // first post-cursor (set per scenario)
  real HM1 = 30.0;                  // first pre-cursor (set per scenario)
  localparam int LOCK_WORDS  = 3000;
  localparam int MEAS_WORDS  = 1500;
  localparam int N_SCEN      = 8;
  localparam real CODE_S     = 25.0e-12 / 64.0;   // seconds per phase code

  real ppm = 0.0, UI_TX = 64.0, sj_amp = 0.0, sj_hz = 0.0;   // sj_amp: codes, peak

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
  real alpha = 70.0;            // +/-alpha sampler thresholds of the phase detector

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
    u  = (t - t0[lane] - sj_amp * $sin(2.0 * 3.14159265358979 * sj_hz * t * CODE_S)) / UI_TX;
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


  always @(negedge clk) begin
    if (rst_n) begin
      // unwrap the codes in effect
      for (int l = 0; l < L; l++) begin
        logic signed [CDR_PI_BITS-1:0] de, dd;
        de = signed'(edge_code[l] - pe_q[l]);
        dd = signed'(data_code[l] - pd_q[l]);
        ph_e[l] += real'(de);
        ph_d[l] += real'(dd);
        pe_q[l] = edge_code[l];
        pd_q[l] = data_code[l];
      end
      begin
        logic signed [CDR_ROT_BITS-1:0] dr;
        dr = signed'(rot_code - pr_q);
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
          u  = (td - t0[l] - sj_amp * $sin(2.0 * 3.14159265358979 * sj_hz * td * CODE_S)) / UI_TX;
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
  int scen_errs = 0;
  bit measuring = 0;
  real off_sum = 0.0, off_sq = 0.0;
  int  off_n = 0;

  always @(posedge clk) begin
    if (rst_n && data_valid) begin
      if (measuring) begin
        for (int l = 0; l < L; l++) begin
          int errs;
          errs = 0;
          for (int j = 0; j < W; j++) begin
            longint k;
            k = longint'(word_no) * W + j;
            if (data_word[l][j] != exp_bit[l][k % RING]) errs++;
            if (j == 0) begin
              off_sum += samp_off[l][k % RING];
              off_sq  += samp_off[l][k % RING] * samp_off[l][k % RING];
              off_n++;
            end
          end
          scen_errs += errs;
        end
      end
      word_no <= word_no + 1;
    end
  end

  real last_rms;

  task automatic scenario(input string name, input real p, input real sj_uipp, input real sj_mhz,
                          input bit shared, input real isi, input real a);
    real r0 [L], rr0, want, got, mean;
    @(negedge clk);
    shared_cfg.ft_en = shared;
    H1 = isi; HM1 = isi; alpha = a;
    rst_n = 1'b0;
    ppm = p; UI_TX = 64.0 * (1.0 - p * 1.0e-6);
    sj_amp = sj_uipp * 64.0 / 2.0; sj_hz = sj_mhz * 1.0e6;
    repeat (20) @(negedge clk);
    fc = 0; word_no = 0; scen_errs = 0; off_sum = 0.0; off_sq = 0.0; off_n = 0;
    for (int l = 0; l < L; l++) begin ph_e[l] = 0.0; ph_d[l] = 0.0; pe_q[l] = '0; pd_q[l] = '0; end
    ph_r = 0.0; pr_q = '0;
    rst_n = 1'b1;
    wait (word_no == LOCK_WORDS);
    for (int l = 0; l < L; l++) r0[l] = ph_e[l] + ph_r;
    rr0 = ph_r;
    measuring = 1;
    wait (word_no == LOCK_WORDS + MEAS_WORDS);
    measuring = 0;
    checks++;
    if (scen_errs != 0) failures++;
    mean = off_sum / real'(off_n);
    last_rms = $sqrt(off_sq / real'(off_n) - mean * mean);
    $display("%s: %0d bit errors in %0d words x %0d lanes; data sampling %0.1f codes from centre, rms wander %0.2f codes",
             name, scen_errs, MEAS_WORDS, L, mean, last_rms);
    if (sj_uipp == 0.0) begin
      want = (UI_TX - 64.0) * real'(W) * real'(MEAS_WORDS);
      for (int l = 0; l < L; l++) begin
        got = ph_e[l] + ph_r - r0[l];
        checks++;
        if (got - want > 0.05 * (want < 0 ? -want : want) || want - got > 0.05 * (want < 0 ? -want : want)) begin
          failures++;
          $display("%s lane %0d: rotation %0.1f codes, offset needs %0.1f", name, l, got, want);
        end
      end
      // share of the rotation carried by the PLL rotator: most of it, or none when disabled
      got = (ph_r - rr0) / want;
      $display("%s: PLL rotator share %0.2f", name, got);
      checks++;
      if (shared ? (got < 0.6) : (got != 0.0)) failures++;
    end
  endtask

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
    scenario("100 ppm", 100.0, 0.0, 0.0, 1, 30.0, 70.0);
    scenario("+344 ppm", 344.0, 0.0, 0.0, 1, 30.0, 70.0);
    scenario("-344 ppm", -344.0, 0.0, 0.0, 1, 30.0, 70.0);
    scenario("100 ppm, lane PIs only (shared tracking off)", 100.0, 0.0, 0.0, 0, 30.0, 70.0);
    scenario("SJ 0.5 UIpp at 1 MHz, 100 ppm", 100.0, 0.5, 1.0, 1, 30.0, 70.0);
    scenario("SJ 0.2 UIpp at 80 MHz, 100 ppm", 100.0, 0.2, 80.0, 1, 30.0, 70.0);
    scenario("0.8 UIpp DDJ, 100 ppm, alpha = 0 (no filtering)", 100.0, 0.0, 0.0, 1, 45.0, 0.0);
    scenario("0.8 UIpp DDJ, 100 ppm, alpha = 55", 100.0, 0.0, 0.0, 1, 45.0, 55.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (N_SCEN * (LOCK_WORDS + MEAS_WORDS + 50) * (W / CDR_QR) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired at word %0d", word_no);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
