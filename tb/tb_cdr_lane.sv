// tb_cdr_lane: one lane, first open loop, then closed around a behavioural channel.
//
// Open loop: every transition of the sampled pattern is reported early (the edge sample equals
// the bit before it), so each word gives bb = +1 and, with KP = 1 code, the edge code must rise by
// exactly one code per word, changing on the third rising edge after the edge that completes
// the word (PD, decimator and loop filter registers after the deserializer).
// Closed loop: a pseudo-random stream with one pre- and one post-cursor arrives 200 ppm fast.
// The lane alone (its own integral path) must track it: error-free DFE data after lock, total
// phase rotation equal to the offset, and a data code that reverses direction far less often
// than the dithering edge code (split path).
module tb_cdr_lane;
  import cdr_pkg::*;
  localparam int W = CDR_WORD_W;
  localparam real A = 100.0, H1 = 30.0, HM1 = 30.0, ALPHA = 70.0;
  localparam real PPM = 200.0;
  localparam real UI_TX = 64.0 * (1.0 - PPM * 1.0e-6);
  localparam int LOCK = 2500, MEAS = 1500;

  logic clk = 0, rst_n = 0, word_stb;
  lane_samples_t smp;
  lane_cfg_t cfg;
  logic [CDR_PI_BITS-1:0] edge_code, data_code;
  logic signed [CDR_INT_W-1:0] integ;
  logic [W-1:0] data_word;
  logic data_valid;
  logic [CNT_W-1:0] pd_valid_cnt;
  int checks = 0, failures = 0;

  cdr_lane dut (.*);
  always #5 clk = ~clk;

  // word strobe: one clock in 16
  int fc = 0;
  assign word_stb = rst_n && (fc % 16 == 15);
  always @(posedge clk) if (rst_n) fc <= fc + 1;

  bit closed = 0;

  function automatic real txb(input longint n);
    logic [31:0] x;
    x = 32'(n) * 32'h9E3779B1 ^ 32'h1234567;
    x = x ^ (x >> 15); x = x * 32'h2C1B3C6D; x = x ^ (x >> 12); x = x * 32'h297A2D39; x = x ^ (x >> 15);
    return x[7] ? 1.0 : -1.0;
  endfunction
  function automatic real wave(input real t);
    real u, fr; longint n;
    u = (t - 11.0) / UI_TX; n = longint'($floor(u)); fr = u - real'(n);
    return (A*txb(n) + H1*txb(n-1) + HM1*txb(n+1)) * (1.0 - fr)
         + (A*txb(n+1) + H1*txb(n) + HM1*txb(n+2)) * fr;
  endfunction

  real ph_e = 0.0, ph_d = 0.0;
  logic [7:0] pe_q = '0, pd_q = '0;
  localparam int RING = 4096;
  logic exp_bit [RING];
  int n_edge_moves = 0, n_data_moves = 0, last_de = 0, last_dd = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      logic signed [7:0] de, dd;
      de = signed'(edge_code - pe_q); dd = signed'(data_code - pd_q);
      ph_e += real'(de); ph_d += real'(dd);
      pe_q = edge_code; pd_q = data_code;
      for (int q = 0; q < CDR_QR; q++) begin
        longint k; real te, td, v, u;
        k = longint'(fc) * CDR_QR + q;
        if (!closed) begin
          // pattern 0011...: bit k = k[1]; edge sample equal to the bit before the boundary
          smp.sp[q] = k[1]; smp.sn[q] = k[1];
          smp.e[q]  = ((k + 3) % 4 >= 2);
          smp.dp[q] = k[1]; smp.dn[q] = k[1];
        end else begin
          te = real'(k) * 64.0 + ph_e;
          v = wave(te);         smp.e[q]  = (v > 0.0);
          v = wave(te + 32.0);  smp.sp[q] = (v > ALPHA); smp.sn[q] = (v > -ALPHA);
          td = real'(k) * 64.0 + ph_d + 32.0;
          v = wave(td);         smp.dp[q] = (v > H1); smp.dn[q] = (v > -H1);
          u = (td - 11.0) / UI_TX;
          exp_bit[k % RING] = (txb(longint'($floor(u + 0.5))) > 0.0);
        end
      end
    end
  end

  int word_no = 0, word_abs = 0;
  logic [7:0] ew_q = '0, dw_q = '0;
  always @(posedge clk) if (rst_n && data_valid) begin
    word_abs <= word_abs + 1;
    if (closed && word_no > LOCK) begin
      int errs; errs = 0;
      for (int j = 0; j < W; j++) if (data_word[j] != exp_bit[(longint'(word_abs) * W + j) % RING]) errs++;
      checks++;
      if (errs != 0) begin failures++; if (failures < 10) $display("word %0d: %0d errors", word_no, errs); end
    end
    word_no <= word_no + 1;
  end
  always @(posedge clk) if (rst_n && word_stb && closed && word_no > LOCK) begin
    // count direction reversals of each code
    begin
      int de, dd;
      de = int'(signed'(8'(edge_code - ew_q)));
      dd = int'(signed'(8'(data_code - dw_q)));
      if (de != 0) begin if (de * last_de < 0) n_edge_moves++; last_de = de; end
      if (dd != 0) begin if (dd * last_dd < 0) n_data_moves++; last_dd = dd; end
    end
    ew_q <= edge_code;
    dw_q <= data_code;
  end

  initial begin
    logic [7:0] c0;
    int t_stb;
    real tot0;
    smp = '0;
    cfg = '{dec_log2: 3'd0, kp_shift: 5'd16, ki_shift: 5'd0, ki_en: 1'b0, avg_shift: 3'd0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // ---- open loop: +1 code per word, 4-clock latency ----
    repeat (5) @(posedge word_stb);
    for (int w = 0; w < 20; w++) begin
      @(posedge clk iff word_stb);
      c0 = edge_code;
      repeat (2) @(posedge clk);
      #1; checks++; if (edge_code !== c0) begin failures++; $display("code moved too early"); end
      @(posedge clk); #1;
      checks++; if (edge_code !== c0 + 8'd1) begin failures++; $display("code %0d after %0d", edge_code, c0); end
    end
    // ---- closed loop ----
    @(negedge clk);
    closed = 1; word_no = 0;
    cfg = '{dec_log2: 3'd0, kp_shift: 5'd16, ki_shift: 5'd0, ki_en: 1'b1, avg_shift: 3'd3};
    wait (word_no == LOCK);
    tot0 = ph_e;
    wait (word_no == LOCK + MEAS);
    begin
      real want, got;
      want = (UI_TX - 64.0) * real'(W) * real'(MEAS);
      got  = ph_e - tot0;
      $display("rotation %0.1f codes, needed %0.1f; edge reversals %0d, data reversals %0d", got, want, n_edge_moves, n_data_moves);
      checks++; if (got - want > -0.05 * want || want - got > -0.05 * want) failures++;
      checks++; if (n_data_moves * 4 > n_edge_moves) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat ((LOCK + MEAS + 200) * 16) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
