// tb_shared_freq_track: four random lane integrators per clock; the rotator code is compared
// every clock with a reference (sum, arithmetic shift by ks_shift, MASH 1-1, accumulate modulo
// 256). Checked too: nothing moves with en or ft_en low, and with constant integrators the
// rotator turns at (sum / 2^ks) / 2^10 codes per clock, in both directions.
module tb_shared_freq_track;
  import cdr_pkg::*;
  localparam int L = 4, INT_W = 20, FRAC = 10, M = 1 << FRAC;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [L-1:0][INT_W-1:0] integ = '0;
  shared_cfg_t cfg = '{ft_en: 1'b1, ks_shift: 5'd0};
  logic [7:0] rot_code;
  logic signed [DSM_Y_W-1:0] dsm_out;
  int checks = 0, failures = 0;

  shared_freq_track #(.LANES(L), .INT_W(INT_W), .ROT_BITS(8), .FRAC(FRAC)) dut (.*);
  always #5 clk = ~clk;

  int e1 = 0, e2 = 0, c2d = 0, ry = 0, racc = 0;

  task automatic tick(input int iv [L], input bit do_en);
    int sum, rate, fl, fr, s1, s2, c1, c2;
    @(negedge clk);
    for (int l = 0; l < L; l++) integ[l] = INT_W'(iv[l]);
    en = do_en;
    if (do_en && cfg.ft_en) begin
      sum = 0;
      for (int l = 0; l < L; l++) sum += iv[l];
      rate = sum >>> cfg.ks_shift;
      fl = (rate >= 0) ? rate / M : -((-rate + M - 1) / M);
      fr = rate - fl * M;
      racc = (racc + ry) & 255;          // accumulator adds the registered step
      s1 = e1 + fr; c1 = s1 / M; e1 = s1 % M;
      s2 = e2 + e1; c2 = s2 / M; e2 = s2 % M;
      ry = fl + c1 + c2 - c2d; c2d = c2;
    end
    @(posedge clk); #1;
    checks++;
    if (int'(rot_code) != racc || int'(dsm_out) != ry) begin
      failures++;
      if (failures < 10) $display("rot %0d/%0d y %0d/%0d", rot_code, racc, dsm_out, ry);
    end
  endtask

  initial begin
    int iv [L];
    int r0, r1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      if (k % 500 == 0) cfg.ks_shift = 5'($urandom % 4);
      if (k % 50 == 0) for (int l = 0; l < L; l++) iv[l] = int'($urandom % 2001) - 1000;
      tick(iv, (k % 16) != 5);
    end
    // hold with ft_en low
    cfg.ft_en = 0;
    r0 = int'(rot_code);
    for (int k = 0; k < 20; k++) tick(iv, 1);
    checks++; if (int'(rot_code) != r0) failures++;
    // rate: sum = 4*300 = 1200 -> 1200/1024 codes per clock, over 1024 clocks = 1200 codes
    cfg.ft_en = 1; cfg.ks_shift = 0;
    for (int l = 0; l < L; l++) iv[l] = 300;
    for (int k = 0; k < 8; k++) tick(iv, 1);
    r0 = racc; r1 = 0;
    for (int k = 0; k < 1024; k++) begin
      int r_prev;
      r_prev = int'(rot_code);
      tick(iv, 1);
      r1 += (int'(rot_code) - r_prev + 256 + 128) % 256 - 128;
    end
    checks++; if (r1 < 1200 - 3 || r1 > 1200 + 3) begin failures++; $display("rate %0d", r1); end
    // negative rate: the modulator's range assertion also checks the sum is sign-extended
    for (int l = 0; l < L; l++) iv[l] = -300;
    for (int k = 0; k < 8; k++) tick(iv, 1);
    r1 = 0;
    for (int k = 0; k < 1024; k++) begin
      int r_prev;
      r_prev = int'(rot_code);
      tick(iv, 1);
      r1 += (int'(rot_code) - r_prev + 256 + 128) % 256 - 128;
    end
    checks++; if (r1 < -1200 - 3 || r1 > -1200 + 3) begin failures++; $display("rate %0d", r1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
