// tb_ddj_filter_pd: random sampler words checked against a bit-by-bit reference.
//
// Each UI gets a random level class (strong 1: above +alpha, weak inside the band, strong 0:
// below -alpha), from which sp and sn follow, and a random edge sample. The reference walks the
// 64 boundaries of each word, carrying the last UI of the previous word, counts the boundaries
// that go from one strong level to the opposite one, and scores early (+1) / late (-1) from the
// edge sample. A second phase uses sp = sn (alpha = 0), where every data transition must be used.
// Vote, count and the one-clock latency are checked.
module tb_ddj_filter_pd;
  import cdr_pkg::*;
  localparam int W = 64;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [W-1:0] sp = '0, sn = '0, e = '0;
  logic signed [VOTE_W-1:0] vote;
  logic [CNT_W-1:0] n_valid;
  logic out_valid;
  int checks = 0, failures = 0;

  ddj_filter_pd #(.WORD_W(W)) dut (.*);
  always #5 clk = ~clk;

  logic p_sp = 0, p_sn = 0;     // reference copy of the previous word's last UI

  task automatic run_word(input bit alpha0);
    int ref_vote, ref_n;
    logic a_sp, a_sn;
    @(negedge clk);
    for (int i = 0; i < W; i++) begin
      int cls;
      cls = alpha0 ? (($urandom % 2) * 2) : int'($urandom % 3);   // 0 strong0, 1 weak, 2 strong1
      sp[i] = (cls == 2);
      sn[i] = (cls != 0);
      e[i]  = 1'($urandom);
    end
    in_valid = 1;
    ref_vote = 0; ref_n = 0;
    a_sp = p_sp; a_sn = p_sn;
    for (int i = 0; i < W; i++) begin
      bit r, f;
      r = !a_sn && sp[i];
      f = a_sp && !sn[i];
      if (r || f) begin
        ref_n++;
        // edge equal to the bit before the boundary: clock early
        if ((r && e[i] == 1'b0) || (f && e[i] == 1'b1)) ref_vote++; else ref_vote--;
      end
      a_sp = sp[i]; a_sn = sn[i];
    end
    p_sp = sp[W-1]; p_sn = sn[W-1];
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid || vote !== VOTE_W'(ref_vote) || n_valid !== CNT_W'(ref_n)) begin
      failures++;
      $display("vote %0d/%0d n %0d/%0d valid %b", vote, ref_vote, n_valid, ref_n, out_valid);
    end
    @(posedge clk); #1;
    checks++; if (out_valid) failures++;           // a single pulse per word
    if (alpha0) begin
      // with alpha = 0 every data transition is a qualified one
      int t;
      t = 0;
      for (int i = 1; i < W; i++) if (sp[i] != sp[i-1]) t++;
      checks++; if (n_valid < CNT_W'(t)) failures++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) run_word(0);
    for (int k = 0; k < 100; k++) run_word(1);
    // all-early word: alternating strong levels, edge equals the bit before
    @(negedge clk);
    for (int i = 0; i < W; i++) begin sp[i] = i[0]; sn[i] = i[0]; e[i] = ~i[0]; end
    in_valid = 1; @(posedge clk); #1; in_valid = 0;
    checks++; if (vote !== VOTE_W'(W - 1) && vote !== VOTE_W'(W)) begin failures++; $display("all-early vote %0d", vote); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
