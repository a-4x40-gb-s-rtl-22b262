// tb_dfe_unrolled: random speculative sampler words; the reference picks dp or dn by the
// previously decided bit, carrying the last bit across words. Also a generated channel case:
// bits with a first post-cursor h1, sampled against +h1/-h1, must be recovered exactly.
module tb_dfe_unrolled;
  localparam int W = 64;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [W-1:0] dp = '0, dn = '0, d;
  logic out_valid;
  int checks = 0, failures = 0;

  dfe_unrolled #(.WORD_W(W)) dut (.*);
  always #5 clk = ~clk;

  logic prev = 0;

  task automatic word(input logic [W-1:0] p, input logic [W-1:0] n, input logic [W-1:0] want, input bit use_want);
    logic [W-1:0] r;
    logic b;
    @(negedge clk);
    dp = p; dn = n; in_valid = 1;
    b = prev;
    for (int i = 0; i < W; i++) begin r[i] = b ? p[i] : n[i]; b = r[i]; end
    prev = b;
    @(posedge clk); #1; in_valid = 0;
    checks++;
    if (!out_valid || d !== r || (use_want && d !== want)) begin
      failures++; $display("d %h ref %h want %h", d, r, want);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) word({$urandom, $urandom}, {$urandom, $urandom}, '0, 0);
    // channel case: level = 100*b[i] + 40*b[i-1] + noise(+-20); thresholds +-40
    for (int k = 0; k < 200; k++) begin
      logic [W-1:0] bits, p, n;
      int lv, bp;
      bits = {$urandom, $urandom};
      bp = prev ? 1 : -1;
      for (int i = 0; i < W; i++) begin
        int bi;
        bi = bits[i] ? 1 : -1;
        lv = 100 * bi + 40 * bp + int'($urandom % 41) - 20;
        p[i] = (lv > 40);
        n[i] = (lv > -40);
        bp = bi;
      end
      word(p, n, bits, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
