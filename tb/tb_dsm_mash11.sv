// tb_dsm_mash11: bit-exact comparison with a MASH 1-1 reference for random signed inputs, plus
// the defining property: over 4096 clocks the output steps add up to 4096*x/2^10 within 2.
module tb_dsm_mash11;
  import cdr_pkg::*;
  localparam int IN_W = 24, FRAC = 10;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [IN_W-1:0] x = '0;
  logic signed [DSM_Y_W-1:0] y;
  int checks = 0, failures = 0;

  dsm_mash11 #(.IN_W(IN_W), .FRAC(FRAC)) dut (.*);
  always #5 clk = ~clk;

  int e1 = 0, e2 = 0, c2d = 0;
  localparam int M = 1 << FRAC;

  task automatic run(input int xv, input int n);
    longint sum;
    int fl, fr, s1, s2, c1, c2, ry;
    sum = 0;
    fl = (xv >= 0) ? xv / M : -((-xv + M - 1) / M);
    fr = xv - fl * M;
    for (int k = 0; k < n; k++) begin
      @(negedge clk); x = IN_W'(xv); en = 1;
      s1 = e1 + fr; c1 = s1 / M; e1 = s1 % M;
      s2 = e2 + e1; c2 = s2 / M; e2 = s2 % M;
      ry = fl + c1 + c2 - c2d; c2d = c2;
      @(posedge clk); #1;
      checks++;
      if (int'(y) != ry) begin failures++; if (failures < 10) $display("x=%0d y=%0d ref=%0d", xv, y, ry); end
      sum += longint'(y);
    end
    checks++;
    if (sum * M - longint'(xv) * n > 2 * M || longint'(xv) * n - sum * M > 2 * M) begin
      failures++; $display("mean wrong: x=%0d sum=%0d", xv, sum);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1443, 4096);     // 1.41 codes per clock
    run(-1443, 4096);
    run(37, 4096);
    run(-5, 4096);
    for (int k = 0; k < 10; k++) run(int'($urandom % 8001) - 4000, 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
