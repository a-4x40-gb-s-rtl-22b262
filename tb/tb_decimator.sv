// tb_decimator: random votes for every D = 1, 2, 4, 8; after each D-th vote one decision equal
// to the sign of the D votes' sum must appear one clock later, and no decision in between.
module tb_decimator;
  import cdr_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [VOTE_W-1:0] vote = '0;
  logic [2:0] dec_log2 = '0;
  logic signed [1:0] bb;
  logic out_valid;
  int checks = 0, failures = 0;

  decimator dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < 4; d++) begin
      @(negedge clk); dec_log2 = 3'(d);
      for (int win = 0; win < 60; win++) begin
        int sum;
        sum = 0;
        for (int k = 0; k < (1 << d); k++) begin
          @(negedge clk);
          vote = VOTE_W'(int'($urandom % 41) - 20);
          if (win % 7 == 3) vote = '0;
          sum += int'(vote);
          in_valid = 1;
          @(posedge clk); #1;
          in_valid = 0;
          checks++;
          if (k < (1 << d) - 1) begin
            if (out_valid) begin failures++; $display("early decision, D=%0d", 1 << d); end
          end else begin
            int exp;
            exp = (sum > 0) ? 1 : (sum < 0) ? -1 : 0;
            if (!out_valid || int'(bb) != exp) begin
              failures++; $display("D=%0d sum=%0d bb=%0d valid=%b", 1 << d, sum, bb, out_valid);
            end
          end
          // idle clocks between words must not advance the window
          @(negedge clk); @(negedge clk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
