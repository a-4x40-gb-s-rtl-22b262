// tb_deserializer: random 4-bit samples every clock and a word strobe every 16th clock. Each
// output word must hold the 64 samples of the 16 clocks ending with its strobe, in arrival order
// (bit 0 earliest), and valid must come exactly one clock after the strobe.
module tb_deserializer;
  localparam int IN_W = 4, OUT_W = 64, N = OUT_W / IN_W;
  logic clk = 0, rst_n = 0, word_stb = 0;
  logic [IN_W-1:0]  din = '0;
  logic [OUT_W-1:0] word;
  logic             valid;
  int checks = 0, failures = 0;

  deserializer #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);
  always #1 clk = ~clk;

  logic [OUT_W-1:0] cur, expw;
  int  c = 0, words = 0;
  logic stb_d = 0;

  // driver: new samples on the falling edge
  always @(negedge clk) if (rst_n) begin
    din      <= IN_W'($urandom);
    word_stb <= (c % N == N - 1);
    c        <= c + 1;
  end

  // reference and checker on the rising edge
  always @(posedge clk) if (rst_n) begin
    logic [OUT_W-1:0] nxt;
    nxt = cur;
    nxt[(c - 1 + N) % N * IN_W +: IN_W] = din;
    cur <= nxt;
    stb_d <= word_stb;
    if (word_stb) expw <= nxt;
    if (c > 1) begin
      checks++;
      if (valid !== stb_d) begin failures++; $display("valid timing wrong at clock %0d", c); end
      if (valid) begin
        checks++;
        if (word !== expw) begin failures++; $display("word %0d: %h vs %h", words, word, expw); end
        words++;
      end
    end
    if (words == 100) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    cur = '0; expw = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
  end
  initial begin repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
