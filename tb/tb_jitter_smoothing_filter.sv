// tb_jitter_smoothing_filter: the data code is compared every clock with an integer reference
// of the exponential average (acc += floor(wrap(code<<8 - acc) / 2^s), out = round(acc/2^8)).
// Also checked: avg_shift = 0 gives the input one clock later; after a step the output settles
// on the new code; a dithering input (+-2 codes) gives a steadier output; the average follows the
// code across the 255 -> 0 wrap.
module tb_jitter_smoothing_filter;
  localparam int PI_BITS = 8, SF_FRAC = 8, WA = PI_BITS + SF_FRAC;
  logic clk = 0, rst_n = 0, en = 0;
  logic [PI_BITS-1:0] code_in = '0, code_out;
  logic [2:0] avg_shift = '0;
  int checks = 0, failures = 0;

  jitter_smoothing_filter #(.PI_BITS(PI_BITS), .SF_FRAC(SF_FRAC)) dut (.*);
  always #5 clk = ~clk;

  int r_acc = 0;

  task automatic tick(input int c);
    int diff;
    @(negedge clk);
    code_in = PI_BITS'(c); en = 1;
    diff = ((c << SF_FRAC) - r_acc) & ((1 << WA) - 1);
    if (diff >= (1 << (WA - 1))) diff -= (1 << WA);
    diff = (diff >= 0) ? (diff >> avg_shift) : -((-diff + (1 << avg_shift) - 1) >> avg_shift);
    r_acc = (r_acc + diff) & ((1 << WA) - 1);
    @(posedge clk); #1;
    checks++;
    if (code_out !== PI_BITS'((r_acc + (1 << (SF_FRAC - 1))) >> SF_FRAC)) begin
      failures++;
      if (failures < 10) $display("out %0d ref %0d", code_out, ((r_acc + 128) >> 8) & 255);
    end
  endtask

  initial begin
    int c, lo, hi;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // bypass
    avg_shift = 0;
    for (int k = 0; k < 50; k++) begin
      c = int'($urandom % 256);
      tick(c);
      checks++; if (code_out !== PI_BITS'(c)) failures++;
    end
    // step response with s = 3 settles
    avg_shift = 3;
    for (int k = 0; k < 100; k++) tick(100);
    checks++; if (code_out !== 8'd100) begin failures++; $display("no settle: %0d", code_out); end
    // dither +-2 around 100: output must stay within +-1
    lo = 255; hi = 0;
    for (int k = 0; k < 200; k++) begin
      tick((k % 2) ? 102 : 98);
      if (k > 20) begin
        if (int'(code_out) < lo) lo = int'(code_out);
        if (int'(code_out) > hi) hi = int'(code_out);
      end
    end
    checks++; if (hi - lo > 1) begin failures++; $display("dither passed: %0d..%0d", lo, hi); end
    // wrap: ramp up through 255 -> 0
    c = 200;
    for (int k = 0; k < 150; k++) begin tick(c % 256); c++; end
    for (int k = 0; k < 60; k++) tick(c % 256);
    checks++; if (code_out !== PI_BITS'(c % 256)) begin failures++; $display("wrap: %0d vs %0d", code_out, c % 256); end
    // random codes and shifts
    for (int k = 0; k < 2000; k++) begin
      if (k % 100 == 0) avg_shift = 3'($urandom);
      tick(int'($urandom % 256));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
