// tb_cdr_loop_filter: random bang-bang decisions and gain settings against an integer
// reference of the second-order filter: integ += bb (saturating), phase += bb*2^kp +
// floor(integ*2^6 / 2^ki) (if ki_en), modulo 2^24; code = phase / 2^16. Code and integrator are
// compared after every update; a long run of +1 checks the integrator's saturation.
module tb_cdr_loop_filter;
  localparam int PI_BITS = 8, PH_FRAC = 16, INT_W = 20, KI_SCALE = 6;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [1:0] bb = '0;
  logic [4:0] kp_shift = 5'd10, ki_shift = 5'd4;
  logic ki_en = 1;
  logic [PI_BITS-1:0] code;
  logic signed [INT_W-1:0] integ;
  int checks = 0, failures = 0;

  cdr_loop_filter #(.PI_BITS(PI_BITS), .PH_FRAC(PH_FRAC), .INT_W(INT_W), .KI_SCALE(KI_SCALE)) dut (.*);
  always #5 clk = ~clk;

  longint r_phase = 0, r_int = 0;
  localparam longint PMOD = 64'd1 << (PI_BITS + PH_FRAC);
  localparam longint IMAX = (64'd1 << (INT_W - 1)) - 1;

  task automatic step(input int b);
    longint it;
    @(negedge clk);
    bb = 2'(b); in_valid = 1;
    it = 0;
    if (ki_en) begin
      // floor division by 2^ki of integ*2^6
      it = (r_int * 64);
      it = (it >= 0) ? (it >> ki_shift) : -((-it + (64'd1 << ki_shift) - 1) >> ki_shift);
    end
    r_phase = (r_phase + (longint'(b) << kp_shift) + it) % PMOD;
    if (r_phase < 0) r_phase += PMOD;
    r_int = r_int + b;
    if (r_int > IMAX) r_int = IMAX;
    if (r_int < -IMAX - 1) r_int = -IMAX - 1;
    @(posedge clk); #1; in_valid = 0;
    checks++;
    if (code !== PI_BITS'(r_phase >> PH_FRAC) || longint'(integ) != r_int) begin
      failures++;
      if (failures < 10) $display("code %0d/%0d integ %0d/%0d", code, r_phase >> PH_FRAC, integ, r_int);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      if (k % 300 == 0) begin
        kp_shift = 5'(8 + $urandom % 10);
        ki_shift = 5'($urandom % 12);
        ki_en = 1'($urandom);
      end
      step(int'($urandom % 3) - 1);
    end
    // in_valid low: nothing moves
    begin
      logic [PI_BITS-1:0] c0;
      c0 = code;
      @(negedge clk); bb = 2'sd1; repeat (5) @(posedge clk); #1;
      checks++; if (code !== c0) failures++;
    end
    // integrator saturation at the positive end
    ki_en = 0;
    @(negedge clk); bb = 2'sd1; in_valid = 1;
    repeat ((1 << (INT_W - 1)) + 100) @(posedge clk);
    #1; in_valid = 0;
    checks++; if (integ !== INT_W'(IMAX)) begin failures++; $display("no saturation: %0d", integ); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (700000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
