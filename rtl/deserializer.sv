// deserializer: 1:(OUT_W/IN_W) word builder for one sampler.
//
// Every fast (10 GHz quarter-rate) clock cycle brings IN_W samples, bit 0 the earliest. They
// shift into a register from the top, so after OUT_W/IN_W cycles bit 0 of the register holds the
// earliest UI of the word. On the cycle that word_stb is high the register contents together with
// that cycle's samples are loaded into `word` and `valid` pulses one cycle later, aligned with
// `word`. The 1:64 ratio and the quarter-rate input follow the published receiver; the shift
// register and the external word strobe (one common strobe for all deserializers of the chip)
// are choices of this implementation.
module deserializer #(
  parameter int unsigned IN_W  = 4,
  parameter int unsigned OUT_W = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             word_stb,  // this cycle carries the last IN_W samples of a word
  input  logic [IN_W-1:0]  din,
  output logic [OUT_W-1:0] word,
  output logic             valid
);
  logic [OUT_W-1:0] sr;
  logic [OUT_W-1:0] sr_next;

  assign sr_next = {din, sr[OUT_W-1:IN_W]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr    <= '0;
      word  <= '0;
      valid <= 1'b0;
    end else begin
      sr    <= sr_next;
      valid <= word_stb;
      if (word_stb) word <= sr_next;
    end
  end
endmodule
