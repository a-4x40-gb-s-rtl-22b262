// cdr_loop_filter: second-order digital loop filter of one lane, producing the edge PI code.
//
// Each bang-bang decision bb (+1/0/-1) updates
//   integ  <= integ + bb                        (frequency integrator, saturating)
//   phase  <= phase + (bb << kp_shift)          (proportional path, KP)
//                   + ((integ << KI_SCALE) >> ki_shift)   (integral path, KI, if ki_en)
// where phase is a PI_BITS.PH_FRAC fixed-point code that wraps modulo one clock period
// (256 codes = 4 UI). `code` is the integer part and goes straight to the edge PI, so the
// proportional path reaches the sampling clock with one register of latency. `integ` is also
// brought out for the shared frequency tracking, which adds all lanes' integrators.
// The structure (integrator, KI, KP, summing node, phase accumulator) follows the published
// architecture; gains as power-of-two shifts, widths and saturation are this implementation's.
// Timing: code and integ change one clock after an in_valid.
module cdr_loop_filter
  import cdr_pkg::*;
#(
  parameter int unsigned PI_BITS  = CDR_PI_BITS,
  parameter int unsigned PH_FRAC  = 16,
  parameter int unsigned INT_W    = CDR_INT_W,
  parameter int unsigned KI_SCALE = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [1:0]       bb,
  input  logic [4:0]              kp_shift,
  input  logic [4:0]              ki_shift,
  input  logic                    ki_en,
  output logic [PI_BITS-1:0]      code,
  output logic signed [INT_W-1:0] integ
);
  localparam int unsigned PH_W  = PI_BITS + PH_FRAC;
  localparam int unsigned ACC_W = PH_W + INT_W + KI_SCALE;   // wide enough for any shift
  localparam logic signed [INT_W-1:0] IMAX = {1'b0, {(INT_W-1){1'b1}}};
  localparam logic signed [INT_W-1:0] IMIN = {1'b1, {(INT_W-1){1'b0}}};

  logic [PH_W-1:0]         phase;
  logic signed [ACC_W-1:0] p_term, i_term;
  logic signed [INT_W-1:0] integ_next;

  always_comb begin
    p_term = ACC_W'(bb) <<< kp_shift;
    i_term = ki_en ? ((ACC_W'(integ) <<< KI_SCALE) >>> ki_shift) : '0;
    if (bb > 0 && integ == IMAX)      integ_next = integ;
    else if (bb < 0 && integ == IMIN) integ_next = integ;
    else                              integ_next = integ + INT_W'(bb);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
      integ <= '0;
    end else if (in_valid) begin
      phase <= phase + PH_W'(p_term + i_term);
      integ <= integ_next;
    end
  end

  assign code = phase[PH_W-1:PH_FRAC];
endmodule
