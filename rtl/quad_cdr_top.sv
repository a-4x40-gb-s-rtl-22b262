// quad_cdr_top: digital core of a four-lane 40 Gb/s receiver CDR with shared frequency tracking.
//
// Four lanes recover their clocks from one shared PLL. Each lane (cdr_lane) runs its own
// bang-bang phase tracking loop with a DDJ-filtering phase detector and drives two phase
// interpolators: a low-latency edge PI for its phase detector and a smoothed data PI for its DFE.
// The frequency offset to the far end is common to all lanes, so the lanes' frequency
// integrators are also summed by shared_freq_track, which rotates the phase rotator in the PLL
// feedback path and so moves the PLL (and every lane's clock) to the incoming data rate.
//
// Analog parts are outside this module: the PLL and its rotator (rot_code), the per-lane DLLs and
// PIs (edge_code, data_code) and the samplers (smp). All logic runs on the 10 GHz quarter-rate
// clock; an internal divide-by-16 counter produces word_stb, the 625 MHz digital clock enable,
// on which words are formed and the loops update. Ports are brought out per lane as arrays.
// The lane count, word width, quarter rate and the shared-tracking topology follow the published
// design; the single clock with an enable is this implementation's choice.
module quad_cdr_top
  import cdr_pkg::*;
#(
  parameter int unsigned LANES  = CDR_LANES,
  parameter int unsigned WORD_W = CDR_WORD_W,
  parameter int unsigned QR     = CDR_QR
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  lane_samples_t [LANES-1:0]           smp,
  input  lane_cfg_t     [LANES-1:0]           lane_cfg,
  input  shared_cfg_t                         shared_cfg,
  output logic                                word_stb,
  output logic [LANES-1:0][CDR_PI_BITS-1:0]       edge_code,
  output logic [LANES-1:0][CDR_PI_BITS-1:0]       data_code,
  output logic [CDR_ROT_BITS-1:0]                 rot_code,
  output logic [LANES-1:0][WORD_W-1:0]        data_word,
  output logic                                data_valid,
  output logic [LANES-1:0][CNT_W-1:0]         pd_valid_cnt,
  output logic signed [DSM_Y_W-1:0]           dsm_out
);
  localparam int unsigned DIV   = WORD_W / QR;
  localparam int unsigned DIV_W = (DIV > 1) ? $clog2(DIV) : 1;

  // 625 MHz digital clock enable.
  logic [DIV_W-1:0] div_cnt;
  always_ff @(posedge clk) begin
    if (!rst_n) div_cnt <= '0;
    else        div_cnt <= (div_cnt == DIV_W'(DIV - 1)) ? '0 : div_cnt + 1'b1;
  end
  assign word_stb = (div_cnt == DIV_W'(DIV - 1));

  logic signed [LANES-1:0][CDR_INT_W-1:0] integ;
  logic        [LANES-1:0]            dv;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    cdr_lane #(.WORD_W(WORD_W), .QR(QR)) u_lane (
      .clk, .rst_n, .word_stb,
      .smp          (smp[l]),
      .cfg          (lane_cfg[l]),
      .edge_code    (edge_code[l]),
      .data_code    (data_code[l]),
      .integ        (integ[l]),
      .data_word    (data_word[l]),
      .data_valid   (dv[l]),
      .pd_valid_cnt (pd_valid_cnt[l])
    );
  end

  assign data_valid = &dv;   // identical in all lanes (common word_stb)

  shared_freq_track #(.LANES(LANES), .INT_W(CDR_INT_W), .ROT_BITS(CDR_ROT_BITS)) u_sft (
    .clk, .rst_n, .en(word_stb), .integ, .cfg(shared_cfg), .rot_code, .dsm_out
  );
endmodule
