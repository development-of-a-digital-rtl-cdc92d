// damper_top: digital signal path of a bunch-by-bunch longitudinal damper.
//
// A phase detector turns the arrival phase of every bunch into a voltage
// and an 8-bit flash A/D converter samples it once per bunch, at the bunch
// rate (500 MS/s for 200 bunches at 2 ns). This block takes that sample
// stream and returns, at the same rate and in the same bunch order, the
// 8-bit correction for the D/A converter that drives the kicker:
//
//   s2p_demux        1:LANES split, lane i carries bunches i, i+LANES, ...
//   fifo_controller  numbers the words of a turn, keeps one turn in
//                    DOWNSAMPLE for processing (down-sampling)
//   dsp_module x8    per lane: input FIFOs, NPE FIR elements, output
//                    FIFOs and a hold memory that restores bunch order
//   p2s_mux          LANES:1 merge back to one stream for the D/A
//
// Every bunch is filtered on its own, with a TAPS-tap FIR on its
// down-sampled phase samples; the correction is replayed on every turn
// until the next down-sampled turn renews it. The structure, the numbers
// (200 bunches, 8 modules of 4 processing elements, down-sampling 16, 5
// taps, 8-bit data) follow the original TLS design. The filter coefficients,
// the fixed-point formats, the handshakes and the hold memory are this
// design's own choices; the processing elements are fixed-point datapaths
// in place of the commercial DSP chips.
//
// Timing: one clock per bunch. adc_first marks bunch 0 of each turn. The
// correction for bunch b leaves on dac_data exactly LANES+1 clock edges
// after the edge that took in the sample of bunch b, with dac_first on
// bunch 0, so a fixed cable delay can align the kick with the bunch. A
// correction takes effect from the first turn after
// the down-sampled turn it was computed on. coef_we/coef_addr/coef_data
// write one tap of the filter shared by all processing elements. Status:
// synced (a fiducial has been seen and the turn length is right),
// capture (this word belongs to a down-sampled turn), frame_err (a turn of
// wrong length), fifo_ovf, sat (a correction was clipped) and upd (a new
// correction was stored), all one-cycle pulses except synced.
module damper_top #(
  parameter int unsigned BUNCHES    = damper_pkg::BUNCHES,
  parameter int unsigned LANES      = damper_pkg::LANES,
  parameter int unsigned NPE        = damper_pkg::NPE,
  parameter int unsigned DOWNSAMPLE = damper_pkg::DOWNSAMPLE,
  parameter int unsigned TAPS       = damper_pkg::TAPS,
  parameter int unsigned W          = damper_pkg::W,
  parameter int unsigned COEF_W     = damper_pkg::COEF_W,
  parameter int unsigned COEF_FRAC  = damper_pkg::COEF_FRAC,
  localparam int unsigned KW = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // A/D side
  input  logic               adc_valid,
  input  logic               adc_first,
  input  logic [W-1:0]       adc_data,
  // filter programming
  input  logic               coef_we,
  input  logic [KW-1:0]      coef_addr,
  input  logic [COEF_W-1:0]  coef_data,
  // D/A side
  output logic               dac_valid,
  output logic               dac_first,
  output logic [W-1:0]       dac_data,
  // status
  output logic               synced,
  output logic               capture,
  output logic               frame_err,
  output logic               fifo_ovf,
  output logic               sat,
  output logic               upd
);

  localparam int unsigned SLOTS = BUNCHES / LANES;
  localparam int unsigned SW    = (SLOTS > 1) ? $clog2(SLOTS) : 1;
  localparam int unsigned TW    = (DOWNSAMPLE > 1) ? $clog2(DOWNSAMPLE) : 1;

  logic                      word_valid, word_first;
  logic [LANES-1:0][W-1:0]   word_in, word_out;
  logic [SW-1:0]             slot;
  logic [TW-1:0]             turn;
  logic [LANES-1:0]          lane_valid, lane_ovf, lane_sat, lane_upd;
  logic                      first_d;

  s2p_demux #(.RATIO(LANES), .W(W)) u_demux (
    .clk, .rst_n,
    .in_valid(adc_valid), .in_first(adc_first), .in_data(adc_data),
    .word_valid, .word_first, .word(word_in)
  );

  fifo_controller #(.SLOTS(SLOTS), .DOWNSAMPLE(DOWNSAMPLE)) u_ctrl (
    .clk, .rst_n,
    .word_valid, .word_first,
    .slot, .turn, .capture, .synced, .frame_err
  );

  for (genvar l = 0; l < LANES; l++) begin : g_mod
    dsp_module #(.SLOTS(SLOTS), .NPE(NPE), .TAPS(TAPS), .W(W),
                 .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC)) u_mod (
      .clk, .rst_n,
      .coef_we, .coef_addr, .coef_data,
      .word_valid, .capture, .slot, .lane_in(word_in[l]),
      .out_valid(lane_valid[l]), .lane_out(word_out[l]),
      .ovf(lane_ovf[l]), .sat(lane_sat[l]), .upd(lane_upd[l])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) first_d <= 1'b0;
    else if (word_valid) first_d <= word_first;
  end

  p2s_mux #(.RATIO(LANES), .W(W)) u_mux (
    .clk, .rst_n,
    .load(lane_valid[0]), .load_first(first_d), .word(word_out),
    .out_valid(dac_valid), .out_first(dac_first), .out_data(dac_data)
  );

  assign fifo_ovf = |lane_ovf;
  assign sat      = |lane_sat;
  assign upd      = |lane_upd;

endmodule
