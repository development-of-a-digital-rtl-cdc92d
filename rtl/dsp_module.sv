// dsp_module: one board of the DSP array, serving one demultiplexer lane.
//
// A lane carries every LANES-th bunch, SLOTS bunches per turn. On a
// down-sampled turn (capture) each lane sample is written, together with
// its local bunch index, into the input FIFO of processing element
// slot % NPE, local index slot / NPE. Each of the NPE elements (fir_pe)
// filters its bunches one after the other and writes its results into its
// own output FIFO; the reorder buffer drains those into a per-slot hold
// memory. On every turn, for every word (word_valid) the held correction
// of that slot is read out and presented on lane_out one cycle later with
// out_valid, whether or not the turn was captured.
//
// The original design fixes the structure (four processing elements per module,
// FIFOs on both sides, down-sampling before them); FIFO depth, the
// index tagging of samples and the hold memory are this design's own.
// Status outputs: ovf pulses when an input FIFO had to drop a sample
// (the elements fell behind), sat when an element clipped a result, upd
// when a new correction reached the hold memory.
module dsp_module #(
  parameter int unsigned SLOTS      = damper_pkg::BUNCHES / damper_pkg::LANES,
  parameter int unsigned NPE        = damper_pkg::NPE,
  parameter int unsigned TAPS       = damper_pkg::TAPS,
  parameter int unsigned W          = damper_pkg::W,
  parameter int unsigned COEF_W     = damper_pkg::COEF_W,
  parameter int unsigned COEF_FRAC  = damper_pkg::COEF_FRAC,
  parameter int unsigned FIFO_DEPTH = 8,
  localparam int unsigned SW = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int unsigned KW = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               coef_we,
  input  logic [KW-1:0]      coef_addr,
  input  logic [COEF_W-1:0]  coef_data,
  input  logic               word_valid,
  input  logic               capture,
  input  logic [SW-1:0]      slot,
  input  logic [W-1:0]       lane_in,
  output logic               out_valid,
  output logic [W-1:0]       lane_out,
  output logic               ovf,
  output logic               sat,
  output logic               upd
);

  localparam int unsigned NB = (SLOTS + NPE - 1) / NPE;
  localparam int unsigned IW = (NB > 1) ? $clog2(NB) : 1;
  localparam int unsigned FW = IW + W;
  localparam int unsigned PW = (NPE > 1) ? $clog2(NPE) : 1;

  logic [NPE-1:0]          in_wr, in_full, in_empty, in_rd, in_ovf;
  logic [NPE-1:0][FW-1:0]  in_q;
  logic [FW-1:0]           in_word;
  logic [NPE-1:0]          pe_ready, pe_valid, pe_sat;
  logic [NPE-1:0][IW-1:0]  pe_idx;
  logic [NPE-1:0][W-1:0]   pe_data;
  logic [NPE-1:0]          out_full, out_empty, out_rd, out_ovf;
  logic [NPE-1:0][FW-1:0]  out_q;

  // down-sampling and distribution to the elements
  assign in_word = {IW'(slot / SW'(NPE)), lane_in};
  always_comb begin
    in_wr = '0;
    if (word_valid && capture) in_wr[PW'(slot % SW'(NPE))] = 1'b1;
  end

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    sync_fifo #(.W(FW), .DEPTH(FIFO_DEPTH)) u_in_fifo (
      .clk, .rst_n,
      .wr_en(in_wr[p]), .wr_data(in_word), .full(in_full[p]),
      .rd_en(in_rd[p]), .rd_data(in_q[p]), .empty(in_empty[p]),
      .overflow(in_ovf[p]), .count()
    );

    assign in_rd[p] = pe_ready[p] && !in_empty[p];

    fir_pe #(.TAPS(TAPS), .NB(NB), .W(W), .COEF_W(COEF_W),
             .COEF_FRAC(COEF_FRAC)) u_pe (
      .clk, .rst_n,
      .coef_we, .coef_addr, .coef_data,
      .in_valid(!in_empty[p]), .in_ready(pe_ready[p]),
      .in_idx(in_q[p][FW-1:W]), .in_data(in_q[p][W-1:0]),
      .out_valid(pe_valid[p]), .out_ready(!out_full[p]),
      .out_idx(pe_idx[p]), .out_data(pe_data[p]), .sat(pe_sat[p])
    );

    sync_fifo #(.W(FW), .DEPTH(FIFO_DEPTH)) u_out_fifo (
      .clk, .rst_n,
      .wr_en(pe_valid[p]), .wr_data({pe_idx[p], pe_data[p]}), .full(out_full[p]),
      .rd_en(out_rd[p]), .rd_data(out_q[p]), .empty(out_empty[p]),
      .overflow(out_ovf[p]), .count()
    );
  end

  reorder_buffer #(.SLOTS(SLOTS), .NPE(NPE), .W(W)) u_reorder (
    .clk, .rst_n,
    .fifo_empty(out_empty), .fifo_data(out_q), .fifo_rd(out_rd),
    .rd_en(word_valid), .rd_slot(slot),
    .rd_valid(out_valid), .rd_data(lane_out), .upd
  );

  assign ovf = |in_ovf || |out_ovf;
  assign sat = |(pe_sat & pe_valid & ~out_full);

endmodule
