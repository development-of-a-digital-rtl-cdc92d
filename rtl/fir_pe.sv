// fir_pe: one processing element of the DSP array, a per-bunch FIR filter.
//
// Each processing element serves a fixed set of up to NB bunches. For every
// down-sampled phase sample x[n] of bunch b it computes the correction
//     y[n] = sum_{k=0}^{TAPS-1} c_k * x[n-k]
// from that bunch's own sample history, so the filter runs on each bunch
// independently at the down-sampled rate. In the original design this is a
// program on a commercial floating-point DSP chip; here it is a small
// fixed-point datapath that does the same filtering: samples and results
// stay 8-bit, which is all the original design needs.
//
// Number formats: samples enter and leave in offset binary (code 0x80 is
// zero), as the A/D and D/A converters use; inside they are two's
// complement. Coefficients are signed COEF_W bits with COEF_FRAC fraction
// bits. The sum is taken at full precision, shifted right by COEF_FRAC
// (rounding toward minus infinity) and clipped to the W-bit range; sat
// pulses with out_valid when clipping occurred.
//
// Timing: the element is sequential, one multiply-accumulate per clock.
// A sample is accepted when in_valid and in_ready are both high (in_ready
// is high only while idle); out_valid rises with the result on the TAPS-th
// clock edge after the accepting edge and holds until out_ready. With out_ready high the element takes
// TAPS+2 cycles per sample. Coefficients are written one tap at a time on
// coef_we; the set in use when a sample is accepted should not be changed
// while it is processed. Reset clears all histories to zero and loads
// INIT_COEFS.
module fir_pe #(
  parameter int unsigned TAPS      = damper_pkg::TAPS,
  parameter int unsigned NB        = 7,
  parameter int unsigned W         = damper_pkg::W,
  parameter int unsigned COEF_W    = damper_pkg::COEF_W,
  parameter int unsigned COEF_FRAC = damper_pkg::COEF_FRAC,
  parameter logic [TAPS-1:0][COEF_W-1:0] INIT_COEFS = damper_pkg::DEFAULT_COEFS,
  localparam int unsigned IW = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned KW = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // coefficient programming
  input  logic                coef_we,
  input  logic [KW-1:0]       coef_addr,
  input  logic [COEF_W-1:0]   coef_data,
  // sample input
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [IW-1:0]       in_idx,
  input  logic [W-1:0]        in_data,
  // correction output
  output logic                out_valid,
  input  logic                out_ready,
  output logic [IW-1:0]       out_idx,
  output logic [W-1:0]        out_data,
  output logic                sat
);

  localparam int unsigned AW = W + COEF_W + KW + 1;

  typedef enum logic [1:0] {S_IDLE, S_MAC, S_OUT} state_t;

  state_t                              state;
  logic signed [COEF_W-1:0]            coef [TAPS];
  logic signed [W-1:0]                 hist [NB][TAPS];   // hist[b][0] is newest
  logic [IW-1:0]                       idx_q;
  logic [KW-1:0]                       k;
  logic signed [AW-1:0]                acc;
  logic signed [W-1:0]                 tap_x;
  logic signed [AW-1:0]                acc_next, shifted;
  logic signed [W-1:0]                 y_sat;
  logic                                clip;

  localparam logic signed [AW-1:0] YMAX = AW'((1 << (W-1)) - 1);
  localparam logic signed [AW-1:0] YMIN = -AW'(1 << (W-1));

  assign in_ready = (state == S_IDLE);

  // hist[b][0] holds the new sample while the sum is formed; the older
  // samples sit in taps 1..TAPS-1.
  assign tap_x    = hist[idx_q][k];
  assign acc_next = acc + AW'(coef[k]) * AW'(tap_x);
  assign shifted  = acc_next >>> COEF_FRAC;

  always_comb begin
    clip  = 1'b0;
    y_sat = shifted[W-1:0];
    if (shifted > YMAX) begin
      y_sat = YMAX[W-1:0];
      clip  = 1'b1;
    end else if (shifted < YMIN) begin
      y_sat = YMIN[W-1:0];
      clip  = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      idx_q     <= '0;
      k         <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_data  <= '0;
      sat       <= 1'b0;
      for (int t = 0; t < TAPS; t++) coef[t] <= INIT_COEFS[t];
      for (int b = 0; b < NB; b++)
        for (int t = 0; t < TAPS; t++) hist[b][t] <= '0;
    end else begin
      if (coef_we && coef_addr < KW'(TAPS)) coef[coef_addr] <= coef_data;
      unique case (state)
        S_IDLE: if (in_valid) begin
          // shift this bunch's history and put the new sample in front
          for (int t = TAPS-1; t > 0; t--) hist[in_idx][t] <= hist[in_idx][t-1];
          hist[in_idx][0] <= signed'(in_data ^ (W'(1) << (W-1)));
          idx_q <= in_idx;
          k     <= '0;
          acc   <= '0;
          state <= S_MAC;
        end
        S_MAC: begin
          acc <= acc_next;
          if (k == KW'(TAPS-1)) begin
            out_valid <= 1'b1;
            out_idx   <= idx_q;
            out_data  <= y_sat ^ (W'(1) << (W-1));
            sat       <= clip;
            state     <= S_OUT;
          end else begin
            k <= k + 1'b1;
          end
        end
        S_OUT: if (out_ready) begin
          out_valid <= 1'b0;
          sat       <= 1'b0;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_idx_range: assert property (@(posedge clk) disable iff (!rst_n)
                                (in_valid && in_ready) |-> (in_idx < IW'(NB)))
    else $error("fir_pe: bunch index out of range");

endmodule
