// p2s_mux: parallel-to-serial multiplexer in front of the D/A converter.
//
// The reverse of the demultiplexer: a word of RATIO lane samples, loaded
// on load, is sent out one sample per clock, lane 0 first, so the
// corrections leave in bunch order at the full bunch rate. out_first marks
// the first sample of a word that was loaded with load_first (bunch 0 of a
// turn). The first sample appears the cycle after load; with a load every
// RATIO cycles the output stream has no gaps. A load while a word is still
// being sent restarts the output with the new word.
module p2s_mux #(
  parameter int unsigned RATIO = 8,
  parameter int unsigned W     = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load,
  input  logic                      load_first,
  input  logic [RATIO-1:0][W-1:0]   word,
  output logic                      out_valid,
  output logic                      out_first,
  output logic [W-1:0]              out_data
);

  localparam int unsigned CW = $clog2(RATIO + 1);

  logic [RATIO-1:0][W-1:0] shreg;
  logic [CW-1:0]           left;   // samples still to send after out_data

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '0;
      left      <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_data  <= damper_pkg::MIDSCALE;
    end else if (load) begin
      out_data  <= word[0];
      out_valid <= 1'b1;
      out_first <= load_first;
      shreg     <= word >> W;
      left      <= CW'(RATIO - 1);
    end else if (left != '0) begin
      out_data  <= shreg[0];
      out_valid <= 1'b1;
      out_first <= 1'b0;
      shreg     <= shreg >> W;
      left      <= left - 1'b1;
    end else begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
    end
  end

endmodule
