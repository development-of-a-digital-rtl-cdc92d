// s2p_demux: serial-to-parallel demultiplexer at the A/D converter output.
//
// The A/D converter delivers one W-bit phase sample per bunch, one per
// clock at the full bunch rate. This block gathers RATIO consecutive
// samples into one word, sample i of the word going to lane i, so that each
// lane runs at 1/RATIO of the bunch rate. In the full system RATIO is 8:
// the converter's own two half-rate output ports followed by a 1:4
// serial-to-parallel converter give eight lanes at 62.5 MHz, one per DSP
// module. Here the split is done in one stage.
//
// Interface: in_valid/in_data carry one sample per cycle; in_first marks
// bunch 0 of a turn (revolution fiducial) and restarts the lane count, so a
// word always starts with a bunch whose number is a multiple of RATIO.
// word_valid pulses for one cycle the cycle after the RATIO-th sample; word
// then holds the RATIO samples and word_first tells that the word began
// with bunch 0. Latency from the last sample of a word to word_valid is one
// cycle. A fiducial that arrives in mid-word drops the partial word.
module s2p_demux #(
  parameter int unsigned RATIO = 8,
  parameter int unsigned W     = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic                      in_first,
  input  logic [W-1:0]              in_data,
  output logic                      word_valid,
  output logic                      word_first,
  output logic [RATIO-1:0][W-1:0]   word
);

  localparam int unsigned CW = (RATIO > 1) ? $clog2(RATIO) : 1;

  logic [CW-1:0]            pos;
  logic                     first_q;
  logic [RATIO-1:0][W-1:0]  shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos        <= '0;
      first_q    <= 1'b0;
      shreg      <= '0;
      word       <= '0;
      word_valid <= 1'b0;
      word_first <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (in_valid) begin
        logic [CW-1:0] p;
        p = in_first ? '0 : pos;
        shreg[p] <= in_data;
        if (p == CW'(RATIO-1)) begin
          word          <= shreg;
          word[RATIO-1] <= in_data;
          word_valid    <= 1'b1;
          word_first    <= (p == '0) ? in_first : first_q;
          pos           <= '0;
        end else begin
          pos <= p + 1'b1;
        end
        if (p == '0) first_q <= in_first;
      end
    end
  end

endmodule
