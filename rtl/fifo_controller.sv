// fifo_controller: turn and slot bookkeeping for the FIFO memories.
//
// Every demultiplexed word carries RATIO bunches; SLOTS words make one
// turn. The controller numbers the words of a turn (slot) and counts turns
// modulo DOWNSAMPLE. Only turn 0 of each group of DOWNSAMPLE turns is
// passed to the processing elements (capture), which is the down-sampling
// of the system; on every turn the output side reads the held corrections
// for the same slot. word_first (bunch 0 of a turn) re-aligns the slot
// count; a turn whose length is not SLOTS words raises frame_err for one
// cycle and the counts restart at the fiducial. Until the first fiducial
// has been seen (synced low) nothing is captured.
//
// Outputs are combinational from the state and the current word strobe and
// are valid in the cycle word_valid is high. In the original design this
// controller is a programmable logic device; its internals are this
// design's own.
module fifo_controller #(
  parameter int unsigned SLOTS      = 25,
  parameter int unsigned DOWNSAMPLE = 16
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              word_valid,
  input  logic                              word_first,
  output logic [$clog2(SLOTS)-1:0]          slot,
  output logic [$clog2(DOWNSAMPLE)-1:0]     turn,
  output logic                              capture,
  output logic                              synced,
  output logic                              frame_err
);

  localparam int unsigned SW = $clog2(SLOTS);
  localparam int unsigned TW = $clog2(DOWNSAMPLE);

  // While synced, slot_q is the slot of the next word; 0 means a fiducial
  // is due (SLOTS >= 2 is assumed).
  logic [SW-1:0] slot_q;
  logic [TW-1:0] turn_q;
  logic          synced_q;
  logic          early, late;

  always_comb begin
    early = word_valid && word_first && synced_q && (slot_q != '0);
    late  = word_valid && !word_first && synced_q && (slot_q == '0);
    slot  = word_first ? '0 : slot_q;
    if (word_first && synced_q && slot_q == '0)
      turn = (turn_q == TW'(DOWNSAMPLE-1)) ? '0 : turn_q + 1'b1;
    else if (word_first)
      turn = '0;
    else
      turn = turn_q;
    synced    = word_first || (synced_q && !late);
    capture   = word_valid && synced && (turn == '0);
    frame_err = early || late;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_q   <= '0;
      turn_q   <= '0;
      synced_q <= 1'b0;
    end else if (word_valid) begin
      synced_q <= synced;
      turn_q   <= turn;
      if (!synced || slot == SW'(SLOTS-1))
        slot_q <= '0;
      else
        slot_q <= slot + 1'b1;
    end
  end

endmodule
