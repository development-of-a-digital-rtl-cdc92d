// reorder_buffer: output side of the FIFO memories of one DSP module.
//
// The processing elements of a module finish their bunches in their own
// order and at their own pace. Their results wait in one output FIFO per
// element; this block drains those FIFOs and puts every correction back in
// bunch order. It holds one W-bit correction per slot (bunch of the lane)
// and is read once per turn for every slot, so a correction computed on a
// down-sampled turn keeps being applied on the turns in between until the
// next one replaces it.
//
// Element p handles slots p, p+NPE, p+2*NPE, ...; its result with local
// index i belongs to slot i*NPE + p. The FIFOs are visited round robin,
// one per clock: a non-empty FIFO is read (fifo_rd) and its word written
// into the hold memory, and upd pulses. rd_en/rd_slot read the hold memory;
// rd_data and rd_valid follow one cycle later. A write and a read of the
// same slot in one cycle return the old value. Reset sets every entry to
// MIDSCALE, the code of zero kick. The drain order and the hold memory are
// this design's own reading of "reorganized in a proper sequence".
module reorder_buffer #(
  parameter int unsigned SLOTS = 25,
  parameter int unsigned NPE   = damper_pkg::NPE,
  parameter int unsigned W     = damper_pkg::W,
  localparam int unsigned NB   = (SLOTS + NPE - 1) / NPE,
  localparam int unsigned IW   = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned SW   = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NPE-1:0]                fifo_empty,
  input  logic [NPE-1:0][IW+W-1:0]      fifo_data,   // {index, correction}
  output logic [NPE-1:0]                fifo_rd,
  input  logic                          rd_en,
  input  logic [SW-1:0]                 rd_slot,
  output logic                          rd_valid,
  output logic [W-1:0]                  rd_data,
  output logic                          upd
);

  localparam int unsigned PW = (NPE > 1) ? $clog2(NPE) : 1;

  logic [W-1:0]  hold [SLOTS];
  logic [PW-1:0] rr;
  logic [IW-1:0] w_idx;
  logic [W-1:0]  w_data;
  logic [SW+PW:0] w_slot;

  assign {w_idx, w_data} = fifo_data[rr];
  assign w_slot = (SW+PW+1)'(w_idx) * (SW+PW+1)'(NPE) + (SW+PW+1)'(rr);

  always_comb begin
    fifo_rd     = '0;
    fifo_rd[rr] = !fifo_empty[rr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr       <= '0;
      rd_valid <= 1'b0;
      rd_data  <= damper_pkg::MIDSCALE;
      upd      <= 1'b0;
      for (int s = 0; s < SLOTS; s++) hold[s] <= damper_pkg::MIDSCALE;
    end else begin
      rr       <= (rr == PW'(NPE-1)) ? '0 : rr + 1'b1;
      upd      <= 1'b0;
      rd_valid <= rd_en;
      if (rd_en) rd_data <= hold[rd_slot];
      if (!fifo_empty[rr] && w_slot < (SW+PW+1)'(SLOTS)) begin
        hold[w_slot[SW-1:0]] <= w_data;
        upd <= 1'b1;
      end
    end
  end

endmodule
