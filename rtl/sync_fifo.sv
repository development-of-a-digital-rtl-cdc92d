// sync_fifo: single-clock first-in first-out buffer.
//
// These are the "controlled FIFO memories" between the demultiplexer and
// the processing elements and between the processing elements and the
// multiplexer. DEPTH entries of W bits are held in a register array with a
// write and a read pointer one bit wider than the address, so full and
// empty are told apart by the extra bit. The interface is valid/ready on
// both sides: a word is written when wr_en is high and full is low, and
// read when rd_en is high and empty is low; rd_data shows the oldest entry
// combinationally (first-word fall-through). A write attempted while full
// is dropped and reported on overflow for one cycle. Depth and handshake
// are this design's own choice; the original design names the FIFOs only.
module sync_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [W-1:0]  wr_data,
  output logic          full,
  input  logic          rd_en,
  output logic [W-1:0]  rd_data,
  output logic          empty,
  output logic          overflow,
  output logic [$clog2(DEPTH):0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wptr, rptr;
  logic         do_wr, do_rd;

  assign count   = wptr - rptr;
  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rptr[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_en && full;
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
  end

  // Reading an empty FIFO is a protocol error of the consumer.
  a_no_read_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                     !(rd_en && empty))
    else $error("sync_fifo: read while empty");

endmodule
