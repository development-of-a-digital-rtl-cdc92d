// tb_fifo_controller: word strobes every RATIO cycles, grouped into turns
// by the generator, which knows the slot and turn of every word. Besides
// normal turns it sends words before the first fiducial, a short turn
// (early fiducial) and a long turn (missing fiducial). Checked on every
// strobe: slot, turn, capture (one turn in DOWNSAMPLE), synced, frame_err.
module tb_fifo_controller;
  localparam int SLOTS = 25, DOWNSAMPLE = 16, RATIO = 8;
  logic clk = 0, rst_n = 0;
  logic word_valid = 0, word_first = 0;
  logic [$clog2(SLOTS)-1:0] slot;
  logic [$clog2(DOWNSAMPLE)-1:0] turn;
  logic capture, synced, frame_err;
  int checks = 0, failures = 0;
  int n_capture = 0, n_err = 0, n_unsynced = 0;

  fifo_controller #(.SLOTS(SLOTS), .DOWNSAMPLE(DOWNSAMPLE)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one word and check the controller's view of it
  task automatic word(bit first, bit e_sync, int e_slot, int e_turn, bit e_err);
    @(negedge clk);
    word_valid = 1; word_first = first;
    #1;
    check(synced == e_sync, "synced");
    check(frame_err == e_err, "frame_err");
    if (e_sync) begin
      check(slot == ($clog2(SLOTS))'(e_slot), "slot");
      check(turn == ($clog2(DOWNSAMPLE))'(e_turn), "turn");
    end
    check(capture == (e_sync && e_turn == 0), "capture");
    if (capture) n_capture++;
    if (frame_err) n_err++;
    if (!synced) n_unsynced++;
    @(negedge clk);
    word_valid = 0; word_first = 0;
    repeat (RATIO - 2) @(negedge clk);
  endtask

  initial begin
    int t;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // words before any fiducial
    for (int i = 0; i < 7; i++) word(0, 0, 0, 0, 0);
    // 40 normal turns
    t = 0;
    for (int n = 0; n < 40; n++) begin
      for (int s = 0; s < SLOTS; s++) word(s == 0, 1, s, t, 0);
      t = (t + 1) % DOWNSAMPLE;
    end
    // short turn: 10 words, then an early fiducial restarts at turn 0
    for (int s = 0; s < 10; s++) word(s == 0, 1, s, t, 0);
    t = 0;
    for (int n = 0; n < 3; n++) begin
      for (int s = 0; s < SLOTS; s++) word(s == 0, 1, s, t, (n == 0 && s == 0));
      t = (t + 1) % DOWNSAMPLE;
    end
    // long turn: fiducial missing, framing lost until the next one
    for (int s = 0; s < SLOTS; s++) word(s == 0, 1, s, t, 0);
    word(0, 0, 0, 0, 1);
    for (int s = 1; s < 6; s++) word(0, 0, 0, 0, 0);
    t = 0;
    for (int n = 0; n < 20; n++) begin
      for (int s = 0; s < SLOTS; s++) word(s == 0, 1, s, t, 0);
      t = (t + 1) % DOWNSAMPLE;
    end
    check(n_err == 2, "two frame errors");
    check(n_capture == 6 * SLOTS, "capture count");   // turns 0,16,32, restart, 0,16
    $display("captures=%0d errors=%0d unsynced=%0d", n_capture, n_err, n_unsynced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
