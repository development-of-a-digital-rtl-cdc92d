// tb_dsp_module: one lane of SLOTS bunches, a word every RATIO cycles,
// turns counted by the testbench and every DOWNSAMPLE-th turn captured.
// Each bunch carries its own oscillation plus noise. A model filters every
// captured sample of every bunch with the current coefficient set and
// holds the result; from the next turn on, each read of a slot must return
// it, one cycle after the word strobe. Half-way the coefficients are
// replaced by a high-gain set so that clipping occurs; the sat and upd
// pulses are counted against the model.
module tb_dsp_module;
  localparam int SLOTS = 25, NPE = 4, TAPS = 5, W = 8, COEF_W = 10, COEF_FRAC = 8;
  localparam int RATIO = 8, DOWNSAMPLE = 16, TURNS = 12 * DOWNSAMPLE;
  localparam int SW = $clog2(SLOTS), KW = $clog2(TAPS);
  logic clk = 0, rst_n = 0;
  logic coef_we = 0;
  logic [KW-1:0] coef_addr = '0;
  logic [COEF_W-1:0] coef_data = '0;
  logic word_valid = 0, capture = 0;
  logic [SW-1:0] slot = '0;
  logic [W-1:0] lane_in = '0;
  logic out_valid, ovf, sat, upd;
  logic [W-1:0] lane_out;
  int checks = 0, failures = 0, n_sat_model = 0, n_sat = 0, n_upd = 0, n_ovf = 0;

  dsp_module #(.SLOTS(SLOTS), .NPE(NPE), .TAPS(TAPS), .W(W),
               .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (TURNS * SLOTS * RATIO + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (sat) n_sat++;
    if (upd) n_upd++;
    if (ovf) n_ovf++;
  end

  int c[TAPS] = '{-20, 84, 78, -30, -112};
  int h[SLOTS][TAPS];
  logic [W-1:0] hold[SLOTS], pend[SLOTS];

  function automatic logic [W-1:0] filt(int s, int x, output bit clip);
    longint acc = 0, q;
    for (int t = TAPS-1; t > 0; t--) h[s][t] = h[s][t-1];
    h[s][0] = x;
    for (int t = 0; t < TAPS; t++) acc += longint'(c[t]) * h[s][t];
    q = acc >>> COEF_FRAC;
    clip = (q > 127) || (q < -128);
    if (q > 127) q = 127;
    if (q < -128) q = -128;
    return W'(q) ^ 8'h80;
  endfunction

  initial begin
    bit prev_cap = 0;
    for (int s = 0; s < SLOTS; s++) begin
      hold[s] = 8'h80;
      for (int t = 0; t < TAPS; t++) h[s][t] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int turn = 0; turn < TURNS; turn++) begin
      bit cap;
      cap = (turn % DOWNSAMPLE) == 0;
      if (prev_cap) for (int s = 0; s < SLOTS; s++) hold[s] = pend[s];
      if (turn == TURNS / 2 + 3) begin   // quiet turn: new, high-gain filter
        int hi[TAPS] = '{-300, 400, 200, 100, -400};
        for (int t = 0; t < TAPS; t++) begin
          c[t] = hi[t];
          @(negedge clk);
          coef_we = 1; coef_addr = KW'(t); coef_data = COEF_W'(c[t]);
          @(negedge clk);
          coef_we = 0;
        end
      end
      for (int s = 0; s < SLOTS; s++) begin
        int x; bit clip; real ph;
        ph = 2.0 * 3.14159265 * (0.0115 * turn + 0.37 * s);
        x = $rtoi(60.0 * $sin(ph)) + int'($urandom % 9) - 4;
        @(negedge clk);
        word_valid = 1; capture = cap; slot = SW'(s); lane_in = W'(x) ^ 8'h80;
        if (cap) begin
          pend[s] = filt(s, x, clip);
          if (clip) n_sat_model++;
        end
        @(negedge clk);
        word_valid = 0; capture = 0;
        check(out_valid, "out_valid one cycle after word");
        check(lane_out == hold[s], "held correction");
        if (lane_out != hold[s] && failures < 10)
          $display("  turn %0d slot %0d got %h exp %h", turn, s, lane_out, hold[s]);
        repeat (RATIO - 2) begin
          @(negedge clk);
          check(!out_valid, "out_valid only after a word");
        end
      end
      prev_cap = cap;
    end
    repeat (50) @(negedge clk);
    check(n_upd == (TURNS / DOWNSAMPLE) * SLOTS, "one update per captured bunch");
    check(n_sat == n_sat_model, "clip count");
    check(n_sat_model > 0, "clipping exercised");
    check(n_ovf == 0, "no FIFO overflow");
    $display("updates=%0d clipped=%0d (model %0d) ovf=%0d", n_upd, n_sat, n_sat_model, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
