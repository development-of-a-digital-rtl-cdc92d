// tb_fir_pe: samples for random bunches in, results checked against an
// integer model of the per-bunch FIR filter (floor shift by COEF_FRAC,
// clip to 8 bits, offset-binary coding). Runs first with the default
// coefficients, then with large random coefficients that force clipping.
// Also checks the latency (result TAPS edges after the accepting edge),
// the TAPS+2 cycle throughput with out_ready high, that out_valid holds
// under back-pressure, and that sat is set exactly when the model clips.
module tb_fir_pe;
  localparam int TAPS = 5, NB = 7, W = 8, COEF_W = 10, COEF_FRAC = 8;
  localparam int KW = $clog2(TAPS), IW = $clog2(NB);
  logic clk = 0, rst_n = 0;
  logic coef_we = 0;
  logic [KW-1:0] coef_addr = '0;
  logic [COEF_W-1:0] coef_data = '0;
  logic in_valid = 0, in_ready;
  logic [IW-1:0] in_idx = '0;
  logic [W-1:0] in_data = '0;
  logic out_valid, out_ready = 1, sat;
  logic [IW-1:0] out_idx;
  logic [W-1:0] out_data;
  int checks = 0, failures = 0, n_sat = 0, n_res = 0, n_bp = 0;

  fir_pe #(.TAPS(TAPS), .NB(NB), .W(W), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int c[TAPS] = '{-20, 84, 78, -30, -112};
  int h[NB][TAPS];

  // model: returns offset-binary result and clip flag
  function automatic void model(int b, int x, output logic [W-1:0] y, output bit clip);
    longint acc = 0;
    longint q;
    for (int t = TAPS-1; t > 0; t--) h[b][t] = h[b][t-1];
    h[b][0] = x;
    for (int t = 0; t < TAPS; t++) acc += longint'(c[t]) * h[b][t];
    q = acc >>> COEF_FRAC;
    clip = 0;
    if (q > 127) begin q = 127; clip = 1; end
    if (q < -128) begin q = -128; clip = 1; end
    y = W'(q) ^ 8'h80;
  endfunction

  task automatic one_sample(int b, bit backpressure);
    logic [W-1:0] y; bit clip; int x; int lat;
    x = int'($urandom % 256) - 128;
    model(b, x, y, clip);
    @(negedge clk);
    check(in_ready, "ready when idle");
    in_valid = 1; in_idx = IW'(b); in_data = W'(x) ^ 8'h80;
    out_ready = !backpressure;
    @(negedge clk);             // accepting edge has passed
    in_valid = 0;
    lat = 0;
    while (!out_valid) begin
      check(!in_ready, "busy");
      @(negedge clk); lat++;
      if (lat > 20) break;
    end
    if (lat != TAPS) $display("  latency %0d", lat);
    check(lat == TAPS, "latency");
    if (backpressure) begin
      repeat (3) begin @(negedge clk); check(out_valid, "hold under back-pressure"); end
      out_ready = 1; n_bp++;
    end
    check(out_data == y, "result");
    check(out_idx == IW'(b), "index");
    check(sat == clip, "sat flag");
    n_res++;
    if (clip) n_sat++;
    if (out_data != y) $display("  b=%0d x=%0d got %h exp %h", b, x, out_data, y);
  endtask

  initial begin
    for (int b = 0; b < NB; b++) for (int t = 0; t < TAPS; t++) h[b][t] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) one_sample($urandom % NB, ($urandom % 10) == 0);
    // reprogram with large coefficients
    for (int t = 0; t < TAPS; t++) begin
      c[t] = int'($urandom % 1024) - 512;
      @(negedge clk);
      coef_we = 1; coef_addr = KW'(t); coef_data = COEF_W'(c[t]);
      @(negedge clk);
      coef_we = 0;
    end
    for (int i = 0; i < 300; i++) one_sample($urandom % NB, ($urandom % 10) == 0);
    // throughput: back-to-back samples with out_ready high
    begin
      int t0, t1, cnt;
      out_ready = 1;
      @(negedge clk);
      in_valid = 1; in_idx = 0; in_data = 8'h80;
      cnt = 0; t0 = -1; t1 = 0;
      for (int cyc = 0; cyc < 100 && cnt < 6; cyc++) begin
        @(posedge clk);
        if (in_valid && in_ready) begin
          if (t0 < 0) t0 = cyc;
          t1 = cyc; cnt++;
        end
      end
      @(negedge clk); in_valid = 0;
      check((t1 - t0) == 5 * (TAPS + 2), "throughput TAPS+2 cycles per sample");
      $display("6 samples accepted over %0d cycles", t1 - t0);
    end
    check(n_sat > 10, "clipping exercised");
    check(n_bp > 10, "back-pressure exercised");
    $display("results=%0d clipped=%0d backpressured=%0d", n_res, n_sat, n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
