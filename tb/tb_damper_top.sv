// tb_damper_top: end-to-end run of the full-size damper (200 bunches,
// 8 lanes, 4 elements per lane, down-sampling 16, 5 taps) with its
// default parameters. One sample per bunch per clock, bunch 0 marked.
// Every bunch oscillates at the synchrotron tune with its own phase, plus
// noise. A model filters each bunch on every down-sampled turn and holds
// the result; each D/A sample is checked for value, bunch-0 marker and its
// exact clock (LANES+1 edges after its A/D sample).
//
// The run goes through: samples before the first fiducial, normal turns,
// down-sampled and held turns, a short turn (early fiducial) that raises
// frame_err and restarts the turn count, a coefficient reload to a
// high-gain set, and clipped corrections. Each of these is counted and a
// failure is counted for any that never happened.
module tb_damper_top;
  import damper_pkg::*;
  localparam int LAT = LANES + 1;
  localparam int SLOTS = BUNCHES / LANES;
  localparam int TURNS = 10 * DOWNSAMPLE;
  localparam int SHORT_TURN = 50;          // a held turn (50 % 16 != 0)
  localparam int RELOAD_TURN = 105;     // neither it nor the turn before is processed
  localparam int KW = $clog2(TAPS);

  logic clk = 0, rst_n = 0;
  logic adc_valid = 0, adc_first = 0;
  logic [W-1:0] adc_data = '0;
  logic coef_we = 0;
  logic [KW-1:0] coef_addr = '0;
  logic [COEF_W-1:0] coef_data = '0;
  logic dac_valid, dac_first, synced, capture, frame_err, fifo_ovf, sat, upd;
  logic [W-1:0] dac_data;

  damper_top dut (.*);

  int checks = 0, failures = 0;
  int n_cap_turns = 0, n_hold_turns = 0, n_err = 0, n_reload = 0, n_sat = 0,
      n_upd = 0, n_ovf = 0, n_out = 0, n_unsynced_words = 0, n_nonmid = 0;
  longint cycle = 0;

  always #1 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s cycle=%0d", what, cycle); end
  endtask

  initial begin
    repeat (TURNS * BUNCHES + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- model ----------------
  int c[TAPS];
  int h[BUNCHES][TAPS];
  logic [W-1:0] hold[BUNCHES], pend[BUNCHES];
  typedef struct { longint when; logic [W-1:0] data; bit first; } exp_t;
  exp_t expq[$];

  function automatic logic [W-1:0] filt(int b, int x, output bit clip);
    longint acc = 0, q;
    for (int t = TAPS-1; t > 0; t--) h[b][t] = h[b][t-1];
    h[b][0] = x;
    for (int t = 0; t < TAPS; t++) acc += longint'(c[t]) * h[b][t];
    q = acc >>> COEF_FRAC;
    clip = (q > 127) || (q < -128);
    if (q > 127) q = 127;
    if (q < -128) q = -128;
    return W'(q) ^ 8'h80;
  endfunction

  // ---------------- output monitor ----------------
  always @(negedge clk) if (rst_n) begin
    if (sat) n_sat++;
    if (upd) n_upd++;
    if (fifo_ovf) n_ovf++;
    if (frame_err) n_err++;
    if (dac_valid) begin
      exp_t e;
      if (expq.size() == 0) check(0, "unexpected D/A sample");
      else begin
        e = expq.pop_front();
        check(cycle == e.when, "D/A sample clock");
        check(dac_data == e.data, "D/A value");
        check(dac_first == e.first, "bunch 0 marker");
        if (dac_data != e.data && failures < 20)
          $display("  got %h exp %h at cycle %0d", dac_data, e.data, cycle);
        if (dac_data != 8'h80) n_nonmid++;
        n_out++;
      end
    end
  end

  // ---------------- stimulus ----------------
  // word assembly as seen from the input: lane position and bunches
  int  m_pos = 0;
  int  m_bunch[LANES];
  bit  m_synced = 0;

  // drive one sample of bunch b; returns after the edge that samples it
  task automatic drive(int b, bit first, int x);
    @(negedge clk);
    adc_valid = 1; adc_first = first; adc_data = W'(x) ^ 8'h80;
    if (first) m_pos = 0;
    if (first) m_synced = 1;
    m_bunch[m_pos] = b;
    if (m_pos == LANES - 1) begin
      // word complete: its samples leave LAT edges after their own edges
      if (!m_synced) n_unsynced_words++;
      for (int l = 0; l < LANES; l++) begin
        exp_t e;
        e.when  = cycle + 1 - (LANES - 1 - l) + LAT;
        e.data  = m_synced ? hold[m_bunch[l]] : hold[l];
        e.first = m_synced && (m_bunch[0] == 0) && (l == 0);
        expq.push_back(e);
      end
      m_pos = 0;
    end else m_pos++;
  endtask

  task automatic write_coefs(int v[TAPS]);
    for (int t = 0; t < TAPS; t++) begin
      c[t] = v[t];
      @(negedge clk);
      adc_valid = 0;
      coef_we = 1; coef_addr = KW'(t); coef_data = COEF_W'(v[t]);
      @(negedge clk);
      coef_we = 0;
    end
  endtask

  initial begin
    int tc;          // turn count modulo DOWNSAMPLE as the design sees it
    bit prev_cap;
    for (int t = 0; t < TAPS; t++) c[t] = int'(signed'(DEFAULT_COEFS[t]));
    for (int b = 0; b < BUNCHES; b++) begin
      hold[b] = 8'h80;
      for (int t = 0; t < TAPS; t++) h[b][t] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // samples before the first fiducial (3 whole words, then 4 dropped)
    for (int i = 0; i < 3 * LANES + 4; i++) drive(BUNCHES - 28 + i, 0, 0);
    tc = 0; prev_cap = 0;
    for (int n = 0; n < TURNS; n++) begin
      bit cap; int len;
      cap = (tc == 0);
      if (prev_cap) for (int b = 0; b < BUNCHES; b++) hold[b] = pend[b];
      if (n == RELOAD_TURN) begin
        int hi[TAPS] = '{-300, 400, 200, 100, -400};
        check(!cap && !prev_cap, "reload between processed turns");
        write_coefs(hi);
        n_reload++;
      end
      len = (n == SHORT_TURN) ? 100 : BUNCHES;
      for (int b = 0; b < len; b++) begin
        int x; bit clip; real ph;
        ph = 2.0 * 3.14159265 * (0.0115 * n + 0.173 * b);
        x = $rtoi(((b % 3) == 0 ? 90.0 : 30.0) * $sin(ph)) + int'($urandom % 7) - 3;
        if (cap) begin
          pend[b] = filt(b, x, clip);
        end
        drive(b, b == 0, x);
      end
      if (cap) n_cap_turns++; else n_hold_turns++;
      prev_cap = cap;
      tc = (n == SHORT_TURN) ? 0 : (tc + 1) % DOWNSAMPLE;
    end
    @(negedge clk);
    adc_valid = 0; adc_first = 0;
    repeat (4 * LAT) @(negedge clk);
    check(expq.size() == 0, "all D/A samples delivered");
    // mechanisms
    check(n_cap_turns > 0, "down-sampled turns processed");
    check(n_hold_turns > 0, "held turns replayed");
    check(n_err == 1, "frame error on the short turn");
    check(n_reload == 1, "coefficient reload");
    check(n_sat > 0, "clipped corrections");
    check(n_unsynced_words == 3, "words before the first fiducial");
    check(n_nonmid > 1000, "non-zero corrections");
    check(n_upd >= n_cap_turns * NPE, "hold memories updated");   // upd ORs the lanes
    check(n_ovf == 0, "no FIFO overflow at full rate");
    $display("out=%0d captured_turns=%0d held_turns=%0d frame_err=%0d reload=%0d clipped=%0d updates=%0d ovf=%0d",
             n_out, n_cap_turns, n_hold_turns, n_err, n_reload, n_sat, n_upd, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
