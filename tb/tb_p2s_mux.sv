// tb_p2s_mux: loads random words every RATIO cycles (with some gaps and
// one early reload) and checks that the lanes come out in order, lane 0
// the cycle after the load, with out_first only on the first sample of a
// word loaded with load_first and out_valid low when nothing is left.
module tb_p2s_mux;
  localparam int RATIO = 8, W = 8;
  logic clk = 0, rst_n = 0;
  logic load = 0, load_first = 0;
  logic [RATIO-1:0][W-1:0] word = '0;
  logic out_valid, out_first;
  logic [W-1:0] out_data;
  int checks = 0, failures = 0, n_out = 0, n_gap = 0;

  p2s_mux #(.RATIO(RATIO), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [RATIO-1:0][W-1:0] m_word;
  int  m_left = 0, m_idx = 0;
  bit  m_first = 0;

  initial begin
    int phase = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2500; i++) begin
      @(negedge clk);
      // expected output of the edge just passed
      if (m_left > 0) begin
        check(out_valid, "out_valid");
        check(out_data == m_word[m_idx], "out_data order");
        check(out_first == (m_first && m_idx == 0), "out_first");
        n_out++;
      end else begin
        check(!out_valid && !out_first, "idle");
        n_gap++;
      end
      if (m_left > 0) begin m_left--; m_idx++; end
      // drive next load
      load = 0;
      if (phase == 0 && !(i > 1200 && i < 1240)) begin
        load = 1;
        for (int l = 0; l < RATIO; l++) word[l] = W'($urandom);
        load_first = ($urandom % 4) == 0;
      end
      if (i == 1700) begin   // early reload in mid-word
        load = 1;
        for (int l = 0; l < RATIO; l++) word[l] = W'($urandom);
        load_first = 1;
        phase = 0;
      end
      if (load) begin m_word = word; m_left = RATIO; m_idx = 0; m_first = load_first; end
      phase = (phase + 1) % RATIO;
    end
    check(n_out > 2000 && n_gap > 20, "activity");
    $display("samples=%0d idle=%0d", n_out, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
