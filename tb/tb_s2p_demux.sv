// tb_s2p_demux: random samples in, turns of TURN samples marked by a
// fiducial, plus one fiducial in mid-word. A model collects the samples
// into words; each word must appear exactly one cycle after its last
// sample, with the right lanes and word_first flag, and a broken word must
// be dropped. Inputs change and outputs are checked on the falling edge.
module tb_s2p_demux;
  localparam int RATIO = 8, W = 8, TURN = 40;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0;
  logic [W-1:0] in_data = '0;
  logic word_valid, word_first;
  logic [RATIO-1:0][W-1:0] word;
  int checks = 0, failures = 0, n_words = 0, n_first = 0;

  s2p_demux #(.RATIO(RATIO), .W(W)) dut (.*);

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

  // model state
  logic [RATIO-1:0][W-1:0] m_buf;
  int m_pos = 0;
  bit m_first = 0;
  bit exp_valid = 0, exp_first = 0;
  logic [RATIO-1:0][W-1:0] exp_word;

  initial begin
    int bunch = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(word_valid == exp_valid, "word_valid timing");
      if (exp_valid && word_valid) begin
        check(word == exp_word, "word lanes");
        check(word_first == exp_first, "word_first");
        n_words++;
        if (word_first) n_first++;
      end
      // drive: mostly continuous, a few idle cycles, one early fiducial
      in_valid = (i < 1500) || ($urandom % 8 != 0);
      in_data  = W'($urandom);
      if (i == 2003) bunch = 0;                    // fiducial in mid-word
      in_first = in_valid && (bunch == 0);
      // model
      exp_valid = 0;
      if (in_valid) begin
        if (in_first) m_pos = 0;
        if (m_pos == 0) m_first = in_first;
        m_buf[m_pos] = in_data;
        if (m_pos == RATIO-1) begin
          exp_valid = 1; exp_word = m_buf; exp_first = m_first; m_pos = 0;
        end else m_pos++;
        bunch = (bunch + 1) % TURN;
      end
    end
    check(n_words > 300, "enough words");
    check(n_first > 5, "fiducial words");
    $display("words=%0d first=%0d", n_words, n_first);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
