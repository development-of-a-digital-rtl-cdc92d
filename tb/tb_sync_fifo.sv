// tb_sync_fifo: random pushes and pops against a queue model.
// Checks read data order, full/empty/count, the one-cycle overflow flag
// on a write into a full FIFO, and that a dropped write leaves the
// contents alone. Inputs change on the falling edge; outputs are checked
// on the falling edge, after the rising edge they follow.
module tb_sync_fifo;
  localparam int W = 12, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, empty, overflow;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0, n_ovf = 0, n_full = 0;
  logic [W-1:0] q[$];
  logic exp_ovf = 0;

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1200; i++) begin
      @(negedge clk);
      // outputs after the previous rising edge
      check(count == ($clog2(DEPTH)+1)'(q.size()), "count");
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == DEPTH), "full");
      check(overflow == exp_ovf, "overflow");
      if (q.size() > 0) check(rd_data == q[0], "rd_data");
      if (full) n_full++;
      if (overflow) n_ovf++;
      // new inputs: phases biased to fill, then to drain
      wr_en   = ($urandom % 100) < ((i / 150) % 2 ? 30 : 75);
      rd_en   = (q.size() > 0) && (($urandom % 100) < ((i / 150) % 2 ? 75 : 30));
      wr_data = W'($urandom);
      // model of the coming edge
      exp_ovf = wr_en && (q.size() == DEPTH);
      begin
        bit do_rd, do_wr;
        do_rd = rd_en && q.size() > 0;
        do_wr = wr_en && q.size() < DEPTH;
        if (do_rd) void'(q.pop_front());
        if (do_wr) q.push_back(wr_data);
      end
    end
    check(n_ovf > 0, "overflow seen");
    check(n_full > 0, "full seen");
    $display("full cycles=%0d overflows=%0d", n_full, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
