// tb_reorder_buffer: the NPE output FIFOs are modelled by queues that the
// testbench fills at random with {local index, correction}. The block must
// drain them one at a time (never an empty one), store each correction at
// slot index*NPE + element, pulse upd for each store, and return the held
// value one cycle after a read; a read racing a write to the same slot
// returns the old value. All slots read mid-scale after reset.
module tb_reorder_buffer;
  localparam int SLOTS = 25, NPE = 4, W = 8;
  localparam int NB = (SLOTS + NPE - 1) / NPE, IW = $clog2(NB), SW = $clog2(SLOTS);
  logic clk = 0, rst_n = 0;
  logic [NPE-1:0] fifo_empty, fifo_rd;
  logic [NPE-1:0][IW+W-1:0] fifo_data;
  logic rd_en = 0, rd_valid, upd;
  logic [SW-1:0] rd_slot = '0;
  logic [W-1:0] rd_data;
  int checks = 0, failures = 0, n_wr = 0, n_rd = 0, n_race = 0;

  reorder_buffer #(.SLOTS(SLOTS), .NPE(NPE), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [IW+W-1:0] q[NPE][$];
  logic [W-1:0] hold[SLOTS];
  logic [NPE-1:0] rd_mask = '0;
  bit exp_rv = 0;
  logic [W-1:0] exp_rd;

  always_comb
    for (int p = 0; p < NPE; p++) begin
      fifo_empty[p] = (q[p].size() == 0);
      fifo_data[p]  = fifo_empty[p] ? '0 : q[p][0];
    end

  initial begin
    int age[NPE];
    for (int s = 0; s < SLOTS; s++) hold[s] = 8'h80;
    for (int p = 0; p < NPE; p++) age[p] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8000; i++) begin
      @(negedge clk);
      // results of the edge just passed
      check(rd_valid == exp_rv, "rd_valid");
      if (exp_rv) begin check(rd_data == exp_rd, "rd_data"); n_rd++; end
      check(upd == (rd_mask != 0), "upd");
      for (int p = 0; p < NPE; p++) if (rd_mask[p]) begin
        logic [IW-1:0] idx; logic [W-1:0] d;
        {idx, d} = q[p].pop_front();
        hold[int'(idx) * NPE + p] = d;
        n_wr++;
      end
      for (int p = 0; p < NPE; p++) begin
        age[p] = (q[p].size() == 0 || rd_mask[p]) ? 0 : age[p] + 1;
        check(age[p] < NPE, "FIFO served within a round");
      end
      // new stimulus
      for (int p = 0; p < NPE; p++)
        if (($urandom % 8) == 0) begin
          int idx;
          idx = $urandom % NB;
          if (idx * NPE + p < SLOTS) q[p].push_back({IW'(idx), W'($urandom)});
        end
      rd_en   = ($urandom % 2) == 0;
      rd_slot = SW'($urandom % SLOTS);
      exp_rv  = rd_en;
      exp_rd  = hold[rd_slot];
      #1;
      rd_mask = fifo_rd;
      check($countones(fifo_rd) <= 1, "one FIFO per cycle");
      check((fifo_rd & fifo_empty) == 0, "no read of an empty FIFO");
      for (int p = 0; p < NPE; p++)
        if (rd_mask[p] && rd_en && (int'(q[p][0][IW+W-1:W]) * NPE + p) == int'(rd_slot)) n_race++;
    end
    check(n_wr > 500, "writes");
    $display("writes=%0d reads=%0d races=%0d", n_wr, n_rd, n_race);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
