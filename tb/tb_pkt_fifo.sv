// tb_pkt_fifo: checks the commit/rollback FIFO against a queue model.
// Blocks become readable only on commit, an abort drops exactly the
// uncommitted bytes, avail tracks committed minus read bytes, and a write to
// a full FIFO is dropped and flagged. Random phase at the end compares every
// byte read with the model.
module tb_pkt_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, commit = 0, abort = 0, rd_en = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic [4:0] avail, used;
  logic empty, full, ovf;
  int checks = 0, failures = 0;
  byte q_commit[$], q_pend[$];

  pkt_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input byte d);
    @(negedge clk); wr_en = 1; wr_data = d; @(negedge clk); wr_en = 0;
  endtask
  task automatic pulse_commit(); @(negedge clk); commit = 1; @(negedge clk); commit = 0; endtask
  task automatic pulse_abort();  @(negedge clk); abort  = 1; @(negedge clk); abort  = 0; endtask
  task automatic rd(output byte d);
    @(negedge clk); d = rd_data; rd_en = 1; @(negedge clk); rd_en = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    byte d;
    repeat (3) @(posedge clk); rst_n = 1;
    chk(empty && avail == 0 && used == 0, "empty after reset");
    for (int i = 0; i < 5; i++) wr(8'h10 + 8'(i));
    chk(avail == 0 && used == 5 && empty, "uncommitted bytes invisible");
    pulse_commit();
    chk(avail == 5 && !empty, "commit makes block visible");
    for (int i = 0; i < 3; i++) wr(8'h40 + 8'(i));
    pulse_abort();
    chk(avail == 5 && used == 5, "abort drops only uncommitted bytes");
    for (int i = 0; i < 5; i++) begin rd(d); chk(d == 8'h10 + 8'(i), $sformatf("read %0d = %h", i, d)); end
    chk(avail == 0 && empty, "drained");
    // fill up
    for (int i = 0; i < DEPTH; i++) wr(8'(i));
    chk(full, "full after DEPTH writes");
    @(negedge clk); wr_en = 1; wr_data = 8'hEE; @(negedge clk); wr_en = 0;
    chk(ovf, "overflow flagged");
    // commit with same-cycle write is covered by random phase below
    pulse_commit();
    chk(avail == 5'(DEPTH), "full block committed");
    for (int i = 0; i < DEPTH; i++) begin rd(d); chk(d == 8'(i), "full block content"); end
    // random phase against a model
    for (int n = 0; n < 3000; n++) begin
      int op = $urandom_range(0, 9);
      @(negedge clk);
      wr_en = 0; commit = 0; abort = 0; rd_en = 0;
      if (op < 4) begin
        wr_en = 1; wr_data = 8'($urandom);
        commit = ($urandom_range(0, 3) == 0);
      end else if (op < 7) rd_en = 1;
      else if (op == 7) commit = 1;
      else if (op == 8) abort = 1;
      // model, evaluated with values before the edge
      if (rd_en && q_commit.size() > 0) begin
        chk(rd_data == q_commit[0], "random read data");
        void'(q_commit.pop_front());
      end
      if (wr_en && (q_commit.size() + q_pend.size()) < DEPTH && !abort) q_pend.push_back(wr_data);
      if (abort) q_pend.delete();
      else if (commit) begin foreach (q_pend[i]) q_commit.push_back(q_pend[i]); q_pend.delete(); end
      @(posedge clk); #1;
      chk(avail == 5'(q_commit.size()), $sformatf("avail %0d vs %0d", avail, q_commit.size()));
      chk(used == 5'(q_commit.size() + q_pend.size()), "used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
