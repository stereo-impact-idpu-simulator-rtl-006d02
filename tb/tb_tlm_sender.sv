// tb_tlm_sender: checks that one PC-loaded telemetry block goes out whole.
// A queue model stands in for the outbound FIFO and a transmitter model
// takes a byte every few cycles and stays busy for a gap after the last.
// Checks: the block leaves as a single packet with tx_last only on its final
// byte, busy stays high until the transmitter is idle again, done pulses
// once, an empty block completes at once, and go is ignored when disabled.
module tb_tlm_sender;
  localparam int BYTE_T = 5, GAP_T = 9;
  logic clk = 0, rst_n = 0, enable = 1, go = 0;
  logic [13:0] q_avail;
  logic [7:0] q_data, tx_data;
  logic q_pop, tx_valid, tx_last, tx_ready = 0, tx_busy, busy, done;
  int checks = 0, failures = 0, n_done = 0, n_last = 0, timer = 0;
  bit in_pkt = 0, gap = 0;
  byte queue[$], sent[$];

  tlm_sender #(.QAW(13)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  assign q_avail = 14'(queue.size());
  assign q_data  = queue.size() > 0 ? queue[0] : 8'h00;
  always @(posedge clk) if (q_pop) void'(queue.pop_front());
  assign tx_busy = in_pkt || gap;
  always @(posedge clk) if (rst_n) begin
    tx_ready <= 0;
    n_done += int'(done);
    if (timer > 0) timer--;
    else if (gap) gap = 0;
    if (timer == 0 && !gap && tx_valid && !tx_ready) begin
      tx_ready <= 1; in_pkt = 1; sent.push_back(tx_data); timer = BYTE_T;
      if (tx_last) begin n_last++; in_pkt = 0; gap = 1; timer = BYTE_T + GAP_T; end
    end
  end
  always @(negedge clk) if (rst_n && tx_busy && n_done == 0 && sent.size() > 0) chk(busy, "busy while sending");

  task automatic pulse_go(); @(negedge clk); go = 1; @(negedge clk); go = 0; endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 40; i++) queue.push_back(8'(255 - 3 * i));
    repeat (5) @(negedge clk);
    chk(!busy && sent.size() == 0, "nothing sent before go");
    pulse_go();
    chk(busy, "busy after go");
    wait (done); @(negedge clk); @(negedge clk);
    chk(!tx_busy && !busy, "busy falls after the link is idle");
    chk(sent.size() == 40 && n_last == 1, $sformatf("one packet of 40 bytes (%0d, %0d lasts)", sent.size(), n_last));
    foreach (sent[i]) chk(sent[i] == 8'(255 - 3 * i), "block content");
    chk(n_done == 1, "done once");
    // empty block
    pulse_go(); repeat (3) @(negedge clk);
    chk(n_done == 2 && !busy, "empty block completes");
    // disabled
    enable = 0; queue.push_back(8'h11);
    pulse_go(); repeat (50) @(negedge clk);
    chk(!busy && sent.size() == 40, "ignored when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
