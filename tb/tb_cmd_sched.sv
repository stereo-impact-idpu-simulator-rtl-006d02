// tb_cmd_sched: checks command/timing-command interleaving.
// The testbench supplies its own once-a-second tick (reduced to TPS cycles),
// a queue of 3-byte commands and a transmitter model that takes one byte
// every 9 bit times and stays busy for a 17-bit gap after a packet. Checks:
// every tick yields a timing command (ID, seconds 15:8, 7:0) that starts
// within one byte time; commands come out whole and in order; no command
// starts unless it and its gap end before the next tick; commands held back
// near a tick are reported as deferred.
module tb_cmd_sched;
  localparam int BIT_DIV = 4;
  localparam int TPS     = 2000;
  localparam int BYTE_T  = 9 * BIT_DIV;
  localparam int GAP_T   = 17 * BIT_DIV;
  localparam int NCMD    = 60;
  logic clk = 0, rst_n = 0;
  logic enable = 1, time_en = 1, tick = 0;
  logic [31:0] seconds = 32'h00AB_CD10;
  logic [10:0] to_tick;
  logic [13:0] q_avail;
  logic [7:0] q_data, tx_data;
  logic q_pop, tx_valid, tx_last, tx_ready = 0, tx_busy, cmd_sent, time_sent, deferred;
  int checks = 0, failures = 0;
  int pre = 0;
  longint cyc = 0, tick_cyc = 0;
  byte queue[$], sent[$];
  int timer = 0, nbyte = 0;
  bit in_pkt = 0, gap = 0, pkt_is_time = 0, time_due = 0;
  int n_time = 0, n_cmd = 0, n_def = 0, n_ticks = 0;

  cmd_sched #(.BIT_DIV(BIT_DIV), .TICKS_PER_SEC(TPS), .QAW(13)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // once-a-second reference
  assign to_tick = 11'(TPS - 1 - pre);
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    tick <= (pre == TPS - 1);
    if (pre == TPS - 1) begin pre <= 0; seconds <= seconds + 1; end else pre <= pre + 1;
  end
  always @(posedge clk) if (tick) begin tick_cyc = cyc; n_ticks++; time_due = time_en; end

  // queue
  assign q_avail = 14'(queue.size());
  assign q_data  = queue.size() > 0 ? queue[0] : 8'h00;
  always @(posedge clk) if (q_pop) void'(queue.pop_front());

  // transmitter model
  assign tx_busy = in_pkt || gap;
  always @(posedge clk) if (rst_n) begin
    tx_ready <= 0;
    if (timer > 0) timer--;
    else if (gap) gap = 0;
    if (timer == 0 && !gap && tx_valid && !tx_ready) begin
      tx_ready <= 1;
      if (!in_pkt) begin
        // start of a packet
        in_pkt = 1; nbyte = 0;
        pkt_is_time = time_due;
        time_due = 0;
        if (pkt_is_time) begin
          chk(cyc - tick_cyc <= BYTE_T, $sformatf("timing command starts %0d cycles after tick", cyc - tick_cyc));
        end else begin
          chk(int'(to_tick) >= 3 * BYTE_T + GAP_T, $sformatf("command started only %0d cycles before tick", to_tick));
        end
      end
      if (pkt_is_time) begin
        case (nbyte)
          0: chk(tx_data == 8'hFF, $sformatf("time id %h at %0d tick %0d", tx_data, cyc, tick_cyc));
          1: chk(tx_data == seconds[15:8], "time byte 1");
          2: chk(tx_data == seconds[7:0], "time byte 2");
          default: chk(0, "time command too long");
        endcase
      end else sent.push_back(tx_data);
      nbyte++;
      timer = BYTE_T;
      if (tx_last) begin
        chk(nbyte == 3, "packet has 3 bytes");
        in_pkt = 0; gap = 1; timer = BYTE_T + GAP_T;
      end
    end
  end
  always @(posedge clk) if (rst_n) begin
    n_time += int'(time_sent); n_cmd += int'(cmd_sent); n_def += int'(deferred);
  end

  initial begin
    repeat (TPS * 12) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    byte exp[$];
    for (int i = 0; i < NCMD * 3; i++) begin queue.push_back(8'(i * 7 + 1)); exp.push_back(8'(i * 7 + 1)); end
    repeat (3) @(negedge clk); rst_n = 1;
    wait (n_cmd == NCMD && n_ticks >= 3);
    repeat (400) @(negedge clk);
    chk(n_time == n_ticks, $sformatf("timing commands %0d for %0d ticks", n_time, n_ticks));
    chk(n_def > 0, "some commands deferred");
    chk(sent.size() == exp.size(), "all command bytes sent");
    foreach (exp[i]) if (i < sent.size()) chk(sent[i] == exp[i], "command order");
    // disabled timing commands: no timing command, no deferral
    time_en = 0;
    repeat (8 * BYTE_T) @(negedge clk);
    begin
      int t0;
      t0 = n_time;
      repeat (2 * TPS) @(negedge clk);
      chk(n_time == t0, "time_en=0 suppresses timing commands");
    end
    $display("commands deferred: %0d", n_def);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
