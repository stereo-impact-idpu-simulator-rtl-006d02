// tb_isg_top: end-to-end test of the ISG through its printer port and links.
//
// A PC model performs EPP cycles; an instrument/IDPU model drives the
// incoming link and tb_link_mon decodes the outgoing ones. The ISG runs at
// reduced sizes (1 "second" = 20000 cycles, 8 cycles per bit, 256-byte
// FIFOs) so that every mechanism occurs in a short run:
//   IDPU simulation: outputs held at zero until enabled; a partial command
//   dropped by resync; 60 queued commands sent whole and in order among
//   timing commands, some held back for a timing command; the seconds
//   counter set by the PC; telemetry blocks collected and read back through
//   the complete-block byte count; framing, size and overflow errors seen,
//   read and cleared; outputs disabled again mid-run.
//   Instrument simulation: commands from the IDPU collected, a timing
//   command recognised, a bad command rejected; a telemetry block loaded by
//   the PC sent on the link while the PC polls the busy bit.
// Each mechanism is counted; one that never happened is a failure.
module tb_isg_top;
  import isg_pkg::*;
  localparam int TPS = 20000, BIT_DIV = 8, DEPTH = 256;

  logic clk = 0, rst_n = 0;
  logic [7:0] epp_data_in = 0, epp_data_out;
  logic epp_data_oe, epp_nwrite = 1, epp_ndstrb = 1, epp_nastrb = 1, epp_ninit = 1, epp_nwait;
  logic j3_cmd_clk, j3_cmd_data, p3_tlm_clk, p3_tlm_data;
  logic lk_clk = 0, lk_data = 0;
  logic led_mode, led_time, led_err, led_pc, led_out_empty, led_out_full, led_in_empty, led_in_full;
  logic [3:0] led_link;
  int checks = 0, failures = 0;

  isg_top #(.TICKS_PER_SEC(TPS), .BIT_DIV(BIT_DIV), .FIFO_DEPTH(DEPTH), .LED_HOLD(50)) dut (
    .clk, .rst_n,
    .epp_data_in, .epp_data_out, .epp_data_oe, .epp_nwrite, .epp_ndstrb, .epp_nastrb,
    .epp_ninit, .epp_nwait,
    .j3_cmd_clk, .j3_cmd_data, .j3_tlm_clk(lk_clk), .j3_tlm_data(lk_data),
    .p3_cmd_clk(lk_clk), .p3_cmd_data(lk_data), .p3_tlm_clk, .p3_tlm_data,
    .led_mode, .led_time, .led_err, .led_pc, .led_link,
    .led_out_empty, .led_out_full, .led_in_empty, .led_in_full
  );

  tb_link_mon mon_j3 (.ser_clk(j3_cmd_clk), .ser_data(j3_cmd_data));
  tb_link_mon mon_p3 (.ser_clk(p3_tlm_clk), .ser_data(p3_tlm_data));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int m_cmd = 0, m_time = 0, m_defer = 0, m_resync = 0, m_ferr = 0, m_serr = 0, m_ovf = 0;
  int m_time_rx = 0, m_tlm_block = 0, m_mode_sw = 0, m_disabled = 0, m_blocks_in = 0;
  int m_out_full = 0;
  logic [5:0] leds_seen = '0;
  int disabled_edges = 0;
  logic mode_q = 0;
  always @(posedge clk) if (rst_n) begin
    m_cmd     += int'(dut.cmd_sent);
    m_time    += int'(dut.time_sent);
    m_defer   += int'(dut.deferred);
    m_resync  += int'(dut.out_resync);
    m_ferr    += int'(dut.rx_ferr);
    m_serr    += int'(dut.rx_serr);
    m_ovf     += int'(dut.rx_ovf);
    m_time_rx += int'(dut.time_rx);
    m_tlm_block += int'(dut.tlm_done);
    m_blocks_in += int'(dut.rx_commit);
    m_out_full  += int'(led_out_full);
    leds_seen |= {led_pc, led_time, led_link};
    mode_q <= led_mode;
    if (led_mode != mode_q) m_mode_sw++;
    // disabled outputs must be quiet even while the transmitter runs
    if (!dut.out_en && dut.tx_clk) begin
      m_disabled++;
      chk(!j3_cmd_clk && !j3_cmd_data && !p3_tlm_clk && !p3_tlm_data, "disabled outputs at zero");
    end
    if (led_mode && (j3_cmd_clk || j3_cmd_data)) disabled_edges++;
  end

  // ---------------- PC (EPP host) model ----------------
  task automatic epp_cycle(input bit is_addr, input bit is_write, input byte wdat, output byte rdat);
    wait (!epp_nwait);
    #13;
    epp_nwrite = !is_write;
    if (is_write) epp_data_in = wdat;
    #7;
    if (is_addr) epp_nastrb = 0; else epp_ndstrb = 0;
    wait (epp_nwait);
    #3;
    rdat = epp_data_out;
    #11;
    epp_nastrb = 1; epp_ndstrb = 1;
    wait (!epp_nwait);
    #2;
    epp_nwrite = 1;
  endtask
  task automatic pc_write(input reg_addr_e a, input byte d);
    byte r;
    epp_cycle(1, 1, a, r);
    epp_cycle(0, 1, d, r);
  endtask
  task automatic pc_read(input reg_addr_e a, output byte d);
    byte r;
    epp_cycle(1, 1, a, r);
    epp_cycle(0, 0, 8'h00, d);
  endtask
  task automatic pc_read16(input reg_addr_e lo, output int v);
    byte l, h;
    pc_read(lo, l);
    pc_read(reg_addr_e'(lo + 1), h);
    v = {h, l};
  endtask

  // ---------------- instrument / IDPU link driver ----------------
  task automatic lk_bit(input bit b);
    lk_data = b; lk_clk = 0;
    repeat (BIT_DIV / 2) @(negedge clk);
    lk_clk = 1;
    repeat (BIT_DIV / 2) @(negedge clk);
  endtask
  task automatic lk_byte(input byte b);
    lk_bit(1);
    for (int k = 7; k >= 0; k--) lk_bit(b[k]);
  endtask
  task automatic lk_pkt(input byte b[]);
    foreach (b[i]) lk_byte(b[i]);
    repeat (17) lk_bit(0);
  endtask
  task automatic tlm_block(input int len, input int seed, output byte b[]);
    b = new[len];
    b[0] = 8'(len >> 8); b[1] = 8'(len);
    for (int i = 2; i < len; i++) b[i] = 8'(seed + 5 * i);
  endtask

  // PC drains the inbound FIFO: read the count, then that many bytes
  task automatic pc_drain(ref byte got[$]);
    int n;
    byte d;
    pc_read16(REG_IN_CNT_L, n);
    for (int i = 0; i < n; i++) begin pc_read(REG_IN_DATA, d); got.push_back(d); end
  endtask

  initial begin
    #4000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    byte d, blk_a[], blk_b[], blk_big[], got[$], expect_in[$], exp_cmds[$], tlm_out[$];
    int n, ncmd_q, t_first, nb;

    repeat (5) @(negedge clk); rst_n = 1;
    repeat (40) lk_bit(0);

    // ======== IDPU simulation ========
    pc_read(REG_CTRL, d);
    chk(d == 8'h04, "reset: IDPU mode, outputs disabled, timing on");
    // outputs disabled at reset: let a timing command go out unseen
    wait (m_time == 1);
    repeat (100) @(negedge clk);
    chk(mon_j3.edges == 0, "nothing on J3 while disabled");
    pc_write(REG_CTRL, 8'h06);            // IDPU mode, outputs on, timing on
    // set the seconds counter
    pc_write(REG_TIME_3, 8'h00); pc_write(REG_TIME_2, 8'h00); pc_write(REG_TIME_1, 8'h12);
    pc_write(REG_TIME_0, 8'h30);
    // a partial command, then resync
    pc_write(REG_OUT_DATA, 8'hEE); pc_write(REG_OUT_DATA, 8'hEE);
    pc_read(REG_STATUS, d); chk(d[5], "partial command flagged");
    pc_write(REG_OUT_CTRL, 8'h01);
    pc_read(REG_STATUS, d); chk(!d[5], "resync clears partial command");
    // queue 60 commands
    for (int c = 0; c < 60; c++) begin
      for (int j = 0; j < 3; j++) begin
        byte b = (j == 0) ? 8'(c) : 8'(c * 3 + j);
        exp_cmds.push_back(b);
        pc_write(REG_OUT_DATA, b);
      end
      if (c == 20) begin
        pc_read16(REG_CMDQ_L, ncmd_q);
        chk(ncmd_q >= 1 && ncmd_q <= 21, $sformatf("queue status %0d", ncmd_q));
      end
    end
    // instrument sends telemetry meanwhile: good block, size error, framing error, good block
    tlm_block(10, 3, blk_a);
    lk_pkt(blk_a);
    foreach (blk_a[i]) expect_in.push_back(blk_a[i]);
    lk_pkt('{8'h00, 8'h09, 8'h01, 8'h02});            // header says 9, 4 sent
    lk_byte(8'h00); lk_byte(8'h07); lk_bit(0); lk_bit(0); lk_bit(1);  // framing error
    repeat (5) lk_bit(1); repeat (20) lk_bit(0);
    tlm_block(33, 40, blk_b);
    lk_pkt(blk_b);
    foreach (blk_b[i]) expect_in.push_back(blk_b[i]);
    pc_read16(REG_IN_CNT_L, n);
    chk(n == 43, $sformatf("complete-block byte count %0d", n));
    pc_drain(got);
    chk(got.size() == expect_in.size(), "all telemetry bytes read");
    foreach (expect_in[i]) if (i < got.size()) chk(got[i] == expect_in[i], "telemetry byte");
    pc_read(REG_ERR, d); chk(d[1:0] == 2'b11, $sformatf("framing and size flags %h", d));
    pc_read(REG_FERR_CNT, d); chk(d == 1, "one framing error");
    pc_read(REG_SERR_CNT, d); chk(d == 1, "one size error");
    chk(led_err, "error LED");
    pc_write(REG_ERR, 8'hFF);
    pc_read(REG_ERR, d); chk(d == 0, "errors cleared");
    // block larger than the inbound FIFO
    tlm_block(DEPTH + 40, 9, blk_big);
    lk_pkt(blk_big);
    pc_read(REG_ERR, d); chk(d[2], "inbound overflow flagged");
    pc_read16(REG_IN_CNT_L, n); chk(n == 0, "overflowed block dropped");
    pc_write(REG_ERR, 8'hFF);
    // wait for the queue to drain and two more timing commands
    wait (m_cmd == 60);
    t_first = m_time;
    wait (m_time == t_first + 2);
    repeat (60 * BIT_DIV) @(negedge clk);
    // check the J3 command stream: commands in order, timing commands counting up
    begin
      int ci = 0, last_sec = -1, ntime = 0;
      nb = 0;
      foreach (mon_j3.lens[p]) begin
        chk(mon_j3.lens[p] == 3, "3-byte packets on command line");
        if (mon_j3.bytes[nb] == 8'hFF) begin
          int sec;
          sec = {mon_j3.bytes[nb+1], mon_j3.bytes[nb+2]};
          if (last_sec >= 0) chk(sec == last_sec + 1, $sformatf("timing command %h after %h", sec, last_sec));
          last_sec = sec; ntime++;
        end else begin
          for (int j = 0; j < 3; j++) chk(mon_j3.bytes[nb+j] == exp_cmds[ci*3+j], "command byte on link");
          ci++;
        end
        nb += mon_j3.lens[p];
      end
      chk(ci == 60, $sformatf("%0d commands on link", ci));
      chk(ntime >= 2 && last_sec >= 16'h1232, $sformatf("timing commands seen %0d, last %h", ntime, last_sec));
      chk(mon_j3.bad == 0, "no malformed packets");
    end
    // disable outputs while a timing command goes out
    pc_write(REG_CTRL, 8'h04);
    n = mon_j3.lens.size();
    wait (m_time == t_first + 3);
    repeat (60 * BIT_DIV) @(negedge clk);
    chk(mon_j3.lens.size() == n, "disabled outputs send nothing");

    // ======== instrument simulation ========
    pc_write(REG_CTRL, 8'h07);
    chk(led_mode, "mode LED");
    repeat (20) lk_bit(0);
    lk_pkt('{8'h10, 8'h20, 8'h30});
    lk_pkt('{8'hFF, 8'h12, 8'h34});                   // timing command from the IDPU
    lk_pkt('{8'h01, 8'h02, 8'h03, 8'h04});            // too long
    got = {};
    pc_drain(got);
    chk(got.size() == 6 && got[0] == 8'h10 && got[2] == 8'h30 && got[3] == 8'hFF && got[5] == 8'h34,
        $sformatf("commands from IDPU (%0d bytes)", got.size()));
    pc_read(REG_ERR, d); chk(d[1], "bad command is a size error");
    // telemetry block to the IDPU
    for (int i = 0; i < 25; i++) pc_write(REG_OUT_DATA, 8'(100 + i));
    chk(mon_p3.lens.size() == 0, "nothing sent before block complete");
    pc_write(REG_OUT_CTRL, 8'h02);
    do pc_read(REG_STATUS, d); while (d[4]);
    chk(mon_p3.lens.size() == 1 && mon_p3.lens[0] == 25, "one 25-byte block on P3");
    foreach (mon_p3.bytes[i]) chk(mon_p3.bytes[i] == 8'(100 + i), "telemetry out byte");
    chk(disabled_edges == 0, "J3 quiet in instrument mode");
    // fill the outbound FIFO to see its full indicator
    for (int i = 0; i < DEPTH + 2; i++) pc_write(REG_OUT_DATA, 8'(i));
    pc_read(REG_ERR, d); chk(d[3], "outbound overflow flagged");
    pc_write(REG_OUT_CTRL, 8'h01);
    pc_read(REG_STATUS, d); chk(d[0], "resync empties uncommitted block");

    // ---------------- mechanisms ----------------
    chk(m_cmd == 60,    "commands sent");
    chk(m_time > 2,     "timing commands sent");
    chk(m_defer > 0,    "command held back for a timing command");
    chk(m_resync > 0,   "resync");
    chk(m_ferr == 1,    "framing error");
    chk(m_serr == 2,    "size errors");
    chk(m_ovf == 1,     "inbound overflow");
    chk(m_time_rx == 1, "timing command received");
    chk(m_tlm_block == 1, "telemetry block sent");
    chk(m_mode_sw >= 1, "mode switch");
    chk(m_disabled > 0, "output disable exercised");
    chk(m_blocks_in >= 4, "blocks collected");
    chk(m_out_full > 0, "outbound full");
    chk(&leds_seen,     $sformatf("every activity LED lit (%b)", leds_seen));
    $display("mechanisms: cmd=%0d time=%0d defer=%0d resync=%0d ferr=%0d serr=%0d ovf=%0d time_rx=%0d tlm=%0d mode=%0d disabled=%0d",
             m_cmd, m_time, m_defer, m_resync, m_ferr, m_serr, m_ovf, m_time_rx, m_tlm_block, m_mode_sw, m_disabled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
