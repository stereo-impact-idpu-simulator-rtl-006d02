// tb_isg_capacity: the two capacity requirements, at the default sizes.
//
// Command queue: the PC writes 200 commands (600 bytes) in one burst, much
// faster than the link can send them. The queue must hold them all (no
// overflow, queue count near 200 right after the burst), and all 200 must
// then go out whole and in order (within the first second, so before any
// timing command).
// PC latency: at the same time the instrument streams telemetry blocks for
// 200 ms (100-byte blocks, back to back, 100 kbit/s) while the PC reads
// nothing. Afterwards the inbound FIFO must hold every byte: no overflow,
// and the complete-block count equals the bytes sent. The PC then reads
// them all and compares. About 4.5 million cycles.
module tb_isg_capacity;
  import isg_pkg::*;
  localparam int BIT_DIV = 200;

  logic clk = 0, rst_n = 0;
  logic [7:0] epp_data_in = 0, epp_data_out;
  logic epp_data_oe, epp_nwrite = 1, epp_ndstrb = 1, epp_nastrb = 1, epp_ninit = 1, epp_nwait;
  logic j3_cmd_clk, j3_cmd_data, p3_tlm_clk, p3_tlm_data;
  logic lk_clk = 0, lk_data = 0;
  logic led_mode, led_time, led_err, led_pc, led_out_empty, led_out_full, led_in_empty, led_in_full;
  logic [3:0] led_link;
  int checks = 0, failures = 0;

  isg_top dut (
    .clk, .rst_n,
    .epp_data_in, .epp_data_out, .epp_data_oe, .epp_nwrite, .epp_ndstrb, .epp_nastrb,
    .epp_ninit, .epp_nwait,
    .j3_cmd_clk, .j3_cmd_data, .j3_tlm_clk(lk_clk), .j3_tlm_data(lk_data),
    .p3_cmd_clk(1'b0), .p3_cmd_data(1'b0), .p3_tlm_clk, .p3_tlm_data,
    .led_mode, .led_time, .led_err, .led_pc, .led_link,
    .led_out_empty, .led_out_full, .led_in_empty, .led_in_full
  );

  tb_link_mon mon_j3 (.ser_clk(j3_cmd_clk), .ser_data(j3_cmd_data));

  always #25 clk = ~clk;   // 50 time units per cycle

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic epp_cycle(input bit is_addr, input bit is_write, input byte wdat, output byte rdat);
    wait (!epp_nwait);
    #130;
    epp_nwrite = !is_write;
    if (is_write) epp_data_in = wdat;
    #70;
    if (is_addr) epp_nastrb = 0; else epp_ndstrb = 0;
    wait (epp_nwait);
    #30;
    rdat = epp_data_out;
    #110;
    epp_nastrb = 1; epp_ndstrb = 1;
    wait (!epp_nwait);
    #20;
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

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam int NCMD = 200, BLK = 100;
  localparam longint LAT_CYCLES = 4_000_000;   // 200 ms at 20 MHz

  initial begin
    byte d, lo, hi, exp_cmds[$];
    int nblk = 0, n, nb, ci, ntime;
    longint t0;
    repeat (5) @(negedge clk); rst_n = 1;
    pc_write(REG_CTRL, 8'h06);
    fork
      begin
        for (int c = 0; c < NCMD; c++)
          for (int j = 0; j < 3; j++) begin
            exp_cmds.push_back(8'(c + 7 * j));
            pc_write(REG_OUT_DATA, 8'(c + 7 * j));
          end
        pc_read(REG_CMDQ_L, lo); pc_read(REG_CMDQ_H, hi);
        chk({hi, lo} >= 16'd190 && {hi, lo} <= 16'd200, $sformatf("queue holds %0d commands", {hi, lo}));
        pc_read(REG_ERR, d); chk(d == 0, "no overflow while queueing");
      end
      begin
        repeat (20) lk_bit(0);
        t0 = 0;
        while (t0 < LAT_CYCLES) begin
          lk_byte(8'(BLK >> 8)); lk_byte(8'(BLK));
          for (int i = 2; i < BLK; i++) lk_byte(8'(nblk + i));
          repeat (17) lk_bit(0);
          nblk++;
          t0 += longint'(BLK * 9 + 17) * BIT_DIV;
        end
      end
    join
    pc_read(REG_ERR, d); chk(d == 0, $sformatf("no errors after 200 ms unread (%h)", d));
    pc_read(REG_IN_CNT_L, lo); pc_read(REG_IN_CNT_H, hi);
    n = {hi, lo};
    chk(n == nblk * BLK, $sformatf("count %0d for %0d blocks", n, nblk));
    $display("held %0d bytes (%0d blocks) of telemetry", n, nblk);
    for (int b = 0; b < nblk; b++)
      for (int i = 0; i < BLK; i++) begin
        pc_read(REG_IN_DATA, d);
        chk(d == (i == 0 ? 8'(BLK >> 8) : i == 1 ? 8'(BLK) : 8'(b + i)), "telemetry byte");
      end
    // all commands out, in order
    wait (dut.cmd_count == 0);
    repeat (60 * BIT_DIV) @(negedge clk);
    nb = 0; ci = 0; ntime = 0;
    foreach (mon_j3.lens[p]) begin
      if (mon_j3.bytes[nb] == 8'hFF) ntime++;
      else begin
        for (int j = 0; j < 3; j++) chk(mon_j3.bytes[nb + j] == exp_cmds[ci * 3 + j], "command byte");
        ci++;
      end
      nb += mon_j3.lens[p];
    end
    chk(ci == NCMD, $sformatf("%0d commands sent", ci));
    chk(ntime == 0, "no timing command before the first second");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
