// tb_isg_full: one complete operation of the ISG at its default sizes
// (20 MHz clock, 100 kbit/s link, one timing command per 20,000,000 cycles,
// 4096-byte FIFOs). In IDPU simulation the PC enables the outputs, sets the
// seconds counter and queues two commands; the instrument returns one
// telemetry block. The test checks the commands and the first timing command
// on the command line, and reads the block back through the complete-block
// byte count. A timing command is due only after a full second, so the run
// covers 21 million cycles.
module tb_isg_full;
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
    repeat (22_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    byte d, lo, hi;
    byte cmds[6] = '{8'h41, 8'h42, 8'h43, 8'h51, 8'h52, 8'h53};
    int n, nb;
    repeat (5) @(negedge clk); rst_n = 1;
    pc_write(REG_CTRL, 8'h06);
    pc_write(REG_TIME_3, 8'h00); pc_write(REG_TIME_2, 8'h00); pc_write(REG_TIME_1, 8'h07);
    pc_write(REG_TIME_0, 8'hFF);
    foreach (cmds[i]) pc_write(REG_OUT_DATA, cmds[i]);
    // instrument: 17-zero gap, one 12-byte telemetry block, gap
    repeat (20) lk_bit(0);
    lk_byte(8'h00); lk_byte(8'h0C);
    for (int i = 2; i < 12; i++) lk_byte(8'(i * 11));
    repeat (17) lk_bit(0);
    pc_read(REG_IN_CNT_L, lo); pc_read(REG_IN_CNT_H, hi);
    chk({hi, lo} == 16'd12, $sformatf("block byte count %0d", {hi, lo}));
    pc_read(REG_IN_DATA, d); chk(d == 8'h00, "header byte 0");
    pc_read(REG_IN_DATA, d); chk(d == 8'h0C, "header byte 1");
    for (int i = 2; i < 12; i++) begin pc_read(REG_IN_DATA, d); chk(d == 8'(i * 11), "block byte"); end
    pc_read(REG_IN_CNT_L, lo); chk(lo == 0, "count back to zero");
    // first timing command at the end of the first second
    wait (mon_j3.lens.size() == 3);
    chk(mon_j3.lens[0] == 3 && mon_j3.lens[1] == 3 && mon_j3.lens[2] == 3, "three 3-byte packets");
    for (int i = 0; i < 6; i++) chk(mon_j3.bytes[i] == cmds[i], "command bytes");
    chk(mon_j3.bytes[6] == 8'hFF && mon_j3.bytes[7] == 8'h08 && mon_j3.bytes[8] == 8'h00,
        $sformatf("timing command %h %h %h", mon_j3.bytes[6], mon_j3.bytes[7], mon_j3.bytes[8]));
    chk(led_time, "time LED flashes");
    pc_read(REG_ERR, d); chk(d == 0, "no errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
