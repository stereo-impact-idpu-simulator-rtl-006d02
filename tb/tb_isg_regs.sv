// tb_isg_regs: checks the PC register map.
// Register accesses are driven directly. Checks: control bits read back
// and reach their outputs, the outbound and inbound data ports give their
// strobes, a multi-byte count read low byte first returns a consistent pair
// even when the count changes in between, error flags are sticky and
// cleared by writing 1 (together with their counters, which saturate), and
// the seconds counter is loaded as one 32-bit value on the last byte.
module tb_isg_regs;
  import isg_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] reg_addr = 0, reg_wdata = 0, reg_rdata;
  logic reg_wr = 0, reg_rd = 0;
  isg_mode_e mode;
  logic out_en, time_en, out_wr, out_resync, out_go, in_pop, time_load;
  logic [7:0] out_data;
  logic [31:0] time_val;
  logic out_empty = 1, out_full = 0, in_empty = 0, in_full = 0, tlm_busy = 0;
  logic [1:0] cmd_partial = 0;
  logic [15:0] in_avail = 0, cmd_count = 0;
  logic [7:0] in_data = 8'h77;
  logic [31:0] seconds = 32'hCAFE_BABE;
  logic ev_frame_err = 0, ev_size_err = 0, ev_in_ovf = 0, ev_out_ovf = 0;
  err_t errs;
  int checks = 0, failures = 0;
  int n_outwr = 0, n_pop = 0, n_resync = 0, n_go = 0, n_load = 0;
  logic [31:0] loaded;

  isg_regs dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    n_outwr += int'(out_wr); n_pop += int'(in_pop); n_resync += int'(out_resync);
    n_go += int'(out_go);
    if (time_load) begin n_load++; loaded = time_val; end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wreg(input reg_addr_e a, input byte d);
    @(negedge clk); reg_addr = a; reg_wdata = d; reg_wr = 1; @(negedge clk); reg_wr = 0;
  endtask
  task automatic rreg(input reg_addr_e a, output byte d);
    @(negedge clk); reg_addr = a; reg_rd = 1; #1 d = reg_rdata; @(negedge clk); reg_rd = 0;
  endtask
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    byte d, lo, hi;
    repeat (3) @(negedge clk); rst_n = 1;
    rreg(REG_CTRL, d);
    chk(d == 8'h04 && mode == MODE_IDPU_SIM && !out_en && time_en, "reset control");
    wreg(REG_CTRL, 8'h03);
    chk(mode == MODE_INST_SIM && out_en && !time_en, "control write");
    rreg(REG_CTRL, d); chk(d == 8'h03, "control read back");
    rreg(REG_STATUS, d); chk(d == 8'h81, $sformatf("status %h", d));
    wreg(REG_OUT_DATA, 8'h3C); chk(n_outwr == 1 && out_data == 8'h3C, "out data strobe");
    wreg(REG_OUT_CTRL, 8'h01); chk(n_resync == 1 && n_go == 0, "resync strobe");
    wreg(REG_OUT_CTRL, 8'h02); chk(n_go == 1 && n_resync == 1, "go strobe");
    rreg(REG_IN_DATA, d); chk(d == 8'h77 && n_pop == 1, "in data read pops");
    rreg(REG_STATUS, d); chk(n_pop == 1, "status read does not pop");
    // consistent 16-bit count read
    in_avail = 16'h12FF;
    rreg(REG_IN_CNT_L, lo);
    in_avail = 16'h1300;
    rreg(REG_IN_CNT_H, hi);
    chk({hi, lo} == 16'h12FF, $sformatf("latched count %h%h", hi, lo));
    cmd_count = 16'h00D2;
    rreg(REG_CMDQ_L, lo); rreg(REG_CMDQ_H, hi);
    chk({hi, lo} == 16'h00D2, "command count");
    // errors
    pulse(ev_frame_err); pulse(ev_frame_err); pulse(ev_size_err);
    rreg(REG_ERR, d); chk(d == 8'h03, $sformatf("error flags %h", d));
    rreg(REG_FERR_CNT, d); chk(d == 2, "framing count");
    rreg(REG_SERR_CNT, d); chk(d == 1, "size count");
    pulse(ev_in_ovf); pulse(ev_out_ovf);
    rreg(REG_ERR, d); chk(d == 8'h0F, "overflow flags");
    rreg(REG_STATUS, d); chk(d[6], "err_any in status");
    wreg(REG_ERR, 8'h04);
    rreg(REG_ERR, d); chk(d == 8'h0B, "write 1 clears inbound overflow flag only");
    rreg(REG_FERR_CNT, d); chk(d == 2, "framing count kept");
    wreg(REG_ERR, 8'h01);
    rreg(REG_ERR, d); chk(d == 8'h0A, "write 1 clears framing flag only");
    rreg(REG_FERR_CNT, d); chk(d == 0, "framing count cleared");
    rreg(REG_SERR_CNT, d); chk(d == 1, "size count kept");
    wreg(REG_ERR, 8'h0A);
    chk(errs == '0, "all clear");
    for (int i = 0; i < 300; i++) pulse(ev_size_err);
    rreg(REG_SERR_CNT, d); chk(d == 8'hFF, "size count saturates");
    // time
    wreg(REG_TIME_3, 8'h01); wreg(REG_TIME_2, 8'h23); wreg(REG_TIME_1, 8'h45);
    chk(n_load == 0, "no load before byte 0");
    wreg(REG_TIME_0, 8'h67);
    chk(n_load == 1 && loaded == 32'h0123_4567, $sformatf("time load %h", loaded));
    rreg(REG_TIME_3, d); chk(d == 8'hCA, "time read 3");
    rreg(REG_TIME_0, d); chk(d == 8'hBE, "time read 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
