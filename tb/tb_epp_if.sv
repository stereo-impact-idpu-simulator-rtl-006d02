// tb_epp_if: runs the four EPP cycles against the peripheral.
// A host model with its own, unrelated timing performs address and data
// writes and reads with the full nWait handshake; a register array stands
// in for the register file. Checks: addresses and data land where they
// should, reads return the addressed register, each data read gives exactly
// one reg_rd pulse, the bus is driven only inside read cycles, and nInit
// resets the address.
module tb_epp_if;
  logic clk = 0, rst_n = 0;
  logic [7:0] data_in = 0, data_out, reg_addr, reg_wdata, reg_rdata;
  logic data_oe, nwrite = 1, ndstrb = 1, nastrb = 1, ninit = 1, nwait;
  logic reg_wr, reg_rd, activity;
  logic [7:0] regs [256];
  int checks = 0, failures = 0, n_rd = 0, n_act = 0;

  epp_if dut (.*);
  always #5 clk = ~clk;

  assign reg_rdata = regs[reg_addr];
  always @(posedge clk) if (rst_n) begin
    if (reg_wr) regs[reg_addr] <= reg_wdata;
    n_rd  += int'(reg_rd);
    n_act += int'(activity);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // host side of one EPP cycle; is_addr selects nAStrb, else nDStrb
  task automatic epp_cycle(input bit is_addr, input bit is_write, input byte wdat, output byte rdat);
    wait (!nwait);
    #13;
    nwrite = !is_write;
    if (is_write) data_in = wdat;
    #7;
    if (is_addr) nastrb = 0; else ndstrb = 0;
    wait (nwait);
    #3;
    chk(is_write ? !data_oe : data_oe, "bus direction during cycle");
    rdat = data_out;
    #11;
    nastrb = 1; ndstrb = 1;
    wait (!nwait);
    #2;
    chk(!data_oe, "bus released after cycle");
    nwrite = 1;
  endtask

  initial begin
    #200000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    byte r;
    for (int i = 0; i < 256; i++) regs[i] = 8'(i ^ 8'h5A);
    #33 rst_n = 1;
    #20;
    epp_cycle(1, 1, 8'h21, r);
    chk(reg_addr == 8'h21, "address write");
    epp_cycle(1, 0, 8'h00, r);
    chk(r == 8'h21, "address read");
    epp_cycle(0, 0, 8'h00, r);
    chk(r == (8'h21 ^ 8'h5A), "data read");
    chk(n_rd == 1, "one reg_rd per data read");
    epp_cycle(0, 1, 8'hC7, r);
    chk(regs[8'h21] == 8'hC7, "data write");
    epp_cycle(0, 0, 8'h00, r);
    chk(r == 8'hC7 && n_rd == 2, "read back");
    for (int i = 0; i < 20; i++) begin
      byte a, d;
      a = 8'($urandom);
      d = 8'($urandom);
      epp_cycle(1, 1, a, r);
      epp_cycle(0, 1, d, r);
      epp_cycle(0, 0, 8'h00, r);
      chk(r == d, "random write/read");
    end
    chk(n_act == 5 + 60, "activity per cycle");
    ninit = 0; #100; ninit = 1; #50;
    chk(reg_addr == 8'h00, "nInit resets the address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
