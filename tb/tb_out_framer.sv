// tb_out_framer: checks that PC bytes are committed only as whole commands.
// Command mode: every third byte commits, resync drops a partial command and
// restarts the count, a byte lost to a full FIFO drops its whole command,
// and cmd_count follows commits and completions. Block mode: nothing
// commits until "block complete".
module tb_out_framer;
  logic clk = 0, rst_n = 0;
  logic block_mode = 0, wr = 0, resync = 0, go = 0, fifo_full = 0, cmd_done = 0;
  logic [7:0] wr_data = 0, f_data;
  logic f_wr, f_commit, f_abort, dropped;
  logic [1:0] partial;
  logic [15:0] cmd_count;
  int checks = 0, failures = 0;
  int n_commit = 0, n_abort = 0, n_wr = 0, n_drop = 0;

  out_framer dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    n_commit += int'(f_commit); n_abort += int'(f_abort); n_wr += int'(f_wr); n_drop += int'(dropped);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic put(input byte b, input bit full = 0);
    @(negedge clk); wr = 1; wr_data = b; fifo_full = full;
    @(negedge clk); wr = 0; fifo_full = 0;
  endtask
  task automatic strobe(input int which);
    @(negedge clk);
    if (which == 0) resync = 1; else if (which == 1) go = 1; else cmd_done = 1;
    @(negedge clk); resync = 0; go = 0; cmd_done = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    put(8'h01); chk(partial == 1 && n_commit == 0, "1 byte, no commit");
    put(8'h02); chk(partial == 2 && n_commit == 0, "2 bytes, no commit");
    put(8'h03); chk(partial == 0 && n_commit == 1 && cmd_count == 1, "third byte commits");
    put(8'h04); put(8'h05);
    strobe(0); chk(partial == 0 && n_abort == 1 && n_commit == 1, "resync drops partial");
    put(8'h06); put(8'h07); put(8'h08);
    chk(n_commit == 2 && cmd_count == 2, "realigned command commits");
    put(8'h09); put(8'h0A, 1); put(8'h0B); @(negedge clk);
    chk(n_commit == 2 && n_abort == 2 && n_drop == 1, "command with lost byte dropped");
    put(8'h0C); put(8'h0D); put(8'h0E);
    chk(n_commit == 3 && cmd_count == 3, "next command fine");
    strobe(2); chk(cmd_count == 2, "cmd_done decrements");
    chk(n_wr == 14, "all bytes passed on");
    // block mode
    block_mode = 1;
    for (int i = 0; i < 7; i++) put(8'(i));
    chk(n_commit == 3, "block mode: no commit on bytes");
    strobe(1); chk(n_commit == 4 && cmd_count == 2, "block committed on go");
    put(8'h20); strobe(0); chk(n_abort == 3, "resync in block mode drops block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
