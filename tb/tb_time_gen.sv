// tb_time_gen: checks the seconds counter and its once-a-second tick.
// With a reduced prescaler, ticks must come exactly TICKS_PER_SEC cycles
// apart, to_tick must count down to the tick, and a PC load must set the
// counter without shifting the tick phase.
module tb_time_gen;
  localparam int TPS = 100;
  logic clk = 0, rst_n = 0, load = 0, tick;
  logic [31:0] load_val = 0, seconds;
  logic [6:0] to_tick;
  int checks = 0, failures = 0;
  longint cyc = 0, last_tick = -1;
  int nticks = 0;

  time_gen #(.TICKS_PER_SEC(TPS)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // independent model: tick period and countdown
  always @(negedge clk) if (rst_n) begin
    if (tick) begin
      if (last_tick >= 0) chk(cyc - last_tick == TPS, $sformatf("tick period %0d", cyc - last_tick));
      last_tick = cyc;
      nticks++;
    end else if (last_tick >= 0) begin
      chk(int'(to_tick) == TPS - 1 - int'(cyc - last_tick), "to_tick countdown");
    end
  end

  initial begin
    logic [31:0] s0;
    repeat (3) @(posedge clk); rst_n = 1;
    chk(seconds == 0, "reset value");
    wait (nticks == 3); @(negedge clk);
    chk(seconds == 3, $sformatf("seconds after 3 ticks = %0d", seconds));
    repeat (17) @(negedge clk);
    load = 1; load_val = 32'h1234_5670; @(negedge clk); load = 0;
    chk(seconds == 32'h1234_5670, "load");
    s0 = seconds;
    wait (nticks == 4); @(negedge clk);
    chk(seconds == s0 + 1, "increments after load");
    wait (nticks == 6); @(negedge clk);
    chk(seconds == s0 + 3, "keeps counting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
