// tb_led_ctrl: checks LED pulse stretching.
// A level change or an event pulse must light its LED for exactly HOLD
// cycles, a new event must retrigger the hold, and an input with no events
// must stay dark.
module tb_led_ctrl;
  localparam int HOLD = 20;
  logic clk = 0, rst_n = 0;
  logic [1:0] sig = 0, led_sig;
  logic [0:0] pulse = 0, led_pulse;
  int checks = 0, failures = 0;

  led_ctrl #(.NSIG(2), .NPULSE(1), .HOLD(HOLD)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lit;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); sig[0] = 1;
    lit = 0;
    repeat (HOLD + 10) begin @(negedge clk); lit += int'(led_sig[0]); chk(!led_sig[1], "quiet input dark"); end
    chk(lit == HOLD, $sformatf("level change lit %0d cycles", lit));
    @(negedge clk); pulse = 1; @(negedge clk); pulse = 0;
    lit = 1;
    repeat (HOLD / 2) begin @(negedge clk); lit += int'(led_pulse[0]); end
    pulse = 1; @(negedge clk); pulse = 0;
    repeat (HOLD + 10) begin @(negedge clk); lit += int'(led_pulse[0]); end
    chk(lit == HOLD / 2 + HOLD, $sformatf("retriggered pulse lit %0d cycles", lit));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
