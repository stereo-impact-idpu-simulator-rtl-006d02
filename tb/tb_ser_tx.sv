// tb_ser_tx: checks the serial transmitter bit by bit.
// Two packets (3 and 5 bytes) are queued back to back. A monitor samples
// ser_data on every rising ser_clk edge; the recorded stream must equal
// the expected one: each byte as a 1 start bit plus 8 data bits MSB first,
// exactly 17 zeros between the packets, and rising edges BIT_DIV cycles
// apart.
module tb_ser_tx;
  localparam int BIT_DIV = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0, in_ready, busy, ser_clk, ser_data;
  logic [7:0] in_data = 0;
  int checks = 0, failures = 0;
  bit bits[$];
  bit exp_bits[$];
  longint cyc = 0, last_edge = -1;

  ser_tx #(.BIT_DIV(BIT_DIV)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge ser_clk) begin
    bits.push_back(ser_data);
    if (last_edge >= 0) chk(cyc - last_edge == BIT_DIV, "bit period");
    last_edge = cyc;
  end


  function automatic void expect_pkt(input byte b[], input bit gap);
    foreach (b[i]) begin
      exp_bits.push_back(1'b1);
      for (int k = 7; k >= 0; k--) exp_bits.push_back(b[i][k]);
    end
    if (gap) for (int k = 0; k < 17; k++) exp_bits.push_back(1'b0);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    byte p1[] = '{8'hA5, 8'h00, 8'hFF};
    byte p2[] = '{8'h01, 8'h80, 8'h3C, 8'hC3, 8'h7E};
    int first;
    repeat (3) @(posedge clk); rst_n = 1;
    exp_bits = {};
    fork
      begin
        foreach (p1[i]) begin
          @(negedge clk); in_valid = 1; in_data = p1[i]; in_last = (i == 2);
          do @(posedge clk); while (!in_ready);
        end
        foreach (p2[i]) begin
          @(negedge clk); in_valid = 1; in_data = p2[i]; in_last = (i == 4);
          do @(posedge clk); while (!in_ready);
        end
        @(negedge clk); in_valid = 0;
      end
    join
    wait (!busy);
    repeat (4 * BIT_DIV) @(posedge clk);
    expect_pkt(p1, 1);
    expect_pkt(p2, 1);
    // the stream starts with the 17-zero wait after reset
    first = -1;
    foreach (bits[i]) if (bits[i] && first < 0) first = i;
    chk(first >= 16, $sformatf("zeros before first packet: %0d", first));
    for (int i = 0; i < exp_bits.size(); i++)
      chk(first + i < bits.size() && bits[first + i] == exp_bits[i], $sformatf("bit %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
