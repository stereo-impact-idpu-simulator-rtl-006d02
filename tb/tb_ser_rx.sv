// tb_ser_rx: drives the receiver with hand-built link bit streams.
// Covers a good telemetry block (length header), a packet-size error, a
// framing error followed by data that must be ignored until a 17-zero gap,
// fixed-length commands of the right and wrong length, and a byte that
// meets a full FIFO. Delivered bytes and the commit/abort/error pulses are
// compared with what each stream must produce.
module tb_ser_rx;
  localparam int BIT_DIV = 6;
  logic clk = 0, rst_n = 0;
  logic hdr_len_mode = 1, ser_clk = 0, ser_data = 0, fifo_full = 0;
  logic byte_valid, pkt_commit, pkt_abort, frame_err, size_err, ovf_err, in_sync;
  logic [7:0] byte_data, pkt_first;
  logic [15:0] pkt_len;
  int checks = 0, failures = 0;
  int n_commit = 0, n_abort = 0, n_ferr = 0, n_serr = 0, n_ovf = 0;
  byte got[$];

  ser_rx #(.FIXED_LEN(3)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (byte_valid) got.push_back(byte_data);
    n_commit += int'(pkt_commit);
    n_abort  += int'(pkt_abort);
    n_ferr   += int'(frame_err);
    n_serr   += int'(size_err);
    n_ovf    += int'(ovf_err);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tx_bit(input bit b);
    ser_data = b; ser_clk = 0;
    repeat (BIT_DIV / 2) @(negedge clk);
    ser_clk = 1;
    repeat (BIT_DIV / 2) @(negedge clk);
  endtask
  task automatic tx_byte(input byte b);
    tx_bit(1);
    for (int k = 7; k >= 0; k--) tx_bit(b[k]);
  endtask
  task automatic tx_zeros(input int n);
    repeat (n) tx_bit(0);
  endtask
  task automatic tx_pkt(input byte b[]);
    foreach (b[i]) tx_byte(b[i]);
    tx_zeros(17);
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    chk(!in_sync, "hunting after reset");
    // data before any 17-zero gap is ignored
    tx_byte(8'hAA); tx_zeros(15);
    tx_pkt('{8'h00, 8'h03, 8'h11});
    chk(got.size() == 0 && n_commit == 0, "ignored before first gap");
    tx_zeros(1);
    chk(in_sync, "in sync after 17 zeros");
    // good telemetry block: header length 5
    got = {};
    tx_pkt('{8'h00, 8'h05, 8'hDE, 8'hAD, 8'h00});
    chk(n_commit == 1 && n_abort == 0, "good block committed");
    chk(got.size() == 5 && got[2] == 8'hDE && got[3] == 8'hAD && got[4] == 8'h00, "good block bytes");
    chk(pkt_len == 5 && pkt_first == 8'h00, "pkt_len/pkt_first");
    // size error: header says 6, four bytes sent
    tx_pkt('{8'h00, 8'h06, 8'h01, 8'h02});
    chk(n_serr == 1 && n_abort == 1 && n_commit == 1, "size error");
    // framing error: start slot empty, then a 1 within 16 bits
    tx_byte(8'h00); tx_byte(8'h04); tx_bit(0); tx_zeros(5); tx_bit(1);
    repeat (4) @(negedge clk);
    chk(n_ferr == 1 && n_abort == 2, "framing error");
    chk(!in_sync, "hunting after framing error");
    // a would-be block with too short a gap is ignored
    tx_zeros(10);
    tx_pkt('{8'h00, 8'h03, 8'h55});
    chk(n_commit == 1, "ignored while hunting");
    chk(in_sync, "resynchronised on 17 zeros");
    tx_pkt('{8'h00, 8'h03, 8'h66});
    chk(n_commit == 2 && pkt_len == 3, "accepted after resync");
    // fixed-length command mode
    hdr_len_mode = 0;
    tx_pkt('{8'hFF, 8'h12, 8'h34});
    chk(n_commit == 3 && pkt_first == 8'hFF, "3-byte command");
    tx_pkt('{8'h01, 8'h02, 8'h03, 8'h04});
    chk(n_serr == 2 && n_commit == 3, "4-byte command is a size error");
    tx_pkt('{8'h01, 8'h02});
    chk(n_serr == 3, "2-byte command is a size error");
    // overflow
    fifo_full = 1;
    tx_byte(8'h09);
    repeat (4) @(negedge clk);
    chk(n_ovf == 1 && n_abort == 5, "overflow drops block");
    fifo_full = 0;
    tx_byte(8'h01); tx_byte(8'h02); tx_byte(8'h03);
    chk(n_commit == 3, "rest of overflowed packet ignored");
    tx_zeros(17); tx_pkt('{8'hC1, 8'hC2, 8'hC3});
    chk(n_commit == 4 && got[got.size()-1] == 8'hC3, "recovers after overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
