// pkt_fifo: byte FIFO whose writes become visible only when committed.
//
// Bytes are written at wr_ptr as they arrive. A commit pulse moves the
// committed pointer up to wr_ptr, making the whole block (or command)
// readable at once; an abort pulse moves wr_ptr back to the committed
// pointer, dropping a partial block. The reader sees only committed bytes,
// so avail is exactly "bytes of full blocks collected minus bytes read",
// the counter the PC polls: it grows by a block's size when the block ends
// and falls by one for each byte read.
//
// The same module is used in both directions: PC to link (command queue or
// telemetry block) and link to PC (received telemetry or commands).
//
// Interface: write side wr_en/wr_data/commit/abort; read side rd_en pops the
// byte shown on rd_data (first-word fall-through, rd_data valid while
// avail != 0). A write while full is discarded and reported on ovf for one
// cycle. commit and abort act on the state after the same-cycle write
// (commit with wr_en commits that byte too).
//
// DEPTH must be a power of two. The default 4096 bytes holds 200 ms of the
// link at up to 184 kbit/s (9 bits per byte); the specification asks for at
// least 200 ms of latency and at least 200 commands (600 bytes) of queue but
// gives no link rate, so the size is this design's choice.
module pkt_fifo #(
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // write side
  input  logic          wr_en,
  input  logic [7:0]    wr_data,
  input  logic          commit,
  input  logic          abort,
  // read side
  input  logic          rd_en,
  output logic [7:0]    rd_data,
  // status
  output logic [AW:0]   avail,     // committed bytes not yet read
  output logic [AW:0]   used,      // all bytes held, committed or not
  output logic          empty,     // nothing committed to read
  output logic          full,      // no room for another byte
  output logic          ovf        // a write was dropped (one-cycle pulse)
);

  logic [7:0]  mem [DEPTH];
  logic [AW:0] wr_ptr, cm_ptr, rd_ptr;
  logic        do_wr, do_rd;
  logic [AW:0] wr_ptr_nx;

  assign used  = wr_ptr - rd_ptr;
  assign avail = cm_ptr - rd_ptr;
  assign full  = (used == (AW+1)'(DEPTH));
  assign empty = (avail == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rd_data = mem[rd_ptr[AW-1:0]];
  assign wr_ptr_nx = wr_ptr + (AW+1)'(do_wr);

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      cm_ptr <= '0;
      rd_ptr <= '0;
      ovf    <= 1'b0;
    end else begin
      ovf <= wr_en && full;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
      if (abort) begin
        wr_ptr <= cm_ptr;
      end else begin
        wr_ptr <= wr_ptr_nx;
        if (commit) cm_ptr <= wr_ptr_nx;
      end
    end
  end

  // The committed region never passes the write pointer or trails the reader.
  a_order: assert property (@(posedge clk) disable iff (!rst_n)
                            (wr_ptr - cm_ptr) <= (AW+1)'(DEPTH) && avail <= used);

endmodule
