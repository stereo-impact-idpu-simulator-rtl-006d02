// out_framer: keeps PC bytes grouped into whole commands or blocks.
//
// Bytes written by the PC enter the outbound commit/rollback FIFO at once,
// but are committed only as a unit, so the link side never sees part of a
// command. In command mode every third byte commits the three; in block
// mode (instrument simulation) the PC's "block complete" (go) commits the
// whole telemetry block. resync drops the uncommitted bytes and restarts the
// byte count, so a PC that lost track of its position can realign without a
// command being split between two (the specification requires that loss of
// synchronisation cannot split commands).
//
// A byte that meets a full FIFO is lost (the FIFO reports the overflow); in
// command mode the rest of that command is then dropped too, so the queue
// holds only whole commands. cmd_count counts the commands in the queue: up
// on each commit in command mode, down on each cmd_done from the scheduler.
// All outputs to the FIFO are combinational from the inputs of the same
// cycle.
module out_framer #(
  parameter int unsigned CW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          block_mode,
  input  logic          wr,
  input  logic [7:0]    wr_data,
  input  logic          resync,
  input  logic          go,
  input  logic          fifo_full,
  input  logic          cmd_done,
  output logic          f_wr,
  output logic [7:0]    f_data,
  output logic          f_commit,
  output logic          f_abort,
  output logic [1:0]    partial,     // bytes of the command being assembled
  output logic          dropped,     // a command was dropped (one-cycle pulse)
  output logic [CW-1:0] cmd_count
);
  import isg_pkg::*;

  logic bad;       // current command lost a byte
  logic third;

  assign third    = !block_mode && wr && !resync && (partial == 2'(CMD_BYTES - 1));
  assign f_wr     = wr && !resync;
  assign f_data   = wr_data;
  assign f_abort  = resync || (third && (bad || fifo_full));
  assign f_commit = !f_abort && (block_mode ? go : third);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      partial   <= '0;
      bad       <= 1'b0;
      dropped   <= 1'b0;
      cmd_count <= '0;
    end else begin
      dropped <= 1'b0;
      if (resync || block_mode) begin
        partial <= '0;
        bad     <= 1'b0;
      end else if (wr) begin
        if (third) begin
          partial <= '0;
          bad     <= 1'b0;
          dropped <= bad || fifo_full;
        end else begin
          partial <= partial + 2'd1;
          bad     <= bad || fifo_full;
        end
      end
      cmd_count <= cmd_count + CW'(f_commit && !block_mode) - CW'(cmd_done);
    end
  end

endmodule
