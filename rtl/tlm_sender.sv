// tlm_sender: telemetry sender for instrument-simulation mode.
//
// The PC loads one telemetry block into the outbound FIFO and then signals
// "block complete" (go). The block is committed in the FIFO at the same
// time, so its length is the FIFO's committed byte count; this module sends
// exactly that many bytes as one packet and keeps busy high until the packet
// and its 17-zero end-of-packet gap have left the link. The PC polls busy to
// learn that the transfer is complete. As the specification allows, only one
// block is handled at a time: the PC does not load the next block before busy
// falls.
//
// Interface: go is a one-cycle pulse; q_avail/q_data/q_pop is the outbound
// FIFO read side; tx_* is the ser_tx byte stream; done pulses at the end.
// An empty block (go with nothing committed) completes at once.
module tlm_sender #(
  parameter int unsigned QAW = 13
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enable,
  input  logic         go,
  input  logic [QAW:0] q_avail,
  input  logic [7:0]   q_data,
  output logic         q_pop,
  output logic         tx_valid,
  output logic [7:0]   tx_data,
  output logic         tx_last,
  input  logic         tx_ready,
  input  logic         tx_busy,
  output logic         busy,
  output logic         done
);

  typedef enum logic [1:0] {S_IDLE, S_ARM, S_SEND, S_DRAIN} tlm_state_e;

  tlm_state_e   state;
  logic [QAW:0] remain;

  assign tx_valid = (state == S_SEND);
  assign tx_data  = q_data;
  assign tx_last  = (remain == (QAW+1)'(1));
  assign q_pop    = (state == S_SEND) && tx_ready;
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      remain <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:  if (go && enable) state <= S_ARM;
        S_ARM: begin
          // the commit issued with go is visible from this cycle on
          if (q_avail == '0) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else if (!tx_busy) begin
            remain <= q_avail;
            state  <= S_SEND;
          end
        end
        S_SEND: begin
          if (tx_ready) begin
            remain <= remain - 1'b1;
            if (remain == (QAW+1)'(1)) state <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          if (!tx_busy) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
