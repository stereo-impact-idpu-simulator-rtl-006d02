// cmd_sched: command sender for IDPU-simulation mode.
//
// Two sources share the command link: PC commands waiting in the outbound
// FIFO (always whole 3-byte commands, see out_framer) and the timing command
// that must go out once a second. On each time_gen tick a timing command is
// made pending, carrying the new seconds value; it is sent as soon as the
// link is free. A queued PC command is started only if it, with its 17-bit
// end-of-packet gap, is certain to be off the link before the next tick:
// otherwise it is held back (deferred pulses once per hold-back) until the
// timing command has gone. This is the look-ahead the specification asks for;
// the guard time below is derived from the packet length.
//
// Timing command layout (this design's choice): TIME_CMD_ID, then seconds
// bits 15:8 and 7:0.
//
// Interface: q_avail is the committed byte count of the outbound FIFO,
// q_data its head byte, q_pop pops it. tx_* is the byte stream of ser_tx.
// enable gates the start of new commands (IDPU-simulation mode); time_en
// gates timing-command generation (with it off, no command is held back). A command that has started always
// completes.
module cmd_sched #(
  parameter int unsigned BIT_DIV       = 200,
  parameter int unsigned TICKS_PER_SEC = 20_000_000,
  parameter int unsigned QAW           = 13,
  localparam int unsigned PW           = $clog2(TICKS_PER_SEC),
  // bit times from the decision to start until the link is free again:
  // up to one bit waiting for a boundary, 3 bytes of 9 bits, 17-zero gap,
  // plus one bit of margin
  localparam int unsigned GUARD        = (1 + isg_pkg::CMD_BYTES * isg_pkg::BYTE_BITS
                                          + isg_pkg::EOP_ZEROS + 1) * BIT_DIV
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic          time_en,
  input  logic          tick,
  input  logic [31:0]   seconds,
  input  logic [PW-1:0] to_tick,
  input  logic [QAW:0]  q_avail,
  input  logic [7:0]    q_data,
  output logic          q_pop,
  output logic          tx_valid,
  output logic [7:0]    tx_data,
  output logic          tx_last,
  input  logic          tx_ready,
  input  logic          tx_busy,
  output logic          cmd_sent,    // one-cycle pulses
  output logic          time_sent,
  output logic          deferred
);
  import isg_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_TIME, S_CMD} sched_state_e;

  sched_state_e state;
  logic         time_pend;
  logic [15:0]  time_val;
  logic [1:0]   idx;
  logic         holding;
  logic         cmd_ready, fits, new_tick;

  assign new_tick  = tick && time_en && enable;
  assign cmd_ready = (q_avail >= (QAW+1)'(CMD_BYTES)) && enable;
  assign fits      = !time_en || (32'(to_tick) >= 32'(GUARD));

  always_comb begin
    tx_valid = (state != S_IDLE);
    tx_last  = (idx == 2'd2);
    unique case (state)
      S_TIME:  tx_data = (idx == 2'd0) ? TIME_CMD_ID :
                         (idx == 2'd1) ? time_val[15:8] : time_val[7:0];
      S_CMD:   tx_data = q_data;
      default: tx_data = 8'h00;
    endcase
  end

  assign q_pop = (state == S_CMD) && tx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      time_pend <= 1'b0;
      time_val  <= '0;
      idx       <= '0;
      holding   <= 1'b0;
      cmd_sent  <= 1'b0;
      time_sent <= 1'b0;
      deferred  <= 1'b0;
    end else begin
      cmd_sent  <= 1'b0;
      time_sent <= 1'b0;
      deferred  <= 1'b0;
      if (new_tick) begin
        time_pend <= 1'b1;
        time_val  <= seconds[15:0];
      end
      unique case (state)
        S_IDLE: begin
          if (!tx_busy) begin
            if (time_pend) begin
              state     <= S_TIME;
              idx       <= '0;
              time_pend <= new_tick;
              holding   <= 1'b0;
            end else if (new_tick) begin
              // the timing command goes first; start it next cycle
            end else if (cmd_ready && fits) begin
              state   <= S_CMD;
              idx     <= '0;
              holding <= 1'b0;
            end else if (cmd_ready && !holding) begin
              holding  <= 1'b1;
              deferred <= 1'b1;
            end
          end
        end
        default: begin
          if (tx_ready) begin
            idx <= idx + 2'd1;
            if (idx == 2'd2) begin
              state     <= S_IDLE;
              cmd_sent  <= (state == S_CMD);
              time_sent <= (state == S_TIME);
            end
          end
        end
      endcase
    end
  end

  a_whole_cmd: assert property (@(posedge clk) disable iff (!rst_n)
                                (state == S_CMD) |-> (q_avail != '0));

endmodule
