// ser_rx: serial link receiver with block framing and error checks.
//
// Samples ser_data on each rising edge of ser_clk (both lines pass a two-flop
// synchroniser first, so the link clock may be unrelated to clk). Bytes are
// a start bit (1) plus 8 data bits, most significant first. After each byte
// the next bit is the start-bit slot: a 1 starts another byte of the same
// packet; a 0 must be followed by 16 more zeros (17 in all), which ends the
// packet. These rules, and the two errors below, follow the specification:
//   framing error - a missing start bit not followed by 16 zeros;
//   size error    - the length in the header does not match the length found
//                   at the end of packet.
// On an error the block is dropped (pkt_abort) and nothing is accepted until
// 17 consecutive zeros have been seen. The same wait applies after reset.
//
// Length check: with hdr_len_mode = 1 (telemetry) the first two bytes of a
// block are its total length in bytes, most significant byte first; with
// hdr_len_mode = 0 (commands) every packet must be FIXED_LEN bytes. The
// header layout is this design's choice; the specification only says the
// header gives the length.
//
// Received bytes are offered on byte_valid/byte_data as they complete (one
// cycle pulse) for a commit/rollback FIFO; pkt_commit or pkt_abort closes the
// block. fifo_full is sampled when a byte completes: a byte that finds the
// FIFO full drops the block and raises ovf_err. A byte is delivered about
// three clk cycles after the rising ser_clk edge that carried its last bit.
module ser_rx #(
  parameter int unsigned FIXED_LEN = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hdr_len_mode,
  input  logic        ser_clk,
  input  logic        ser_data,
  input  logic        fifo_full,
  output logic        byte_valid,
  output logic [7:0]  byte_data,
  output logic        pkt_commit,
  output logic        pkt_abort,
  output logic        frame_err,    // one-cycle pulses
  output logic        size_err,
  output logic        ovf_err,
  output logic [15:0] pkt_len,      // length of the block just committed
  output logic [7:0]  pkt_first,    // its first byte
  output logic        in_sync       // not hunting for a 17-zero gap
);
  import isg_pkg::*;

  typedef enum logic [2:0] {S_HUNT, S_IDLE, S_DATA, S_SLOT, S_END} rx_state_e;

  rx_state_e   state;
  logic [2:0]  clk_sync;
  logic [1:0]  dat_sync;
  logic        bit_stb, bit_val;
  logic [7:0]  sr;
  logic [2:0]  bit_cnt;
  logic [4:0]  zeros;
  logic [15:0] byte_cnt;
  logic [15:0] hdr_len;
  logic [7:0]  first;
  logic        len_ok;

  assign bit_stb = clk_sync[1] && !clk_sync[2];
  assign bit_val = dat_sync[1];
  assign in_sync = (state != S_HUNT);
  assign len_ok  = hdr_len_mode ? (byte_cnt >= 16'd2 && byte_cnt == hdr_len)
                                 : (byte_cnt == 16'(FIXED_LEN));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_sync   <= '0;
      dat_sync   <= '0;
      state      <= S_HUNT;
      sr         <= '0;
      bit_cnt    <= '0;
      zeros      <= '0;
      byte_cnt   <= '0;
      hdr_len    <= '0;
      first      <= '0;
      byte_valid <= 1'b0;
      byte_data  <= '0;
      pkt_commit <= 1'b0;
      pkt_abort  <= 1'b0;
      frame_err  <= 1'b0;
      size_err   <= 1'b0;
      ovf_err    <= 1'b0;
      pkt_len    <= '0;
      pkt_first  <= '0;
    end else begin
      clk_sync   <= {clk_sync[1:0], ser_clk};
      dat_sync   <= {dat_sync[0], ser_data};
      byte_valid <= 1'b0;
      pkt_commit <= 1'b0;
      pkt_abort  <= 1'b0;
      frame_err  <= 1'b0;
      size_err   <= 1'b0;
      ovf_err    <= 1'b0;
      if (bit_stb) begin
        unique case (state)
          S_HUNT: begin
            if (bit_val) zeros <= '0;
            else if (zeros == 5'(EOP_ZEROS - 1)) begin
              zeros <= '0;
              state <= S_IDLE;
            end else zeros <= zeros + 5'd1;
          end
          S_IDLE: begin
            if (bit_val) begin
              state    <= S_DATA;
              bit_cnt  <= '0;
              byte_cnt <= '0;
            end
          end
          S_DATA: begin
            sr      <= {sr[6:0], bit_val};
            bit_cnt <= bit_cnt + 3'd1;
            if (bit_cnt == 3'd7) begin
              if (fifo_full) begin
                pkt_abort <= 1'b1;
                ovf_err   <= 1'b1;
                zeros     <= '0;
                state     <= S_HUNT;
              end else begin
                byte_valid <= 1'b1;
                byte_data  <= {sr[6:0], bit_val};
                byte_cnt   <= byte_cnt + 16'd1;
                if (byte_cnt == 16'd0) begin
                  first          <= {sr[6:0], bit_val};
                  hdr_len[15:8]  <= {sr[6:0], bit_val};
                end
                if (byte_cnt == 16'd1) hdr_len[7:0] <= {sr[6:0], bit_val};
                state <= S_SLOT;
              end
            end
          end
          S_SLOT: begin
            if (bit_val) begin
              state   <= S_DATA;
              bit_cnt <= '0;
            end else begin
              zeros <= 5'd1;
              state <= S_END;
            end
          end
          S_END: begin
            if (bit_val) begin
              // start-bit slot was empty but this is not an end of packet
              pkt_abort <= 1'b1;
              frame_err <= 1'b1;
              zeros     <= '0;
              state     <= S_HUNT;
            end else if (zeros == 5'(EOP_ZEROS - 1)) begin
              zeros <= '0;
              state <= S_IDLE;
              if (len_ok) begin
                pkt_commit <= 1'b1;
                pkt_len    <= byte_cnt;
                pkt_first  <= first;
              end else begin
                pkt_abort <= 1'b1;
                size_err  <= 1'b1;
              end
            end else zeros <= zeros + 5'd1;
          end
          default: state <= S_HUNT;
        endcase
      end
    end
  end

  a_one_close: assert property (@(posedge clk) disable iff (!rst_n)
                                !(pkt_commit && pkt_abort));

endmodule
