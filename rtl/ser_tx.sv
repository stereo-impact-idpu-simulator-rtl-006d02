// ser_tx: serial link transmitter (one direction of the instrument/IDPU link).
//
// Drives a free-running bit clock and a data line. Each byte goes out as a
// start bit (1) followed by its 8 data bits, most significant first. A packet
// is any run of such bytes; after its last byte the data line stays 0, and
// the next packet may not start until 17 zero bits have gone by. The 17-zero
// end of packet and the start-bit rule follow the specification's error
// definitions; the bit order, the clock phase and the free-running clock are
// this design's choices (the link document is not reproduced here).
//
// Timing: one bit lasts BIT_DIV cycles of clk. ser_clk is low for the first
// half of a bit and high for the second, so a receiver samples ser_data on the
// rising edge of ser_clk, mid-bit. Bytes are taken with a one-cycle in_ready
// pulse at a bit boundary; in_valid/in_data/in_last must be held until then.
// A packet of N bytes occupies 9*N + 17 bit times from its first start bit to
// the earliest start of the next packet. If in_valid is low when a byte
// other than the last ends, the packet ends there.
module ser_tx #(
  parameter int unsigned BIT_DIV = 200   // clk cycles per bit (>= 2)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  input  logic       in_last,
  output logic       in_ready,   // byte accepted (one-cycle pulse)
  output logic       busy,       // packet or its trailing gap in progress
  output logic       ser_clk,
  output logic       ser_data
);
  import isg_pkg::*;

  localparam int unsigned DW = $clog2(BIT_DIV);

  logic [DW-1:0] div_cnt;
  logic          bit_end;
  logic          active;
  logic [8:0]    sr;
  logic [3:0]    bit_cnt;
  logic          cur_last;
  logic [4:0]    gap_cnt;
  logic [4:0]    gap_nx;

  assign bit_end = (div_cnt == DW'(BIT_DIV-1));
  assign gap_nx  = (gap_cnt < 5'(EOP_ZEROS)) ? gap_cnt + 5'd1 : gap_cnt;
  assign busy    = active || (gap_cnt < 5'(EOP_ZEROS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt  <= '0;
      active   <= 1'b0;
      sr       <= '0;
      bit_cnt  <= '0;
      cur_last <= 1'b0;
      gap_cnt  <= '0;
      in_ready <= 1'b0;
      ser_clk  <= 1'b0;
      ser_data <= 1'b0;
    end else begin
      in_ready <= 1'b0;
      div_cnt  <= bit_end ? '0 : div_cnt + 1'b1;
      // clock high for the second half of each bit
      if (bit_end)                             ser_clk <= 1'b0;
      else if (div_cnt == DW'(BIT_DIV/2 - 1))  ser_clk <= 1'b1;

      if (bit_end) begin
        if (active) begin
          if (bit_cnt != 4'd8) begin
            sr      <= {sr[7:0], 1'b0};
            bit_cnt <= bit_cnt + 4'd1;
            ser_data <= sr[7];
          end else if (!cur_last && in_valid && !in_ready) begin
            sr       <= {1'b1, in_data};
            bit_cnt  <= '0;
            cur_last <= in_last;
            in_ready <= 1'b1;
            ser_data <= 1'b1;
          end else begin
            active   <= 1'b0;
            gap_cnt  <= '0;
            ser_data <= 1'b0;
          end
        end else begin
          gap_cnt <= gap_nx;
          if (gap_nx >= 5'(EOP_ZEROS) && in_valid && !in_ready) begin
            active   <= 1'b1;
            sr       <= {1'b1, in_data};
            bit_cnt  <= '0;
            cur_last <= in_last;
            in_ready <= 1'b1;
            ser_data <= 1'b1;
          end else begin
            ser_data <= 1'b0;
          end
        end
      end
    end
  end

endmodule
