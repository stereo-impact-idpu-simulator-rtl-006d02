// tb_link_mon: testbench-only decoder for one direction of the serial link.
// Samples data on each rising edge of the link clock and splits the stream
// into packets by the link rules (start bit 1 + 8 data bits MSB first per
// byte, 17 zero bits end a packet). Completed packets are appended to
// bytes[] with their lengths in lens[]; a packet that breaks the framing
// rule counts in bad. Nothing is decoded before the first 17-zero gap.
module tb_link_mon (
  input logic ser_clk,
  input logic ser_data
);
  byte    bytes[$];
  int     lens[$];
  int     bad = 0;
  int     nbits = 0;
  longint edges = 0;

  typedef enum {M_HUNT, M_IDLE, M_DATA, M_SLOT, M_END} mon_state_e;
  mon_state_e st = M_HUNT;
  int zeros = 0, k = 0, cur = 0, pkt_start = 0;
  byte sr = 0;

  always @(posedge ser_clk) begin
    edges++;
    case (st)
      M_HUNT: begin zeros = ser_data ? 0 : zeros + 1; if (zeros == 17) st = M_IDLE; end
      M_IDLE: if (ser_data) begin st = M_DATA; k = 0; cur = 0; pkt_start = bytes.size(); end
      M_DATA: begin
        sr = {sr[6:0], ser_data}; k++;
        if (k == 8) begin bytes.push_back(sr); cur++; st = M_SLOT; end
      end
      M_SLOT: if (ser_data) begin st = M_DATA; k = 0; end else begin zeros = 1; st = M_END; end
      M_END: begin
        if (ser_data) begin
          bad++; zeros = 0; st = M_HUNT;
          while (bytes.size() > pkt_start) void'(bytes.pop_back());
        end
        else begin zeros++; if (zeros == 17) begin lens.push_back(cur); st = M_IDLE; end end
      end
      default: st = M_HUNT;
    endcase
  end
endmodule
