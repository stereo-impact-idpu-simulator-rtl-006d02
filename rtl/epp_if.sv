// epp_if: peripheral side of the IEEE-1284 EPP printer-port protocol.
//
// The PC reaches the ISG through its printer port in EPP mode. An EPP
// transfer is one of four cycles, told apart by which strobe the host drives
// low and by nWrite:
//   address write (nAStrb low, nWrite low)  - latch the register address
//   address read  (nAStrb low, nWrite high) - return the address
//   data write    (nDStrb low, nWrite low)  - write the addressed register
//   data read     (nDStrb low, nWrite high) - read the addressed register
// The peripheral answers each cycle by raising nWait once data is taken or
// driven; the host then releases its strobe, and the peripheral lowers nWait
// and releases the data bus. nInit low resets the interface. This is the
// standard EPP handshake; the register map behind it is in isg_pkg.
//
// All host lines pass a two-flop synchroniser, so the port may be slower
// than clk by any amount. The register side sees one-cycle pulses: reg_wr
// with reg_wdata, and reg_rd, during which reg_rdata (combinational from
// reg_addr) is captured; a read that has a side effect (FIFO pop) acts on
// that edge. The bidirectional data bus appears as data_in, data_out and
// data_oe (drive enable). Daisy chaining of several units (IEEE 1284.3)
// is not implemented: the specification leaves its addressing to be
// determined.
module epp_if (
  input  logic       clk,
  input  logic       rst_n,
  // printer port
  input  logic [7:0] data_in,
  output logic [7:0] data_out,
  output logic       data_oe,
  input  logic       nwrite,
  input  logic       ndstrb,
  input  logic       nastrb,
  input  logic       ninit,
  output logic       nwait,
  // register side
  output logic [7:0] reg_addr,
  output logic       reg_wr,
  output logic [7:0] reg_wdata,
  output logic       reg_rd,
  input  logic [7:0] reg_rdata,
  output logic       activity      // one-cycle pulse per EPP cycle
);

  typedef enum logic [1:0] {S_IDLE, S_RD, S_ACK} epp_state_e;

  epp_state_e state;
  logic [1:0] ds_s, as_s, wr_s, in_s;
  logic [7:0] d_s1, d_s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ds_s <= '1;
      as_s <= '1;
      wr_s <= '1;
      in_s <= '0;
      d_s1 <= '0;
      d_s2 <= '0;
    end else begin
      ds_s <= {ds_s[0], ndstrb};
      as_s <= {as_s[0], nastrb};
      wr_s <= {wr_s[0], nwrite};
      in_s <= {in_s[0], ninit};
      d_s1 <= data_in;
      d_s2 <= d_s1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      reg_addr  <= '0;
      reg_wr    <= 1'b0;
      reg_wdata <= '0;
      reg_rd    <= 1'b0;
      data_out  <= '0;
      data_oe   <= 1'b0;
      nwait     <= 1'b0;
      activity  <= 1'b0;
    end else if (!in_s[1]) begin
      state    <= S_IDLE;
      reg_addr <= '0;
      reg_wr   <= 1'b0;
      reg_rd   <= 1'b0;
      data_oe  <= 1'b0;
      nwait    <= 1'b0;
      activity <= 1'b0;
    end else begin
      reg_wr   <= 1'b0;
      reg_rd   <= 1'b0;
      activity <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (!as_s[1] || !ds_s[1]) begin
            activity <= 1'b1;
            if (!wr_s[1]) begin
              if (!as_s[1]) reg_addr <= d_s2;
              else begin
                reg_wr    <= 1'b1;
                reg_wdata <= d_s2;
              end
              nwait <= 1'b1;
              state <= S_ACK;
            end else if (!as_s[1]) begin
              data_out <= reg_addr;
              data_oe  <= 1'b1;
              nwait    <= 1'b1;
              state    <= S_ACK;
            end else begin
              reg_rd <= 1'b1;
              state  <= S_RD;
            end
          end
        end
        S_RD: begin
          data_out <= reg_rdata;
          data_oe  <= 1'b1;
          nwait    <= 1'b1;
          state    <= S_ACK;
        end
        S_ACK: begin
          if (as_s[1] && ds_s[1]) begin
            data_oe <= 1'b0;
            nwait   <= 1'b0;
            state   <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_rd_pulse: assert property (@(posedge clk) disable iff (!rst_n) reg_rd |=> !reg_rd);

endmodule
