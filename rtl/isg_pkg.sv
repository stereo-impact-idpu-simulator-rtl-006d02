// isg_pkg: constants and types shared by the IDPU Simulator GSE (ISG) logic.
//
// The ISG sits between a PC printer port (IEEE-1284 EPP) and the serial
// command/telemetry link of an STEREO IMPACT instrument. It either plays the
// IDPU (sends commands, collects telemetry) or plays an instrument (collects
// commands, sends telemetry). This package holds the operating mode, the
// PC register map and the serial-link constants that several modules use.
//
// Following the specification: commands are 3 bytes; a packet ends with 17
// zero bits; a byte slot that lacks its start bit and is not followed by 16
// more zeros is a framing error. The register map, the timing-command layout
// and the telemetry length header are this design's own choices.
package isg_pkg;

  // Operating mode, set by the PC (only one mode at a time).
  typedef enum logic {
    MODE_IDPU_SIM = 1'b0,  // ISG plays the IDPU, instrument on "IDPU" connector
    MODE_INST_SIM = 1'b1   // ISG plays an instrument, IDPU on "Instrument" connector
  } isg_mode_e;

  // Serial link framing.
  localparam int unsigned CMD_BYTES  = 3;   // a command is three bytes
  localparam int unsigned EOP_ZEROS  = 17;  // zero bits that end a packet
  localparam int unsigned BYTE_BITS  = 9;   // start bit + 8 data bits

  // First byte of a timing command; bytes 2 and 3 carry the low 16 bits of
  // the seconds counter, most significant byte first.
  localparam logic [7:0] TIME_CMD_ID = 8'hFF;

  // PC register addresses (EPP address cycle selects, data cycles access).
  typedef enum logic [7:0] {
    REG_CTRL     = 8'h00,  // RW: [0] mode, [1] output enable, [2] timing-command enable
    REG_STATUS   = 8'h01,  // R : see status_t
    REG_OUT_DATA = 8'h02,  // W : next command / telemetry byte from the PC
    REG_OUT_CTRL = 8'h03,  // W : [0] resynchronise (drop partial command), [1] block complete
    REG_IN_DATA  = 8'h04,  // R : next received byte (pops the inbound FIFO)
    REG_IN_CNT_L = 8'h05,  // R : complete-block byte count, low byte (latches high byte)
    REG_IN_CNT_H = 8'h06,  // R : latched high byte of the count
    REG_CMDQ_L   = 8'h07,  // R : commands waiting in the queue, low byte (latches high byte)
    REG_CMDQ_H   = 8'h08,  // R : latched high byte
    REG_ERR      = 8'h09,  // R : error flags; W: write 1 to clear a flag
    REG_FERR_CNT = 8'h0A,  // R : framing errors (saturating)
    REG_SERR_CNT = 8'h0B,  // R : packet size errors (saturating)
    REG_TIME_3   = 8'h0C,  // RW: seconds counter, bits 31:24 (write stages)
    REG_TIME_2   = 8'h0D,  // RW: bits 23:16 (write stages)
    REG_TIME_1   = 8'h0E,  // RW: bits 15:8  (write stages)
    REG_TIME_0   = 8'h0F   // RW: bits 7:0   (write loads all 32 bits)
  } reg_addr_e;

  // Error flags as seen in REG_ERR.
  typedef struct packed {
    logic [3:0] rsvd;
    logic       out_ovf;    // PC wrote to a full outbound FIFO
    logic       in_ovf;     // received block did not fit in the inbound FIFO
    logic       size_err;   // header length and end-of-packet disagree
    logic       frame_err;  // missing start bit not followed by 16 zeros
  } err_t;

  // Status byte as seen in REG_STATUS.
  typedef struct packed {
    logic mode;         // current isg_mode_e
    logic err_any;      // some error flag is set
    logic cmd_partial;  // an incomplete command is being assembled
    logic tlm_busy;     // instrument mode: telemetry block still being sent
    logic in_full;
    logic in_empty;
    logic out_full;
    logic out_empty;
  } status_t;

endpackage
