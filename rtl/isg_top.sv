// isg_top: IDPU Simulator GSE (ISG) logic for the STEREO IMPACT serial link.
//
// The ISG lets a PC stand in for either end of the serial link between the
// IMPACT IDPU and its instruments:
//   IDPU simulation       - an instrument is on the "IDPU" connector (J3).
//     PC commands are queued (whole 3-byte commands only) and sent on the
//     command line, interleaved with a timing command once a second from a
//     settable local seconds counter; a PC command that would still be on
//     the link when the timing command is due is held back. Telemetry blocks
//     from the instrument are checked (framing, packet size), collected, and
//     counted for the PC in bytes of complete blocks only.
//   Instrument simulation - the IDPU is on the "Instrument" connector (P3).
//     Commands from the IDPU are collected and counted the same way, with
//     the same error checks, and a timing command received flashes an LED.
//     The PC loads one telemetry block, marks it complete, and the ISG sends
//     it while the PC polls a busy bit.
// The PC talks to the ISG over an IEEE-1284 EPP printer port; one FIFO in
// each direction absorbs PC latency. The mode and an output-disable bit are
// set by the PC; disabled or unused link outputs are driven to zero.
//
// Structure: epp_if -> isg_regs -> out_framer -> pkt_fifo (outbound) ->
// cmd_sched or tlm_sender -> ser_tx -> connector; connector -> ser_rx ->
// pkt_fifo (inbound) -> isg_regs -> epp_if. time_gen feeds cmd_sched,
// led_ctrl drives the indicators.
//
// Each link direction is modelled as a bit clock and a data line; the third
// line per direction of the real harness is not defined here. Clock rate
// (20 MHz), link rate (100 kbit/s) and FIFO size (4096 bytes) are this
// design's choices; the specification gives only the 200-command queue depth
// and the 200 ms latency the FIFOs must cover.
module isg_top #(
  parameter int unsigned TICKS_PER_SEC = 20_000_000,  // clk cycles per second
  parameter int unsigned BIT_DIV       = 200,         // clk cycles per link bit
  parameter int unsigned FIFO_DEPTH    = 4096,        // bytes, each direction
  parameter int unsigned LED_HOLD      = 1_000_000    // LED stretch, clk cycles
) (
  input  logic       clk,
  input  logic       rst_n,
  // IEEE-1284 EPP printer port
  input  logic [7:0] epp_data_in,
  output logic [7:0] epp_data_out,
  output logic       epp_data_oe,
  input  logic       epp_nwrite,
  input  logic       epp_ndstrb,
  input  logic       epp_nastrb,
  input  logic       epp_ninit,
  output logic       epp_nwait,
  // "IDPU" connector (J3): an instrument is attached, ISG plays the IDPU
  output logic       j3_cmd_clk,
  output logic       j3_cmd_data,
  input  logic       j3_tlm_clk,
  input  logic       j3_tlm_data,
  // "Instrument" connector (P3): the IDPU is attached, ISG plays an instrument
  input  logic       p3_cmd_clk,
  input  logic       p3_cmd_data,
  output logic       p3_tlm_clk,
  output logic       p3_tlm_data,
  // indicators (active high)
  output logic       led_mode,       // lit in instrument simulation
  output logic       led_time,       // timing command sent / received
  output logic       led_err,        // an error flag is set
  output logic       led_pc,         // EPP activity
  output logic [3:0] led_link,       // {rx data, rx clock, tx data, tx clock} activity
  output logic       led_out_empty,
  output logic       led_out_full,
  output logic       led_in_empty,
  output logic       led_in_full
);
  import isg_pkg::*;

  localparam int unsigned AW = $clog2(FIFO_DEPTH);
  localparam int unsigned PW = $clog2(TICKS_PER_SEC);

  // EPP <-> registers
  logic [7:0] reg_addr, reg_wdata, reg_rdata;
  logic       reg_wr, reg_rd, epp_act;

  // control
  isg_mode_e  mode;
  logic       idpu_mode, inst_mode;
  logic       out_en, time_en;
  logic       out_wr, out_resync, out_go, in_pop;
  logic [7:0] out_data;
  logic       time_load;
  logic [31:0] time_val, seconds;
  err_t       errs;

  // outbound path
  logic        f_wr, f_commit, f_abort;
  logic [7:0]  f_data;
  logic [1:0]  cmd_partial;
  logic [15:0] cmd_count;
  logic        cmd_dropped;
  logic [7:0]  oq_data;
  logic [AW:0] oq_avail, oq_used;
  logic        oq_empty, oq_full, oq_ovf, oq_pop;

  // schedulers
  logic          tick;
  logic [PW-1:0] to_tick;
  logic          cs_pop, cs_valid, cs_last, cmd_sent, time_sent, deferred;
  logic [7:0]    cs_data;
  logic          ts_pop, ts_valid, ts_last, tlm_busy, tlm_done;
  logic [7:0]    ts_data;

  // link
  logic       tx_valid, tx_last, tx_ready, tx_busy, tx_clk, tx_data;
  logic [7:0] tx_byte;
  logic       rx_clk, rx_data;
  logic       rx_bv, rx_commit, rx_abort, rx_ferr, rx_serr, rx_ovf, rx_sync;
  logic [7:0] rx_byte, rx_first;
  logic [15:0] rx_len;
  logic       time_rx;

  // inbound path
  logic [7:0]  iq_data;
  logic [AW:0] iq_avail, iq_used;
  logic        iq_empty, iq_full, iq_ovf;

  assign idpu_mode = (mode == MODE_IDPU_SIM);
  assign inst_mode = (mode == MODE_INST_SIM);

  epp_if u_epp (
    .clk, .rst_n,
    .data_in(epp_data_in), .data_out(epp_data_out), .data_oe(epp_data_oe),
    .nwrite(epp_nwrite), .ndstrb(epp_ndstrb), .nastrb(epp_nastrb),
    .ninit(epp_ninit), .nwait(epp_nwait),
    .reg_addr, .reg_wr, .reg_wdata, .reg_rd, .reg_rdata, .activity(epp_act)
  );

  isg_regs u_regs (
    .clk, .rst_n,
    .reg_addr, .reg_wr, .reg_wdata, .reg_rd, .reg_rdata,
    .mode, .out_en, .time_en, .out_wr, .out_data, .out_resync, .out_go,
    .in_pop, .time_load, .time_val,
    .out_empty(oq_empty), .out_full(oq_full), .in_empty(iq_empty), .in_full(iq_full),
    .tlm_busy, .cmd_partial, .in_avail(16'(iq_avail)), .cmd_count,
    .in_data(iq_data), .seconds,
    .ev_frame_err(rx_ferr), .ev_size_err(rx_serr), .ev_in_ovf(rx_ovf),
    .ev_out_ovf(oq_ovf), .errs
  );

  out_framer u_framer (
    .clk, .rst_n,
    .block_mode(inst_mode), .wr(out_wr), .wr_data(out_data),
    .resync(out_resync), .go(out_go), .fifo_full(oq_full), .cmd_done(cmd_sent),
    .f_wr, .f_data, .f_commit, .f_abort,
    .partial(cmd_partial), .dropped(cmd_dropped), .cmd_count
  );

  pkt_fifo #(.DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .wr_en(f_wr), .wr_data(f_data), .commit(f_commit), .abort(f_abort),
    .rd_en(oq_pop), .rd_data(oq_data),
    .avail(oq_avail), .used(oq_used), .empty(oq_empty), .full(oq_full), .ovf(oq_ovf)
  );

  time_gen #(.TICKS_PER_SEC(TICKS_PER_SEC)) u_time (
    .clk, .rst_n, .load(time_load), .load_val(time_val),
    .seconds, .tick, .to_tick
  );

  cmd_sched #(.BIT_DIV(BIT_DIV), .TICKS_PER_SEC(TICKS_PER_SEC), .QAW(AW)) u_sched (
    .clk, .rst_n, .enable(idpu_mode), .time_en, .tick, .seconds, .to_tick,
    .q_avail(oq_avail), .q_data(oq_data), .q_pop(cs_pop),
    .tx_valid(cs_valid), .tx_data(cs_data), .tx_last(cs_last),
    .tx_ready(tx_ready && idpu_mode), .tx_busy,
    .cmd_sent, .time_sent, .deferred
  );

  tlm_sender #(.QAW(AW)) u_tlm (
    .clk, .rst_n, .enable(inst_mode), .go(out_go),
    .q_avail(oq_avail), .q_data(oq_data), .q_pop(ts_pop),
    .tx_valid(ts_valid), .tx_data(ts_data), .tx_last(ts_last),
    .tx_ready(tx_ready && inst_mode), .tx_busy,
    .busy(tlm_busy), .done(tlm_done)
  );

  assign oq_pop   = idpu_mode ? cs_pop   : ts_pop;
  assign tx_valid = idpu_mode ? cs_valid : ts_valid;
  assign tx_byte  = idpu_mode ? cs_data  : ts_data;
  assign tx_last  = idpu_mode ? cs_last  : ts_last;

  ser_tx #(.BIT_DIV(BIT_DIV)) u_tx (
    .clk, .rst_n,
    .in_valid(tx_valid), .in_data(tx_byte), .in_last(tx_last), .in_ready(tx_ready),
    .busy(tx_busy), .ser_clk(tx_clk), .ser_data(tx_data)
  );

  // connector outputs: only the active mode's connector drives, and only
  // while the PC has the outputs enabled; otherwise the lines are held at 0
  assign j3_cmd_clk  = idpu_mode && out_en && tx_clk;
  assign j3_cmd_data = idpu_mode && out_en && tx_data;
  assign p3_tlm_clk  = inst_mode && out_en && tx_clk;
  assign p3_tlm_data = inst_mode && out_en && tx_data;

  assign rx_clk  = idpu_mode ? j3_tlm_clk  : p3_cmd_clk;
  assign rx_data = idpu_mode ? j3_tlm_data : p3_cmd_data;

  ser_rx #(.FIXED_LEN(CMD_BYTES)) u_rx (
    .clk, .rst_n, .hdr_len_mode(idpu_mode),
    .ser_clk(rx_clk), .ser_data(rx_data), .fifo_full(iq_full),
    .byte_valid(rx_bv), .byte_data(rx_byte),
    .pkt_commit(rx_commit), .pkt_abort(rx_abort),
    .frame_err(rx_ferr), .size_err(rx_serr), .ovf_err(rx_ovf),
    .pkt_len(rx_len), .pkt_first(rx_first), .in_sync(rx_sync)
  );

  pkt_fifo #(.DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .wr_en(rx_bv), .wr_data(rx_byte), .commit(rx_commit), .abort(rx_abort),
    .rd_en(in_pop), .rd_data(iq_data),
    .avail(iq_avail), .used(iq_used), .empty(iq_empty), .full(iq_full), .ovf(iq_ovf)
  );

  // instrument simulation: a received timing command flashes the time LED
  assign time_rx = inst_mode && rx_commit && (rx_first == TIME_CMD_ID);

  led_ctrl #(.NSIG(4), .NPULSE(2), .HOLD(LED_HOLD)) u_led (
    .clk, .rst_n,
    .sig({rx_data, rx_clk, tx_data, tx_clk}),
    .pulse({epp_act, time_sent || time_rx}),
    .led_sig(led_link), .led_pulse({led_pc, led_time})
  );

  assign led_mode      = inst_mode;
  assign led_err       = |errs;
  assign led_out_empty = oq_empty;
  assign led_out_full  = oq_full;
  assign led_in_empty  = iq_empty;
  assign led_in_full   = iq_full;

endmodule
