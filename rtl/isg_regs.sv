// isg_regs: the PC-visible register file of the ISG.
//
// Decodes EPP register accesses (see isg_pkg for the map) into control
// settings and one-cycle strobes, and gathers status for reading back:
//   - mode (IDPU or instrument simulation), output enable (0 drives every
//     link output to zero) and timing-command enable;
//   - the outbound data port (command or telemetry bytes) with resync and
//     "block complete" strobes;
//   - the inbound data port, whose read pops the inbound FIFO, and the count
//     of bytes of complete blocks waiting, which the PC reads first to know
//     how many bytes to fetch;
//   - the number of commands waiting in the queue;
//   - sticky error flags (framing, packet size, overflow in each direction),
//     cleared by writing 1, and saturating framing/size error counters that
//     are cleared with their flag;
//   - the 32-bit seconds counter: writes to bytes 3..1 are staged, the write
//     to byte 0 loads all four.
// Multi-byte counts are read low byte first: that read latches the high byte
// so the pair is consistent. What is readable and settable follows the
// specification; the addresses, bit positions and reset values (IDPU mode,
// outputs disabled, timing commands enabled) are this design's choices.
//
// reg_rdata is combinational from reg_addr. Strobes out of this block are
// combinational from reg_wr/reg_rd of the same cycle.
module isg_regs (
  input  logic        clk,
  input  logic        rst_n,
  // from epp_if
  input  logic [7:0]  reg_addr,
  input  logic        reg_wr,
  input  logic [7:0]  reg_wdata,
  input  logic        reg_rd,
  output logic [7:0]  reg_rdata,
  // control
  output isg_pkg::isg_mode_e mode,
  output logic        out_en,
  output logic        time_en,
  output logic        out_wr,
  output logic [7:0]  out_data,
  output logic        out_resync,
  output logic        out_go,
  output logic        in_pop,
  output logic        time_load,
  output logic [31:0] time_val,
  // status
  input  logic        out_empty,
  input  logic        out_full,
  input  logic        in_empty,
  input  logic        in_full,
  input  logic        tlm_busy,
  input  logic [1:0]  cmd_partial,
  input  logic [15:0] in_avail,
  input  logic [15:0] cmd_count,
  input  logic [7:0]  in_data,
  input  logic [31:0] seconds,
  // error events (one-cycle pulses)
  input  logic        ev_frame_err,
  input  logic        ev_size_err,
  input  logic        ev_in_ovf,
  input  logic        ev_out_ovf,
  output isg_pkg::err_t errs
);
  import isg_pkg::*;

  logic [7:0]  cnt_hi;
  logic [7:0]  ferr_cnt, serr_cnt;
  logic [23:0] time_stage;
  status_t     status;
  err_t        clr;
  logic        wr_err;

  assign out_wr     = reg_wr && (reg_addr == REG_OUT_DATA);
  assign out_data   = reg_wdata;
  assign out_resync = reg_wr && (reg_addr == REG_OUT_CTRL) && reg_wdata[0];
  assign out_go     = reg_wr && (reg_addr == REG_OUT_CTRL) && reg_wdata[1];
  assign in_pop     = reg_rd && (reg_addr == REG_IN_DATA);
  assign time_load  = reg_wr && (reg_addr == REG_TIME_0);
  assign time_val   = {time_stage, reg_wdata};
  assign wr_err     = reg_wr && (reg_addr == REG_ERR);
  assign clr        = wr_err ? err_t'(reg_wdata) : err_t'(8'h00);

  always_comb begin
    status = '{mode: mode, err_any: |errs, cmd_partial: (cmd_partial != 2'd0),
               tlm_busy: tlm_busy, in_full: in_full, in_empty: in_empty,
               out_full: out_full, out_empty: out_empty};
    unique case (reg_addr)
      REG_CTRL:     reg_rdata = {5'd0, time_en, out_en, mode};
      REG_STATUS:   reg_rdata = status;
      REG_IN_DATA:  reg_rdata = in_empty ? 8'h00 : in_data;
      REG_IN_CNT_L: reg_rdata = in_avail[7:0];
      REG_IN_CNT_H: reg_rdata = cnt_hi;
      REG_CMDQ_L:   reg_rdata = cmd_count[7:0];
      REG_CMDQ_H:   reg_rdata = cnt_hi;
      REG_ERR:      reg_rdata = errs;
      REG_FERR_CNT: reg_rdata = ferr_cnt;
      REG_SERR_CNT: reg_rdata = serr_cnt;
      REG_TIME_3:   reg_rdata = seconds[31:24];
      REG_TIME_2:   reg_rdata = seconds[23:16];
      REG_TIME_1:   reg_rdata = seconds[15:8];
      REG_TIME_0:   reg_rdata = seconds[7:0];
      default:      reg_rdata = 8'h00;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode       <= MODE_IDPU_SIM;
      out_en     <= 1'b0;
      time_en    <= 1'b1;
      cnt_hi     <= '0;
      ferr_cnt   <= '0;
      serr_cnt   <= '0;
      time_stage <= '0;
      errs       <= '0;
    end else begin
      if (reg_wr) begin
        unique case (reg_addr)
          REG_CTRL: begin
            mode    <= isg_mode_e'(reg_wdata[0]);
            out_en  <= reg_wdata[1];
            time_en <= reg_wdata[2];
          end
          REG_TIME_3: time_stage[23:16] <= reg_wdata;
          REG_TIME_2: time_stage[15:8]  <= reg_wdata;
          REG_TIME_1: time_stage[7:0]   <= reg_wdata;
          default: ;
        endcase
      end
      if (reg_rd && reg_addr == REG_IN_CNT_L) cnt_hi <= in_avail[15:8];
      if (reg_rd && reg_addr == REG_CMDQ_L)   cnt_hi <= cmd_count[15:8];

      errs.frame_err <= ev_frame_err || (errs.frame_err && !clr.frame_err);
      errs.size_err  <= ev_size_err  || (errs.size_err  && !clr.size_err);
      errs.in_ovf    <= ev_in_ovf    || (errs.in_ovf    && !clr.in_ovf);
      errs.out_ovf   <= ev_out_ovf   || (errs.out_ovf   && !clr.out_ovf);
      errs.rsvd      <= '0;

      if (ev_frame_err)        ferr_cnt <= (ferr_cnt == 8'hFF) ? ferr_cnt : ferr_cnt + 8'd1;
      else if (clr.frame_err)  ferr_cnt <= '0;
      if (ev_size_err)         serr_cnt <= (serr_cnt == 8'hFF) ? serr_cnt : serr_cnt + 8'd1;
      else if (clr.size_err)   serr_cnt <= '0;
    end
  end

endmodule
