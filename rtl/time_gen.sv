// time_gen: local seconds counter behind the timing commands.
//
// A prescaler divides clk down to one tick per second (TICKS_PER_SEC cycles).
// On each tick the 32-bit seconds counter advances and tick pulses for one
// cycle; the command scheduler then sends a timing command carrying the new
// value. The PC can set the counter (load/load_val); a load replaces the
// count without disturbing the prescaler phase, so the once-a-second cadence
// of timing commands is kept. to_tick gives the cycles left before the next
// tick, which lets the scheduler hold back a command that would still be on
// the link when the timing command is due.
//
// The settable counter and the once-a-second tick follow the specification;
// the 32-bit width, the 20 MHz clock and keeping the phase on a load are
// this design's choices.
module time_gen #(
  parameter int unsigned TICKS_PER_SEC = 20_000_000,
  localparam int unsigned PW = $clog2(TICKS_PER_SEC)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [31:0]   load_val,
  output logic [31:0]   seconds,
  output logic          tick,
  output logic [PW-1:0] to_tick    // cycles until tick is next high, minus one
);

  logic [PW-1:0] pre;

  assign to_tick = PW'(TICKS_PER_SEC - 1) - pre;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre     <= '0;
      seconds <= '0;
      tick    <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (pre == PW'(TICKS_PER_SEC - 1)) begin
        pre  <= '0;
        tick <= 1'b1;
      end else begin
        pre <= pre + 1'b1;
      end
      if (load)
        seconds <= load_val;
      else if (pre == PW'(TICKS_PER_SEC - 1))
        seconds <= seconds + 32'd1;
    end
  end

endmodule
