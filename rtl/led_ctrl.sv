// led_ctrl: makes short events visible on front-panel LEDs.
//
// A link bit or an EPP strobe lasts microseconds, far too short to see, so
// each LED here is lit for HOLD cycles (50 ms at 20 MHz) after its last
// event, and retriggers while events keep coming. Two kinds of input:
//   sig   - raw signals; any change of level counts as activity
//           (the activity LEDs of the link lines);
//   pulse - one-cycle event pulses (timing command sent or received,
//           EPP cycle).
// Indicators that are plain levels (mode, error, FIFO empty and full) need
// no stretching and are wired straight to their LEDs by the top level.
// Which LEDs exist follows the specification; the hold time is this design's
// choice. Outputs are registered and active high.
module led_ctrl #(
  parameter int unsigned NSIG   = 4,
  parameter int unsigned NPULSE = 2,
  parameter int unsigned HOLD   = 1_000_000,
  localparam int unsigned HW    = $clog2(HOLD + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NSIG-1:0]   sig,
  input  logic [NPULSE-1:0] pulse,
  output logic [NSIG-1:0]   led_sig,
  output logic [NPULSE-1:0] led_pulse
);

  localparam int unsigned N = NSIG + NPULSE;

  logic [NSIG-1:0] sig_q;
  logic [N-1:0]    ev;
  logic [HW-1:0]   cnt [N];

  assign ev = {pulse, sig ^ sig_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sig_q <= '0;
      for (int i = 0; i < N; i++) cnt[i] <= '0;
    end else begin
      sig_q <= sig;
      for (int i = 0; i < N; i++) begin
        if (ev[i])             cnt[i] <= HW'(HOLD);
        else if (cnt[i] != '0) cnt[i] <= cnt[i] - 1'b1;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NSIG; i++)   led_sig[i]   = (cnt[i] != '0);
    for (int i = 0; i < NPULSE; i++) led_pulse[i] = (cnt[NSIG + i] != '0);
  end

endmodule
