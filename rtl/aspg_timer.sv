// aspg_timer: one self-power-gated timer block of the asynchronous watch
// (second, minute or hour timer).
//
// The block holds its count in always-on D flip-flops that load on the falling
// edge of clk_i. The combinational logic that computes the next count and the
// terminal-count flag sits in a switched domain whose NMOS footer switch is
// driven by the same clk_i: the logic is powered only while clk_i is high, works
// out the next count during that high phase, and is switched off again after
// the falling edge that loads the flip-flops. Between clock pulses the logic is
// asleep and its outputs float, while the flip-flops keep the time. No separate
// power controller or handshake is involved: the timer's own clock is its
// power-gating control, which is the self-power-gating idea.
//
// Interface:
//   clk_i      clock and power enable (CLK, CLK_M_PG or CLK_H_PG)
//   rst_ni     asynchronous active-low reset of the count to 0
//   q_o        the count, binary, always valid
//   en_o       terminal-count flag from the gated logic: (q_o == MOD-1) while
//              powered, floating (FLOAT_EN) while asleep; it must go through an
//              isolation cell before it drives anything always-on
//   powered_o  1 while the combinational domain has a valid supply
//
// Timing: q_o changes on the falling edge of clk_i. en_o is valid from the
// rising edge of clk_i (plus T_WAKE_PS) until T_SLEEP_PS after the falling edge.
// Lint reports rst_ni as used both asynchronously and synchronously: the second
// use is only the disable condition of the capture assertion below.
// The reset is this design's addition; the block structure (always-on
// flip-flops, gated combinational logic, footer switch driven by the block's
// clock) follows the watch design.
module aspg_timer #(
  parameter int unsigned  MOD        = 60,
  parameter int unsigned  W          = 6,
  parameter int unsigned  T_WAKE_PS  = 0,
  parameter int unsigned  T_SLEEP_PS = 20,
  parameter logic [W-1:0] FLOAT_D    = '1,
  parameter logic         FLOAT_EN   = 1'b1
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  output logic [W-1:0] q_o,
  output logic         en_o,
  output logic         powered_o
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [W-1:0] d;

  nmos_footer_switch #(
    .T_WAKE_PS (T_WAKE_PS),
    .T_SLEEP_PS(T_SLEEP_PS)
  ) u_switch (
    .enable_i  (clk_i),
    .vvss_low_o(powered_o)
  );

  timer_comb #(
    .MOD     (MOD),
    .W       (W),
    .FLOAT_D (FLOAT_D),
    .FLOAT_EN(FLOAT_EN)
  ) u_comb (
    .powered_i(powered_o),
    .q_i      (q_o),
    .d_o      (d),
    .en_o     (en_o)
  );

  // Always-on storage: loads on the falling clock edge only.
  always_ff @(negedge clk_i or negedge rst_ni) begin
    if (!rst_ni) q_o <= '0;
    else         q_o <= d;
  end

  // The flip-flops must never load while the gated logic is asleep.
  a_capture_powered: assert property (@(negedge clk_i) disable iff (!rst_ni) powered_o)
    else $error("aspg_timer: count loaded from an unpowered domain");
endmodule
