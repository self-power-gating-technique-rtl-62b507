// aspg_watch: asynchronous 24-hour digital watch with self-power gating.
//
// Three timer blocks count seconds (modulo 60), minutes (modulo 60) and hours
// (modulo 24). Nothing in the watch is clocked globally: the second timer runs
// on the external pulse CLK, the minute timer on CLK_M_PG and the hour timer on
// CLK_H_PG, each derived from the timer before it. Every timer keeps its count
// in always-on flip-flops and powers its combinational logic only while its own
// clock is high (see aspg_timer), so the minute logic is awake for one CLK pulse
// per minute and the hour logic for one pulse per hour.
//
// The derived clocks come from clamp-to-0 isolation cells:
//   CLK_M_PG = ENA_M & CLK       ENA_M = (second == 59), from the gated logic
//   CLK_H_PG = ENA_H & CLK_M_PG  ENA_H = (minute == 59), from the gated logic
// The isolation cell's enable is the clock that powers the source domain, so
// the floating outputs of a sleeping timer never reach the next one. As a
// result CLK_M_PG is one pulse that coincides with the high phase of the CLK
// pulse that follows second 59, and its falling edge, which advances the
// minutes, is the same CLK falling edge that wraps the seconds from 59 to 0.
// The same holds one level up for CLK_H_PG.
//
// Interface:
//   clk_i       CLK, one pulse per second; any duty cycle whose high and low
//               phases are longer than the switch delays
//   rst_ni      asynchronous active-low reset to 00:00:00 (this design's addition)
//   second_o, minute_o, hour_o   binary time, valid at all times
//   clk_m_pg_o, clk_h_pg_o       the derived minute and hour clocks
//   pwr_o       powered state of the second [0], minute [1] and hour [2] logic
//
// Timing: all three counts change on the falling edge of clk_i that ends the
// second; there is no extra delay per level beyond the isolation gates.
// The hour timer's terminal-count output is not used, as in the watch design;
// its pin is left open on purpose.
module aspg_watch
  import aspg_pkg::*;
#(
  parameter int unsigned T_WAKE_PS  = 0,
  parameter int unsigned T_SLEEP_PS = 20
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  output logic [SEC_W-1:0]  second_o,
  output logic [MIN_W-1:0]  minute_o,
  output logic [HOUR_W-1:0] hour_o,
  output logic              clk_m_pg_o,
  output logic              clk_h_pg_o,
  output logic [2:0]        pwr_o
);
  timeunit 1ps;
  timeprecision 1ps;

  logic ena_m;   // terminal count of the second timer, floats while asleep
  logic ena_h;   // terminal count of the minute timer, floats while asleep

  aspg_timer #(
    .MOD(SEC_MOD), .W(SEC_W), .T_WAKE_PS(T_WAKE_PS), .T_SLEEP_PS(T_SLEEP_PS)
  ) u_second (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .q_o      (second_o),
    .en_o     (ena_m),
    .powered_o(pwr_o[0])
  );

  isol_cell u_isol_m (
    .in_i (ena_m),
    .en_i (clk_i),
    .out_o(clk_m_pg_o)
  );

  aspg_timer #(
    .MOD(MIN_MOD), .W(MIN_W), .T_WAKE_PS(T_WAKE_PS), .T_SLEEP_PS(T_SLEEP_PS)
  ) u_minute (
    .clk_i    (clk_m_pg_o),
    .rst_ni   (rst_ni),
    .q_o      (minute_o),
    .en_o     (ena_h),
    .powered_o(pwr_o[1])
  );

  isol_cell u_isol_h (
    .in_i (ena_h),
    .en_i (clk_m_pg_o),
    .out_o(clk_h_pg_o)
  );

  aspg_timer #(
    .MOD(HOUR_MOD), .W(HOUR_W), .T_WAKE_PS(T_WAKE_PS), .T_SLEEP_PS(T_SLEEP_PS)
  ) u_hour (
    .clk_i    (clk_h_pg_o),
    .rst_ni   (rst_ni),
    .q_o      (hour_o),
    .en_o     (),
    .powered_o(pwr_o[2])
  );
endmodule
