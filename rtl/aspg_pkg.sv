// aspg_pkg: constants shared by the self-power-gated asynchronous watch.
//
// The watch counts seconds and minutes modulo 60 and hours modulo 24, so the
// time runs from 00:00:00 to 23:59:59 and then wraps to 00:00:00. Counts are
// plain binary, least significant bit at index 0; the bus widths are 6 bits for
// seconds and minutes and 5 bits for hours. The moduli and widths follow the
// watch description; the binary encoding and the bit order are this design's
// choice.
package aspg_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned SEC_MOD  = 60;
  localparam int unsigned MIN_MOD  = 60;
  localparam int unsigned HOUR_MOD = 24;

  localparam int unsigned SEC_W  = 6;
  localparam int unsigned MIN_W  = 6;
  localparam int unsigned HOUR_W = 5;

  // Seconds in one full day of the watch: one complete cycle of the design.
  localparam int unsigned DAY_TICKS = SEC_MOD * MIN_MOD * HOUR_MOD;
endpackage
