// isol_cell: clamp-to-0 isolation cell placed between a power-gated domain and
// an always-on domain.
//
// When EN is high the cell is a buffer and OUT follows IN; when EN is low OUT is
// held at 0 whatever IN does, so a floating output of a switched-off domain can
// not reach the always-on side. This is the AND function of the transistor-level
// cell (a NAND stage followed by an inverter). The cell itself sits on the
// always-on supply.
//
// Interface: in_i from the gated domain, en_i isolation enable (high = pass),
// out_o to the always-on side. Purely combinational, no timing of its own.
//
// In the watch, EN is the clock that powers the gated domain, so the clamp is
// released exactly while that domain is awake; IN is the terminal-count output
// of a timer and OUT becomes the next timer's clock (CLK_M_PG, CLK_H_PG).
module isol_cell (
  input  logic in_i,
  input  logic en_i,
  output logic out_o
);
  timeunit 1ps;
  timeprecision 1ps;

  assign out_o = in_i & en_i;
endmodule
