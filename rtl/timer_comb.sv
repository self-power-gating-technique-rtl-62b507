// timer_comb: the power-gated combinational logic of one modulo-MOD timer.
//
// While its domain is powered (powered_i high) it computes the timer's next
// count, d_o = q_i + 1 wrapping from MOD-1 to 0, and the terminal-count flag
// en_o = (q_i == MOD-1), which becomes the enable for the next timer. While the
// domain is switched off its outputs float; a two-state model cannot show an
// undefined level, so they are driven to FLOAT_D / FLOAT_EN instead. The default
// is all ones: with a footer switch the virtual ground drifts up towards V_DD,
// so the outputs of a sleeping domain drift high, and high is the value that an
// unisolated enable would turn into a false clock edge.
//
// Interface: powered_i from the domain's footer switch, q_i the timer's stored
// count, d_o the next count for the always-on flip-flops, en_o the terminal
// count. Purely combinational.
//
// The counting rule (modulo 60 or 24, EN high on the last count) follows the
// watch description; the binary next-state logic and the floating values are
// this design's choices.
module timer_comb #(
  parameter int unsigned   MOD      = 60,
  parameter int unsigned   W        = 6,
  parameter logic [W-1:0]  FLOAT_D  = '1,
  parameter logic          FLOAT_EN = 1'b1
) (
  input  logic         powered_i,
  input  logic [W-1:0] q_i,
  output logic [W-1:0] d_o,
  output logic         en_o
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam logic [W-1:0] LAST = W'(MOD - 1);

  logic         at_last;
  logic [W-1:0] next;

  assign at_last = (q_i == LAST);
  assign next    = at_last ? '0 : q_i + W'(1);

  always_comb begin
    if (powered_i) begin
      d_o  = next;
      en_o = at_last;
    end else begin
      d_o  = FLOAT_D;
      en_o = FLOAT_EN;
    end
  end
endmodule
