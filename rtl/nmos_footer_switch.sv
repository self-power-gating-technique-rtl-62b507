// nmos_footer_switch: behavioural model of the high-threshold NMOS footer switch
// that connects a power-gated domain's virtual ground (V_VSS) to V_SS.
// This is a behavioural model, not synthesizable logic: the real part is a
// single transistor, sized in layout.
//
// When enable_i is high the switch conducts, V_VSS is pulled to ground and the
// domain is powered; when enable_i is low the switch is off, V_VSS charges up
// towards V_DD and the domain's outputs float. The output vvss_low_o is the
// digital view of that node: 1 while the domain has a valid supply.
//
// Timing. The node does not move instantly. T_WAKE_PS is the wake-up latency
// from enable_i rising to the domain being usable; T_SLEEP_PS is how long the
// domain's outputs stay valid after enable_i falls, while V_VSS is still
// charging. The sleep tail is what lets a flip-flop clocked on the same falling
// edge that switches the domain off capture the domain's last valid output.
// Both are this design's choices: the wake-up latency of the real switch depends
// on its width and temperature (from about a hundred to several hundred
// picoseconds for switch widths of 1.5 % to 15 % of the logic width), and the default T_WAKE_PS of 0 keeps the
// floating outputs from reaching an isolation cell whose enable has already
// risen. Both delays are transport delays and assume pulses on enable_i longer
// than T_SLEEP_PS and T_WAKE_PS, which holds for any clock in the watch.
module nmos_footer_switch #(
  parameter int unsigned T_WAKE_PS  = 0,
  parameter int unsigned T_SLEEP_PS = 20
) (
  input  logic enable_i,
  output logic vvss_low_o
);
  timeunit 1ps;
  timeprecision 1ps;

  logic en_sleep_dly;          // enable_i delayed by T_SLEEP_PS
  logic en_wake_dly;           // enable_i delayed by T_WAKE_PS

  initial en_sleep_dly = 1'b0;
  always @(enable_i) en_sleep_dly <= #(T_SLEEP_PS) enable_i;

  if (T_WAKE_PS == 0) begin : g_instant_wake
    assign en_wake_dly = enable_i;
  end else begin : g_slow_wake
    initial en_wake_dly = 1'b0;
    always @(enable_i) en_wake_dly <= #(T_WAKE_PS) enable_i;
  end

  // Powered from T_WAKE_PS after the rising edge until T_SLEEP_PS after the
  // falling edge.
  assign vvss_low_o = en_wake_dly | (en_sleep_dly & ~enable_i);
endmodule
