// tb_aspg_workloads: runs the self-power-gated watch under the clock shapes of
// the power evaluation and measures how long each combinational domain is
// powered.
//
// Two sweeps, each segment 3700 CLK pulses long so that every segment contains
// minute carries and at least one hour carry:
//   - duty cycle D = T_on / T of 0.01 %, 0.1 %, 1 %, 10 % and 50 % with a CLK
//     period of 100 us;
//   - low ("sleep") time of 0.1, 1, 5, 10, 50 and 90 us with a 100 ns high time.
// The time is checked against a reference after every pulse. The powered time
// of each domain is integrated from its power-good signal and compared with
// the exact expectation: the second logic is powered for T_on + tail on every
// pulse, the minute logic only on the pulses after second 59 and the hour logic
// only on the pulses after 59:59. The powered fraction of each domain is
// printed; it is the quantity that sets the leakage saving.
module tb_aspg_workloads;
  timeunit 1ps;
  timeprecision 1ps;
  import aspg_pkg::*;

  localparam longint SLEEP = 20;        // default switch tail, ps
  localparam int     SEG_TICKS = 3700;

  logic              clk_s = 1'b0, rst_ns = 1'b0;
  logic [SEC_W-1:0]  sec;
  logic [MIN_W-1:0]  min;
  logic [HOUR_W-1:0] hour;
  logic              clk_m_pg, clk_h_pg;
  logic [2:0]        pwr;

  int     checks = 0, failures = 0;
  int     ref_s = 0, ref_m = 0, ref_h = 0;
  longint on_time[3];
  longint on_since[3];

  aspg_watch dut (
    .clk_i(clk_s), .rst_ni(rst_ns), .second_o(sec), .minute_o(min), .hour_o(hour),
    .clk_m_pg_o(clk_m_pg), .clk_h_pg_o(clk_h_pg), .pwr_o(pwr));

  // Integrate the powered time of each domain.
  for (genvar i = 0; i < 3; i++) begin : g_meter
    always @(posedge pwr[i]) on_since[i] = longint'($time);
    always @(negedge pwr[i]) on_time[i] += longint'($time) - on_since[i];
  end

  task automatic cmp(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL t=%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  // One segment of SEG_TICKS pulses with high time t_on and low time t_off (ps).
  task automatic segment(input string name, input longint t_on, input longint t_off);
    longint exp_on[3];
    longint total;
    int     n_m = 0, n_h = 0;
    for (int i = 0; i < 3; i++) on_time[i] = 0;
    for (int t = 0; t < SEG_TICKS; t++) begin
      if (ref_s == SEC_MOD - 1) n_m++;
      if (ref_s == SEC_MOD - 1 && ref_m == MIN_MOD - 1) n_h++;
      clk_s = 1'b1;
      #(t_on);
      clk_s = 1'b0;
      ref_s++;
      if (ref_s == SEC_MOD) begin
        ref_s = 0;
        ref_m++;
        if (ref_m == MIN_MOD) begin
          ref_m = 0;
          ref_h = (ref_h + 1) % HOUR_MOD;
        end
      end
      #(t_off);
      cmp(sec, ref_s, "seconds");
      cmp(min, ref_m, "minutes");
      cmp(hour, ref_h, "hours");
    end
    exp_on[0] = SEG_TICKS * (t_on + SLEEP);
    exp_on[1] = n_m * (t_on + SLEEP);
    exp_on[2] = n_h * (t_on + SLEEP);
    total     = SEG_TICKS * (t_on + t_off);
    for (int i = 0; i < 3; i++) cmp(on_time[i], exp_on[i], "powered time");
    checks++;
    if (n_m == 0 || n_h == 0) begin
      failures++;
      $display("FAIL %s: segment had no minute or no hour carry", name);
    end
    $display("%-16s T_on=%0d ps T_off=%0d ps  powered: second %0.5f %%, minute %0.6f %%, hour %0.7f %%",
             name, t_on, t_off,
             100.0 * real'(on_time[0]) / real'(total),
             100.0 * real'(on_time[1]) / real'(total),
             100.0 * real'(on_time[2]) / real'(total));
  endtask

  initial begin
    #(64'd20_000_000_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint period, ton;
    // reset held from time 0, released, then pulsed so the asynchronous
    // reset sees a falling edge
    #50  rst_ns = 1'b1;
    #50  rst_ns = 1'b0;
    #50  rst_ns = 1'b1;
    #100;
    // duty-cycle sweep, D in units of 0.01 %
    period = 100_000_000;                  // 100 us
    for (int k = 0; k < 5; k++) begin
      int d;
      d = (k == 0) ? 1 : (k == 1) ? 10 : (k == 2) ? 100 : (k == 3) ? 1000 : 5000;
      ton = period * d / 10000;
      segment($sformatf("D=%0d.%02d%%", d / 100, d % 100), ton, period - ton);
    end
    // sleep-time sweep, low time in ns
    for (int k = 0; k < 6; k++) begin
      longint s;
      s = (k == 0) ? 100 : (k == 1) ? 1000 : (k == 2) ? 5000 :
          (k == 3) ? 10000 : (k == 4) ? 50000 : 90000;
      segment($sformatf("sleep=%0d ns", s), 100_000, s * 1000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
