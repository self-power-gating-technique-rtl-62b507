// tb_aspg_watch: end-to-end, self-checking test of the self-power-gated watch
// at its default parameters. It runs one complete day of CLK pulses plus two
// more minutes, so the time passes 23:59:59 -> 00:00:00 once, and compares the
// watch with an independent hh:mm:ss reference after every pulse.
//
// Besides the time, it checks the gating mechanisms and counts how often each
// one happened (every count must be non-zero):
//   - minute and hour carries, and the day wrap;
//   - CLK_M_PG / CLK_H_PG: each pulse lies inside a CLK high phase, there is
//     exactly one per minute / per hour, and its falling edge is the CLK falling
//     edge that ends the second (no added delay);
//   - isolation: while a timer's logic sleeps its floating terminal flag is high,
//     and the derived clock must still be held at 0;
//   - sleep and wake of each of the three combinational domains, with the
//     minute and hour logic powered only for the pulses that concern them;
//   - retention: the counts do not move while their logic is asleep.
// The clock runs at 1 ns per "second" with a 20 % duty cycle to keep the run
// short; the design itself has no notion of absolute time.
module tb_aspg_watch;
  timeunit 1ps;
  timeprecision 1ps;
  import aspg_pkg::*;

  localparam int unsigned T_HI  = 200;
  localparam int unsigned T_LO  = 800;
  localparam int unsigned SLEEP = 20;
  localparam int unsigned TICKS = DAY_TICKS + 120;

  logic              clk_s = 1'b0, rst_ns = 1'b0;
  logic [SEC_W-1:0]  sec;
  logic [MIN_W-1:0]  min;
  logic [HOUR_W-1:0] hour;
  logic              clk_m_pg, clk_h_pg;
  logic [2:0]        pwr;

  int checks = 0, failures = 0;
  int ref_s = 0, ref_m = 0, ref_h = 0;
  int n_min_carry = 0, n_hour_carry = 0, n_day_wrap = 0;
  int n_clk_m_pulse = 0, n_clk_h_pulse = 0;
  int n_isol_m = 0, n_isol_h = 0;
  int n_sleep[3] = '{0, 0, 0};
  int n_wake[3]  = '{0, 0, 0};
  int n_retain = 0;

  aspg_watch dut (
    .clk_i(clk_s), .rst_ni(rst_ns), .second_o(sec), .minute_o(min), .hour_o(hour),
    .clk_m_pg_o(clk_m_pg), .clk_h_pg_o(clk_h_pg), .pwr_o(pwr));

  task automatic cmp(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL t=%0t %s: got %0d expected %0d (ref %0d:%0d:%0d)",
                 $time, what, got, exp, ref_h, ref_m, ref_s);
    end
  endtask

  task automatic need(input int count, input string what);
    checks++;
    $display("  %-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  // Derived clocks may only rise and fall while CLK is high or on its falling
  // edge; a derived-clock edge at any other time is a false clock.
  always @(posedge clk_m_pg) begin
    n_clk_m_pulse++;
    cmp(int'(clk_s), 1, "CLK_M_PG rises only while CLK is high");
    cmp(ref_s, SEC_MOD - 1, "CLK_M_PG only in the pulse after second 59");
  end
  always @(posedge clk_h_pg) begin
    n_clk_h_pulse++;
    cmp(int'(clk_m_pg), 1, "CLK_H_PG rises only while CLK_M_PG is high");
    cmp(ref_m, MIN_MOD - 1, "CLK_H_PG only in the pulse after minute 59");
  end
  for (genvar i = 0; i < 3; i++) begin : g_pwr
    always @(negedge pwr[i]) if (rst_ns) n_sleep[i]++;
    always @(posedge pwr[i]) if (rst_ns) n_wake[i]++;
  end

  initial begin
    #(64'd200_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m_pulses_before, h_pulses_before;
    // reset held from time 0, released, then pulsed so the asynchronous
    // reset sees a falling edge
    #50  rst_ns = 1'b1;
    #50  rst_ns = 1'b0;
    #50  rst_ns = 1'b1;
    #100;
    cmp(int'(sec), 0, "seconds after reset");
    cmp(int'(min), 0, "minutes after reset");
    cmp(int'(hour), 0, "hours after reset");
    for (int t = 0; t < TICKS; t++) begin
      m_pulses_before = n_clk_m_pulse;
      h_pulses_before = n_clk_h_pulse;
      clk_s = 1'b1;
      #1;
      cmp(int'(pwr[0]), 1, "second logic awake in CLK high");
      cmp(int'(clk_m_pg), int'(ref_s == SEC_MOD - 1), "CLK_M_PG level in CLK high");
      cmp(int'(pwr[1]), int'(ref_s == SEC_MOD - 1), "minute logic awake only with CLK_M_PG");
      cmp(int'(clk_h_pg), int'(ref_s == SEC_MOD - 1 && ref_m == MIN_MOD - 1),
          "CLK_H_PG level in CLK high");
      cmp(int'(pwr[2]), int'(ref_s == SEC_MOD - 1 && ref_m == MIN_MOD - 1),
          "hour logic awake only with CLK_H_PG");
      #(T_HI - 1);
      clk_s = 1'b0;
      // reference time after this second
      ref_s = ref_s + 1;
      if (ref_s == SEC_MOD) begin
        ref_s = 0;
        ref_m++;
        n_min_carry++;
        if (ref_m == MIN_MOD) begin
          ref_m = 0;
          ref_h++;
          n_hour_carry++;
          if (ref_h == HOUR_MOD) begin
            ref_h = 0;
            n_day_wrap++;
          end
        end
      end
      #1;
      // every count is already updated 1 ps after the CLK falling edge
      cmp(int'(sec), ref_s, "seconds");
      cmp(int'(min), ref_m, "minutes");
      cmp(int'(hour), ref_h, "hours");
      cmp(int'(clk_m_pg), 0, "CLK_M_PG low after the CLK falling edge");
      cmp(int'(clk_h_pg), 0, "CLK_H_PG low after the CLK falling edge");
      cmp(n_clk_m_pulse - m_pulses_before, int'(ref_s == 0), "one CLK_M_PG pulse per minute");
      cmp(n_clk_h_pulse - h_pulses_before, int'(ref_s == 0 && ref_m == 0),
          "one CLK_H_PG pulse per hour");
      #(SLEEP);
      // CLK low, past the switch tail: all three domains asleep
      cmp(int'(pwr), 0, "all combinational logic asleep in CLK low");
      // floating terminal flags are high; the isolation cells must hold 0
      if (dut.ena_m === 1'b1) n_isol_m++;
      if (dut.ena_h === 1'b1) n_isol_h++;
      cmp(int'(clk_m_pg), 0, "CLK_M_PG clamped while second logic sleeps");
      cmp(int'(clk_h_pg), 0, "CLK_H_PG clamped while minute logic sleeps");
      #(T_LO - SLEEP - 1);
      // the flip-flops kept the time through the sleep
      cmp(int'(sec), ref_s, "seconds retained");
      cmp(int'(min), ref_m, "minutes retained");
      cmp(int'(hour), ref_h, "hours retained");
      n_retain++;
    end
    $display("mechanisms:");
    need(n_min_carry,   "minute carries");
    need(n_hour_carry,  "hour carries");
    need(n_day_wrap,    "day wraps 23:59:59 -> 00:00:00");
    need(n_clk_m_pulse, "CLK_M_PG pulses");
    need(n_clk_h_pulse, "CLK_H_PG pulses");
    need(n_isol_m,      "ENA_M floating, clamped by ISOL");
    need(n_isol_h,      "ENA_H floating, clamped by ISOL");
    need(n_sleep[0],    "second logic sleeps");
    need(n_sleep[1],    "minute logic sleeps");
    need(n_sleep[2],    "hour logic sleeps");
    need(n_wake[0],     "second logic wakes");
    need(n_wake[1],     "minute logic wakes");
    need(n_wake[2],     "hour logic wakes");
    need(n_retain,      "sleep periods with retention");
    cmp(n_clk_m_pulse, n_min_carry, "CLK_M_PG pulses = minute carries");
    cmp(n_clk_h_pulse, n_hour_carry, "CLK_H_PG pulses = hour carries");
    cmp(n_wake[1], n_min_carry, "minute logic wakes once per minute");
    cmp(n_wake[2], n_hour_carry, "hour logic wakes once per hour");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
