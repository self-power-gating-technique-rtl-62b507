// tb_hour_timer: self-checking test of the modulo-24 (5-bit) self-power-gated timer
// used as the hour timer, clocked by short pulses (like CLK_H_PG) with long sleeps.
// Each clock pulse is checked in three places: just after the rising edge
// (logic powered, count unchanged, terminal flag = count is 23), just after the
// falling edge (count advanced by one modulo 24 within 1 ps, logic still
// powered by the switch tail) and in the low phase after the tail (logic
// asleep, terminal flag floating, count retained by the always-on flip-flops).
module tb_hour_timer;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned MOD    = 24;
  localparam int unsigned W      = 5;
  localparam int unsigned SLEEP  = 20;     // default sleep tail of the switch
  localparam int unsigned TICKS  = 60;
  localparam int unsigned HI_MIN = 40, HI_SPAN = 300;
  localparam int unsigned LO_MIN = 500, LO_SPAN = 200000;

  logic         clk_s = 1'b0, rst_ns = 1'b0;
  logic [W-1:0] q;
  logic         en, pwr;
  int           checks = 0, failures = 0, wraps = 0, sleeps = 0;
  int           ref_q = 0;

  aspg_timer #(.MOD(MOD), .W(W)) dut (
    .clk_i(clk_s), .rst_ni(rst_ns), .q_o(q), .en_o(en), .powered_o(pwr));

  task automatic cmp(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL t=%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  initial begin
    #(64'd100_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned hi, lo;
    // reset held from time 0, released, then pulsed so the asynchronous
    // reset sees a falling edge
    #50  rst_ns = 1'b1;
    #50  rst_ns = 1'b0;
    #50  rst_ns = 1'b1;
    #100;
    cmp(int'(q), 0, "count after reset");
    for (int t = 0; t < TICKS; t++) begin
      hi = HI_MIN + ($urandom % HI_SPAN);
      lo = LO_MIN + ($urandom % LO_SPAN);
      // rising edge: the gated logic wakes up
      clk_s = 1'b1;
      #1;
      cmp(int'(pwr), 1, "powered after rise");
      cmp(int'(q), ref_q, "count held over rise");
      cmp(int'(en), int'(ref_q == MOD - 1), "terminal flag while awake");
      #(hi - 1);
      // falling edge: the flip-flops load the next count
      clk_s = 1'b0;
      #1;
      ref_q = (ref_q + 1) % MOD;
      if (ref_q == 0) wraps++;
      cmp(int'(q), ref_q, "count after fall");
      cmp(int'(pwr), 1, "switch tail after fall");
      #(SLEEP);
      // asleep: the logic floats, the count is kept
      cmp(int'(pwr), 0, "asleep after tail");
      cmp(int'(en), 1, "terminal flag floating while asleep");
      cmp(int'(q), ref_q, "count retained while asleep");
      sleeps++;
      #(lo - SLEEP - 1);
      cmp(int'(q), ref_q, "count retained at end of sleep");
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL the count never wrapped");
    end
    $display("wraps=%0d sleep periods=%0d", wraps, sleeps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
