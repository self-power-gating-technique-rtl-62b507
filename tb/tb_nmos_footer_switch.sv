// tb_nmos_footer_switch: self-checking test of the footer switch model.
// Two instances: the default one (instant wake-up, 20 ps sleep tail) and one
// with a 50 ps wake-up latency and an 80 ps tail. Enable pulses of several
// widths are applied, and the powered output is sampled just before and just
// after each expected transition.
module tb_nmos_footer_switch;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned SLEEP0 = 20;
  localparam int unsigned WAKE1  = 50;
  localparam int unsigned SLEEP1 = 80;

  logic en_s = 1'b0;
  logic pwr0, pwr1;
  int   checks = 0, failures = 0;

  nmos_footer_switch dut0 (.enable_i(en_s), .vvss_low_o(pwr0));
  nmos_footer_switch #(.T_WAKE_PS(WAKE1), .T_SLEEP_PS(SLEEP1)) dut1 (
    .enable_i(en_s), .vvss_low_o(pwr1));

  task automatic expect_pwr(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL t=%0t %s: powered=%0b expected=%0b", $time, what, got, exp);
    end
  endtask

  // One enable pulse of width hi followed by a low phase of width lo, both
  // longer than every delay under test.
  task automatic pulse(input int unsigned hi, input int unsigned lo);
    expect_pwr(pwr0, 1'b0, "default asleep before rise");
    expect_pwr(pwr1, 1'b0, "slow asleep before rise");
    en_s = 1'b1;
    #1;
    expect_pwr(pwr0, 1'b1, "default awake right after rise");
    expect_pwr(pwr1, 1'b0, "slow still waking");
    #(WAKE1 - 2);
    expect_pwr(pwr1, 1'b0, "slow still waking at end of latency");
    #2;
    expect_pwr(pwr1, 1'b1, "slow awake after latency");
    #(hi - WAKE1 - 1);
    en_s = 1'b0;
    #1;
    expect_pwr(pwr0, 1'b1, "default tail after fall");
    expect_pwr(pwr1, 1'b1, "slow tail after fall");
    #(SLEEP0 - 2);
    expect_pwr(pwr0, 1'b1, "default tail end");
    #2;
    expect_pwr(pwr0, 1'b0, "default asleep after tail");
    #(SLEEP1 - SLEEP0 - 2);
    expect_pwr(pwr1, 1'b1, "slow tail end");
    #2;
    expect_pwr(pwr1, 1'b0, "slow asleep after tail");
    #(lo - SLEEP1 - 1);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500;
    pulse(200, 1000);
    pulse(100, 300);
    for (int k = 0; k < 20; k++) pulse(100 + ($urandom % 400), 200 + ($urandom % 2000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
