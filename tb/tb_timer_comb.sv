// tb_timer_comb: self-checking test of the gated next-state logic.
// A modulo-60 (6-bit) and a modulo-24 (5-bit) instance are driven with every
// count value, powered and unpowered. Powered, the next count must be q+1
// wrapping from MOD-1 to 0 and the terminal flag must be high only on MOD-1;
// unpowered, both outputs must show the floating value (all ones).
module tb_timer_comb;
  timeunit 1ps;
  timeprecision 1ps;

  logic       pwr_s;
  logic [5:0] q60, d60;
  logic [4:0] q24, d24;
  logic       en60, en24;
  int         checks = 0, failures = 0;

  timer_comb dut60 (.powered_i(pwr_s), .q_i(q60), .d_o(d60), .en_o(en60));
  timer_comb #(.MOD(24), .W(5)) dut24 (.powered_i(pwr_s), .q_i(q24), .d_o(d24), .en_o(en24));

  task automatic cmp(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (q60=%0d q24=%0d pwr=%0b)",
               what, got, exp, q60, q24, pwr_s);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 2; p++) begin
      for (int v = 0; v < 60; v++) begin
        pwr_s = p[0];
        q60   = 6'(v);
        q24   = 5'(v % 24);
        #10;
        if (p == 1) begin
          cmp(int'(d60), (v + 1) % 60, "mod-60 next");
          cmp(int'(en60), int'(v == 59), "mod-60 terminal");
          cmp(int'(d24), ((v % 24) + 1) % 24, "mod-24 next");
          cmp(int'(en24), int'((v % 24) == 23), "mod-24 terminal");
        end else begin
          cmp(int'(d60), 63, "mod-60 floating next");
          cmp(int'(en60), 1, "mod-60 floating terminal");
          cmp(int'(d24), 31, "mod-24 floating next");
          cmp(int'(en24), 1, "mod-24 floating terminal");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
