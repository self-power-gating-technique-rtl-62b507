// tb_isol_cell: self-checking test of the clamp-to-0 isolation cell.
// Drives every IN/EN combination and a run of random ones, and checks that OUT
// follows IN when EN is high and is 0 when EN is low.
module tb_isol_cell;
  timeunit 1ps;
  timeprecision 1ps;

  logic in_s, en_s, out_s;
  int   checks = 0, failures = 0;

  isol_cell dut (.in_i(in_s), .en_i(en_s), .out_o(out_s));

  task automatic check(input logic i, input logic e);
    logic expected;
    in_s = i;
    en_s = e;
    #10;
    expected = e ? i : 1'b0;
    checks++;
    if (out_s !== expected) begin
      failures++;
      $display("FAIL in=%0b en=%0b out=%0b expected=%0b", i, e, out_s, expected);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) check(k[0], k[1]);
    for (int k = 0; k < 200; k++) check(1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
