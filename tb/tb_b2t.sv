`timescale 1ps / 1fs
// tb_b2t: self-checking test of the binary-to-thermometer converters in the
// three sizes the DCO uses (2, 3 and 4 bits). Every input value is applied;
// the expected output is 2^v - 1 (v ones from the bottom).
module tb_b2t;
  logic [1:0]  b2; logic [2:0]  t2;
  logic [2:0]  b3; logic [6:0]  t3;
  logic [3:0]  b4; logic [14:0] t4;
  int checks = 0, failures = 0;

  b2t #(.N(2)) dut2 (.bin(b2), .therm(t2));
  b2t #(.N(3)) dut3 (.bin(b3), .therm(t3));
  b2t #(.N(4)) dut4 (.bin(b4), .therm(t4));

  task automatic chk(input int got, input int exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL: %s got %b exp %b", what, got, exp_v);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      b2 = 2'(v); b3 = 3'(v); b4 = 4'(v);
      #1;
      if (v < 4) chk(int'(t2), (1 << v) - 1, $sformatf("N=2 v=%0d", v));
      if (v < 8) chk(int'(t3), (1 << v) - 1, $sformatf("N=3 v=%0d", v));
      chk(int'(t4), (1 << v) - 1, $sformatf("N=4 v=%0d", v));
      chk($countones(t4), v, $sformatf("N=4 ones v=%0d", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
