`timescale 1ps / 1fs
// tb_tdc_t2b: self-checking test of the thermometer-to-binary decoder.
// Applies every clean thermometer code (0..16 ones), codes with one bubble and
// random words; the expected value is the number of ones saturated at 15,
// computed with $countones independently of the decoder.
module tb_tdc_t2b;
  logic [15:0] therm;
  logic [3:0]  bin;
  int checks = 0, failures = 0;

  tdc_t2b dut (.therm(therm), .bin(bin));

  task automatic apply(input logic [15:0] t);
    int exp_v;
    therm = t;
    #1;
    exp_v = $countones(t);
    if (exp_v > 15) exp_v = 15;
    checks++;
    if (32'(bin) != exp_v) begin
      failures++;
      $display("FAIL: therm=%b bin=%0d exp=%0d", t, bin, exp_v);
    end
  endtask

  initial begin
    for (int k = 0; k <= 16; k++) apply(16'((32'(1) << k) - 1));
    for (int k = 2; k <= 15; k++) apply(16'((32'(1) << k) - 1) ^ 16'(1 << (k - 2)));
    for (int i = 0; i < 200; i++) apply(16'($urandom));
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
