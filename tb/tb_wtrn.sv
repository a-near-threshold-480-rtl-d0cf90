`timescale 1ps / 1fs
// tb_wtrn: self-checking test of the resistor-network model.
// Drives thermometer switch patterns for every 9-bit code (and random switch
// patterns, which need not be thermometer codes) with and without the dither
// switch, and checks V_C = VDD - (512 - n) * VC_LSB with
// n = 128 * coarse_on + 16 * medium_on + fine_on + dither, and that V_C rises
// monotonically with the code.
module tb_wtrn;
  localparam real VDD = 0.5, LSB = 3.4292e-4;
  logic [2:0]  t_c;
  logic [6:0]  t_m;
  logic [14:0] t_f;
  logic        dither;
  real         vc, prev;
  int checks = 0, failures = 0;

  wtrn #(.VDD(VDD), .VC_LSB(LSB)) dut (.t_c(t_c), .t_m(t_m), .t_f(t_f), .dither(dither), .vc(vc));

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic apply(input logic [2:0] c, input logic [6:0] m, input logic [14:0] f, input logic d);
    real exp_v;
    t_c = c; t_m = m; t_f = f; dither = d;
    #1;
    exp_v = VDD - real'(512 - (128 * $countones(c) + 16 * $countones(m) + $countones(f) + int'(d))) * LSB;
    chk(vc - exp_v < 1.0e-9 && exp_v - vc < 1.0e-9, $sformatf("c=%b m=%b f=%b d=%0d vc=%f exp %f", c, m, f, d, vc, exp_v));
  endtask

  initial begin
    prev = -1.0;
    for (int code = 0; code < 512; code++) begin
      apply(3'((1 << (code >> 7)) - 1), 7'((1 << ((code >> 4) & 7)) - 1), 15'((1 << (code & 15)) - 1), 1'b0);
      chk(vc > prev, $sformatf("monotonic at code %0d", code));
      prev = vc;
      apply(3'((1 << (code >> 7)) - 1), 7'((1 << ((code >> 4) & 7)) - 1), 15'((1 << (code & 15)) - 1), 1'b1);
    end
    chk(vc - VDD < 1.0e-9 && VDD - vc < 1.0e-9, "all switches on gives VDD");
    for (int i = 0; i < 100; i++) apply(3'($urandom), 7'($urandom), 15'($urandom), 1'($urandom));
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
