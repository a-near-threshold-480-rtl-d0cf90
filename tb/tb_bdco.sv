`timescale 1ps / 1fs
// tb_bdco: self-checking test of the bootstrapped DCO model.
// Sets codes across the range, measures the output frequency over 200 cycles
// and compares it with the expected law f = 602 MHz - (512 - code - dither)
// * 563 kHz; checks that the frequency rises monotonically with the code,
// that one dither step adds one code step, that a coarse step equals 128 fine
// steps (weighting) and that 480 MHz lies inside the tuning range.
module tb_bdco;
  logic en = 1'b0;
  logic [8:0] code = '0;
  logic dither = 1'b0;
  logic [4:0] phase;
  logic clk_out;
  real vc, freq_hz;
  int checks = 0, failures = 0;

  bdco dut (.en(en), .code(code), .dither(dither), .phase(phase), .clk_out(clk_out), .vc(vc), .freq_hz(freq_hz));

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real f_exp(input int c);
    return 602.0e6 - real'(512 - c) * 563.0e3;
  endfunction

  task automatic meas(input int c, input bit d, output real f);
    realtime t0;
    code = 9'(c); dither = d;
    repeat (3) @(posedge clk_out);
    t0 = $realtime;
    repeat (200) @(posedge clk_out);
    f = 200.0e12 / ($realtime - t0);
  endtask

  initial begin
    real f, prev, f0, f1;
    #100;
    en = 1'b1;
    prev = 0.0;
    for (int c = 0; c < 512; c += 37) begin
      meas(c, 1'b0, f);
      chk(f / f_exp(c) > 0.9995 && f / f_exp(c) < 1.0005, $sformatf("code %0d: %f MHz exp %f", c, f / 1e6, f_exp(c) / 1e6));
      chk(f > prev, $sformatf("monotonic at code %0d", c));
      prev = f;
    end
    meas(300, 1'b0, f0);
    meas(300, 1'b1, f1);
    chk((f1 - f0) > 0.55e6 && (f1 - f0) < 0.58e6, $sformatf("dither step %f kHz", (f1 - f0) / 1e3));
    meas(127, 1'b1, f0);
    meas(128, 1'b0, f1);
    chk((f1 - f0) < 2.0e3 && (f0 - f1) < 2.0e3, "coarse step = 128 fine steps");
    meas(0, 1'b0, f0);
    meas(511, 1'b1, f1);
    chk(f0 < 480.0e6 && f1 > 480.0e6, $sformatf("480 MHz in range %f..%f", f0 / 1e6, f1 / 1e6));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
