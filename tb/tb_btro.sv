`timescale 1ps / 1fs
// tb_btro: self-checking test of the bootstrapped ring oscillator model.
// For several supply values V_C, measures the period of the output over many
// cycles and compares it with 1 / (K_BT (2 beta V_C - Vth)); checks 602 MHz
// at 0.5 V, that the 5 phases are spaced by one stage delay in ring order
// (phase i+1 follows phase i), that the ring holds still while disabled, and
// that it restarts in its fundamental mode.
module tb_btro;
  localparam real K_BT = 912.1212e6, BETA = 0.9, VTH = 0.24;
  logic en = 1'b0;
  real  vc = 0.5;
  logic [4:0] phase;
  logic out;
  real  freq_hz;
  int checks = 0, failures = 0;

  btro dut (.en(en), .vc(vc), .phase(phase), .out(out), .freq_hz(freq_hz));

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic measure(input real v);
    realtime t0, t1, r0, r1;
    real exp_p, per, td;
    vc = v;
    repeat (5) @(posedge out);
    t0 = $realtime;
    repeat (100) @(posedge out);
    t1 = $realtime;
    per = (t1 - t0) / 100.0;
    exp_p = 1.0e12 / (K_BT * (2.0 * BETA * v - VTH));
    chk(per / exp_p > 0.999 && per / exp_p < 1.001, $sformatf("vc=%f period %f exp %f", v, per, exp_p));
    // phase spacing: rising edge of phase[0] to the next edge of phase[1]
    @(posedge phase[0]); r0 = $realtime;
    @(phase[1]);         r1 = $realtime;
    td = exp_p / 10.0;
    chk((r1 - r0) / td > 0.99 && (r1 - r0) / td < 1.01, $sformatf("stage delay %f exp %f", r1 - r0, td));
  endtask

  initial begin
    int edges;
    #1000;
    chk(phase == 5'b01010, "held in the start state while disabled");
    en = 1'b1;
    measure(0.5);
    chk(freq_hz > 601.9e6 && freq_hz < 602.1e6, $sformatf("602 MHz at 0.5 V: %f", freq_hz));
    measure(0.45);
    measure(0.35);
    measure(0.30);
    en = 1'b0;
    #5000;
    edges = 0;
    fork
      begin repeat (1) @(out); edges++; end
      #20000;
    join_any
    disable fork;
    chk(edges == 0 && phase == 5'b01010, "stopped when disabled");
    en = 1'b1;
    measure(0.4);
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
