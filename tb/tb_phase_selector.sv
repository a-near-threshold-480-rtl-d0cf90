`timescale 1ps / 1fs
// tb_phase_selector: self-checking test of the phase selector model.
// Drives PFD-like pulse pairs (both fall together). With UP first SIGN must
// be 1, LEAD must be UP delayed by T_DT and LAG DN delayed by T_DT; with DN
// first SIGN must be 0 and the roles swap. Edge times of LEAD and LAG are
// compared against the stimulus times.
module tb_phase_selector;
  localparam real T_DT = 40.0;
  logic up = 1'b0, dn = 1'b0;
  logic sign, lead, lag;
  int checks = 0, failures = 0;
  realtime lead_r, lag_r;

  phase_selector #(.T_DT(T_DT), .T_CQ(5.0)) dut (.up(up), .dn(dn), .sign(sign), .lead(lead), .lag(lag));

  always @(posedge lead) lead_r = $realtime;
  always @(posedge lag)  lag_r  = $realtime;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit near(input real a, input real b);
    return (a - b < 0.5) && (b - a < 0.5);
  endfunction

  // up_first: which pulse rises first; sep: how much earlier (ps)
  task automatic pulses(input bit up_first, input real sep);
    realtime t0;
    t0 = $realtime;
    fork
      begin if (!up_first) #(sep); up = 1'b1; end
      begin if (up_first)  #(sep); dn = 1'b1; end
    join
    #300;
    up = 1'b0; dn = 1'b0;
    #500;
    chk(sign == up_first, $sformatf("up_first=%0d sep=%0.1f sign=%0d", up_first, sep, sign));
    chk(near(lead_r - t0, T_DT), $sformatf("LEAD edge at %0.1f", lead_r - t0));
    chk(near(lag_r - t0, T_DT + sep), $sformatf("LAG edge at %0.1f exp %0.1f", lag_r - t0, T_DT + sep));
  endtask

  initial begin
    #100;
    for (int i = 0; i < 20; i++) begin
      pulses(1'b1, real'($urandom_range(2, 250)));
      pulses(1'b0, real'($urandom_range(2, 250)));
    end
    pulses(1'b0, 7.0);
    pulses(1'b0, 9.0);
    pulses(1'b1, 3.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
