`timescale 1ps / 1fs
// tb_vernier_tdc: self-checking test of the Vernier TDC model.
//
// Sends LEAD/LAG pulse pairs shaped as the PFD makes them (both end together,
// LAG lasts `width`, LEAD lasts head + width) with a known head start of
// m*DT + DT/2 (so no comparator sees a tie) for m = 0..17, and checks
// that the thermometer has min(m,16) ones, that it is a clean thermometer
// and that the binary code is min(m,15). Also checks that SIGN passes
// through, and that the result is ready N*(T+DT) + margin after LEAD.
module tb_vernier_tdc;
  import adpll_pkg::*;

  localparam real DT = 15.0;
  localparam real T  = 60.0;

  logic lead = 1'b0, lag = 1'b0, sign_in = 1'b0;
  logic sign;
  logic [TDC_STAGES-1:0] therm;
  logic [TDC_BITS-1:0]   code;

  int checks = 0, failures = 0;

  vernier_tdc #(.T_STAGE(T), .DT(DT)) dut (
    .lead (lead), .lag (lag), .sign_in (sign_in),
    .sign (sign), .therm (therm), .code (code)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic measure(input int m, input real width);
    real head;
    int  exp_ones, ones;
    head = real'(m) * DT + DT / 2.0;
    fork
      begin lead = 1'b1; #(head + width); lead = 1'b0; end
      begin #(head); lag = 1'b1; #(width); lag = 1'b0; end
    join
    // all edges through the chains plus comparator delay
    #(real'(TDC_STAGES) * (T + DT) + 50.0);
    exp_ones = (m > TDC_STAGES) ? TDC_STAGES : m;
    ones = $countones(therm);
    check(ones == exp_ones, $sformatf("m=%0d width=%0.0f ones=%0d exp=%0d therm=%b", m, width, ones, exp_ones, therm));
    check(therm == TDC_STAGES'((33'(1) << exp_ones) - 1), $sformatf("m=%0d not a thermometer code: %b", m, therm));
    check(code == TDC_BITS'((exp_ones > 15) ? 15 : exp_ones), $sformatf("m=%0d code=%0d", m, code));
    #1000;
  endtask

  initial begin
    #100;
    for (int m = 0; m <= 17; m++) measure(m, 300.0);
    for (int m = 17; m >= 0; m -= 3) measure(m, 600.0);
    for (int m = 5; m <= 9; m++) measure(m, 260.0);
    sign_in = 1'b1; #1; check(sign == 1'b1, "sign passes 1");
    sign_in = 1'b0; #1; check(sign == 1'b0, "sign passes 0");
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
