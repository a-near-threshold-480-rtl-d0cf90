`timescale 1ps / 1fs
// tb_dlf: self-checking test of the PI loop filter.
// An integer reference model in units of 1/256 DCO code predicts the output
// after every reference edge: acc += e (Ki * one TDC LSB = 1/256 code),
// out = acc + 8 e (Kp), both clamped to [0, 2^17 - 1]; code = out / 256 and
// frac = (out / 16) mod 16. Stimulus: random errors, then long runs of the
// largest positive and negative error to drive both saturation limits. The
// output must change one clock after the error is sampled (one-cycle latency).
module tb_dlf;
  import adpll_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sign = 1'b0;
  logic [3:0] tdc_code = '0;
  dco_ctrl_t ctrl;
  phase_err_t err;
  int checks = 0, failures = 0;
  int acc_ref, out_ref, sat_hi = 0, sat_lo = 0;
  localparam int MAXV = (1 << 17) - 1;

  dlf dut (.clk(clk), .rst_n(rst_n), .sign(sign), .tdc_code(tdc_code), .ctrl(ctrl), .err(err));

  always #16667 clk = ~clk;   // 30 MHz reference

  function automatic int clamp(input int v);
    return (v < 0) ? 0 : (v > MAXV) ? MAXV : v;
  endfunction

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic step(input bit s, input int c);
    int e;
    sign = s; tdc_code = 4'(c);
    e = s ? c : -c;
    @(posedge clk);
    acc_ref = clamp(acc_ref + e);
    out_ref = clamp(acc_ref + 8 * e);
    if (acc_ref + e > MAXV || acc_ref + 8 * e > MAXV) sat_hi++;
    if (acc_ref + e < 0    || acc_ref + 8 * e < 0)    sat_lo++;
    @(negedge clk);
    chk(int'(ctrl.code) == out_ref / 256 && int'(ctrl.frac) == (out_ref / 16) % 16,
        $sformatf("e=%0d code=%0d.%0d exp %0d.%0d", e, ctrl.code, ctrl.frac, out_ref / 256, (out_ref / 16) % 16));
    chk(int'(err) == e, $sformatf("err=%0d exp %0d", err, e));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    chk(ctrl.code == 9'd256 && ctrl.frac == 4'd0, "reset value 256.0");
    rst_n = 1'b1;
    acc_ref = 256 * 256;
    // a single +1 sample: +8/256 (prop) + 1/256 (integral) -> frac 0, then prop removed
    step(1'b1, 1);
    step(1'b0, 0);
    for (int i = 0; i < 400; i++) step(1'($urandom), int'($urandom_range(0, 15)));
    for (int i = 0; i < 4500; i++) step(1'b1, 15);
    chk(ctrl.code == 9'd511, "saturates at the top");
    for (int i = 0; i < 9000; i++) step(1'b0, 15);
    chk(ctrl.code == 9'd0, "saturates at the bottom");
    chk(sat_hi > 0 && sat_lo > 0, "both limits reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #600_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
