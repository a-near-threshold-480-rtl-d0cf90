`timescale 1ps / 1fs
// tb_adpll_top: end-to-end test of the ADPLL at its default parameters, the
// 0.5 V operating point: 30 MHz reference, divide by 16, 480 MHz target,
// 15 ps TDC. The loop starts from code 256 (about 458 MHz), acquires
// frequency and phase and must then hold phase lock (see
// adpll_loop_check.svh for the checks and the mechanisms counted).
module tb_adpll_top;
  import adpll_pkg::*;

  localparam real T_REF       = 1.0e12 / 30.0e6;   // ps
  localparam int  N_DIV       = 16;
  localparam int  MAX_CYCLES  = 4000;
  localparam real LOCK_TOL_PS = 60.0;
  localparam real F_TARGET_HZ = 480.0e6;

  logic f_ref = 1'b0, rst_n;
  logic f_out, f_fb, up, dn, sign, dither;
  logic [4:0] phase;
  logic [TDC_BITS-1:0] tdc_code;
  dco_ctrl_t dco_ctrl;
  phase_err_t err;

  adpll_top dut (
    .f_ref (f_ref), .rst_n (rst_n), .f_out (f_out), .phase (phase), .f_fb (f_fb),
    .up (up), .dn (dn), .sign (sign), .tdc_code (tdc_code), .dco_ctrl (dco_ctrl),
    .dither (dither), .err (err)
  );

`include "adpll_loop_check.svh"

  task automatic end_of_test();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

endmodule
