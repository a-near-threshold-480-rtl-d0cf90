`timescale 1ps / 1fs
// tb_adpll_lv: end-to-end test of the ADPLL at the 0.25 V operating point:
// 3 MHz reference, divide by 16, 48 MHz target, 156 ps TDC resolution and a
// DCO gain of 213 kHz/code. The oscillator model is re-scaled for this supply
// (top of range 60 MHz at code 512, 213 kHz per code), the TDC stages are
// slower and the PFD reset pulse is widened beyond the 16 x 156 ps TDC span.
module tb_adpll_lv;
  import adpll_pkg::*;

  localparam real T_REF       = 1.0e12 / 3.0e6;    // ps
  localparam int  N_DIV       = 16;
  localparam int  MAX_CYCLES  = 3000;
  localparam real LOCK_TOL_PS = 600.0;
  localparam real F_TARGET_HZ = 48.0e6;

  logic f_ref = 1'b0, rst_n;
  logic f_out, f_fb, up, dn, sign, dither;
  logic [4:0] phase;
  logic [TDC_BITS-1:0] tdc_code;
  dco_ctrl_t dco_ctrl;
  phase_err_t err;

  // K_BT: 60 MHz at V_C = 0.25 V (2*0.9*0.25 - 0.24 = 0.21 V); VC_LSB: 213 kHz per code
  adpll_top #(
    .INIT_CODE (440),
    .TDC_DT    (156.0),
    .TDC_T     (600.0),
    .PFD_T_RST (3000.0),
    .VDD       (0.25),
    .VC_LSB    (213.0e3 / (1.8 * 285.714e6)),
    .K_BT      (285.714e6)
  ) dut (
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
