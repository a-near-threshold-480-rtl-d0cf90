`timescale 1ps / 1fs
// dlf: second-order proportional-integral digital loop filter.
//
// On every rising edge of the reference clock the filter samples the TDC
// result (SIGN and the 4-bit magnitude), forms the signed phase error e and
// updates
//     acc <= acc + Ki * e                     (integral path, Ki = 2^-4)
//     out <= acc_new + Kp * e                 (proportional path, Kp = 2^-1)
// which is H(z) = Kp + Ki / (1 - z^-1), the bilinear image of an R + 1/sC
// loop filter. out is a fixed-point DCO code: its 9 integer bits drive the
// DCO switches directly and the next 4 fraction bits go to the sigma-delta
// modulator. Both acc and out saturate at the ends of the code range instead
// of wrapping.
//
// Scaling: one TDC LSB is taken to be worth one SDM LSB (1/16 of a DCO code),
// so Kp * e moves the code by e/32 and Ki * e by e/256 of a code per reference
// cycle. The integrator therefore keeps DLF_FRAC = 8 fraction bits. With the
// 15 ps TDC step and 563 kHz/code DCO gain of the 0.5 V operating point this
// gives a stable loop with roughly 60 degrees of phase margin.
//
// From the source design: Kp, Ki, the reference clock, the 9 + 4 bit output
// split and the transfer function. This implementation's choices: the TDC
// weighting above, SIGN = 1 meaning "reference leads, raise the frequency",
// saturation, and a reset to INIT_CODE.
//
// Timing: one register stage. The error sampled at edge n is in out after
// edge n.
module dlf
  import adpll_pkg::*;
#(
  parameter int unsigned INIT_CODE = 256,       // integer DCO code after reset
  parameter int unsigned KP_SH     = KP_SHIFT,  // Kp = 2^-KP_SH
  parameter int unsigned KI_SH     = KI_SHIFT   // Ki = 2^-KI_SH
) (
  input  logic                clk,       // F_REF
  input  logic                rst_n,     // asynchronous, active low
  input  logic                sign,      // 1: reference leads feedback
  input  logic [TDC_BITS-1:0] tdc_code,  // magnitude of the phase error
  output dco_ctrl_t           ctrl,      // {code[8:0], frac[3:0]}
  output phase_err_t          err        // last sampled signed error
);

  // Fixed point: ACC_W bits, DLF_FRAC of them fractional, unsigned code range.
  localparam int unsigned ACC_W = DCO_BITS + DLF_FRAC;            // 17
  localparam int unsigned LSB_SH = DLF_FRAC - SDM_BITS;           // TDC LSB = 2^LSB_SH units
  localparam logic [ACC_W-1:0] ACC_MAX = '1;
  localparam logic [ACC_W-1:0] ACC_INIT = ACC_W'(INIT_CODE) << DLF_FRAC;

  typedef logic signed [ACC_W+1:0] wide_t;                        // room for sign and carry

  logic [ACC_W-1:0] acc, out_q;
  phase_err_t       e;
  wide_t            prop, incr, acc_sum, out_sum;
  logic [ACC_W-1:0] acc_next, out_next;

  function automatic logic [ACC_W-1:0] clamp(input wide_t v);
    if (v < 0)                      return '0;
    else if (v > wide_t'(ACC_MAX))  return ACC_MAX;
    else                            return v[ACC_W-1:0];
  endfunction

  always_comb begin
    e        = sign ? phase_err_t'({1'b0, tdc_code}) : -phase_err_t'({1'b0, tdc_code});
    // e in units of 2^LSB_SH, then scaled by the gain shifts
    prop     = (wide_t'(e) <<< LSB_SH) >>> KP_SH;
    incr     = (wide_t'(e) <<< LSB_SH) >>> KI_SH;
    acc_sum  = wide_t'({2'b00, acc}) + incr;
    acc_next = clamp(acc_sum);
    out_sum  = wide_t'({2'b00, acc_next}) + prop;
    out_next = clamp(out_sum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= ACC_INIT;
      out_q <= ACC_INIT;
      err   <= '0;
    end else begin
      acc   <= acc_next;
      out_q <= out_next;
      err   <= e;
    end
  end

  assign ctrl.code = out_q[ACC_W-1 -: DCO_BITS];
  assign ctrl.frac = out_q[DLF_FRAC-1 -: SDM_BITS];

endmodule
