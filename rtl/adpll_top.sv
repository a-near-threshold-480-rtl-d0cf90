`timescale 1ps / 1fs
// adpll_top: near-threshold all-digital PLL with a bootstrapped DCO.
//
// Loop, in signal order:
//   pfd            F_REF and the divided clock F_FB -> UP / DN pulses
//   phase_selector arbiter decides which rose first (SIGN) and routes the
//                  earlier pulse to LEAD, the later to LAG
//   vernier_tdc    16-stage Vernier delay line -> 4-bit |phase error| code
//   dlf            PI loop filter, Kp = 2^-1, Ki = 2^-4, clocked by F_REF
//                  -> 9-bit integer DCO code + 4-bit fraction
//   sdm            4-bit first-order sigma-delta on the DCO clock: its carry
//                  dithers the DCO LSB with the fraction
//   bdco           B2T converters + weighted resistor network + 5-stage
//                  bootstrapped ring -> F_OUT (5 phases)
//   freq_divider   F_OUT / 16 -> F_FB
// In lock F_OUT = 16 * F_REF (480 MHz from a 30 MHz reference at 0.5 V).
//
// The PFD, phase selector, TDC delay lines and the oscillator are behavioural
// models with delays (they are timing and analog cells); the T2B decoder,
// loop filter, sigma-delta modulator, B2T converters and divider are
// synthesizable. rst_n resets the loop filter (to code INIT_CODE), the SDM
// and the divider, and holds the ring oscillator stopped.
//
// An assertion checks at every reference edge that the TDC comparators hold
// a clean thermometer code (the pulse-overlap rule of the Vernier line).
//
// Ports are plain clocks and observation signals: the oscillator phases, the
// feedback clock, UP/DN, SIGN, the TDC code, the loop filter output, the
// dither bit and the signed error the loop filter last sampled.
module adpll_top
  import adpll_pkg::*;
#(
  parameter int unsigned INIT_CODE = 256,        // DCO code after reset
  parameter real         TDC_DT    = 15.0,       // TDC resolution, ps
  parameter real         TDC_T     = 60.0,       // TDC lag-chain stage delay, ps
  parameter real         PFD_T_RST = 300.0,      // PFD reset path delay, ps (> 16 * TDC_DT)
  parameter real         VDD       = 0.5,        // core supply of the DCO model, V
  parameter real         VC_LSB    = 3.4292e-4,  // V_C step per code, V
  parameter real         K_BT      = 912.1212e6  // ring gain, Hz/V
) (
  input  logic                f_ref,       // reference clock (30 MHz at 0.5 V)
  input  logic                rst_n,       // asynchronous, active low
  output logic                f_out,       // DCO output
  output logic [4:0]          phase,       // DCO ring phases
  output logic                f_fb,        // F_OUT / 16
  output logic                up,
  output logic                dn,
  output logic                sign,        // 1: reference leads
  output logic [TDC_BITS-1:0] tdc_code,
  output dco_ctrl_t           dco_ctrl,    // loop filter output
  output logic                dither,      // SDM carry into the DCO LSB
  output phase_err_t          err          // error sampled by the loop filter
);

  logic lead, lag, ps_sign;
  logic [TDC_STAGES-1:0] therm;
  logic [SDM_BITS-1:0]   sdm_acc;
  real                   vc, dco_freq;

  pfd #(.T_RST(PFD_T_RST)) u_pfd (
    .f_ref (f_ref),
    .f_fb  (f_fb),
    .up    (up),
    .dn    (dn)
  );

  phase_selector u_ps (
    .up   (up),
    .dn   (dn),
    .sign (ps_sign),
    .lead (lead),
    .lag  (lag)
  );

  vernier_tdc #(.T_STAGE(TDC_T), .DT(TDC_DT)) u_tdc (
    .lead    (lead),
    .lag     (lag),
    .sign_in (ps_sign),
    .sign    (sign),
    .therm   (therm),
    .code    (tdc_code)
  );

  dlf #(.INIT_CODE(INIT_CODE)) u_dlf (
    .clk      (f_ref),
    .rst_n    (rst_n),
    .sign     (sign),
    .tdc_code (tdc_code),
    .ctrl     (dco_ctrl),
    .err      (err)
  );

  sdm u_sdm (
    .clk   (f_out),
    .rst_n (rst_n),
    .in    (dco_ctrl.frac),
    .carry (dither),
    .acc   (sdm_acc)
  );

  bdco #(.VDD(VDD), .VC_LSB(VC_LSB), .K_BT(K_BT)) u_bdco (
    .en      (rst_n),
    .code    (dco_ctrl.code),
    .dither  (dither),
    .phase   (phase),
    .clk_out (f_out),
    .vc      (vc),
    .freq_hz (dco_freq)
  );

  // Measurement rule: when the loop filter samples, the comparators must
  // hold a clean thermometer code. A bubble means the LEAD and LAG pulses did
  // not overlap at some comparator, i.e. PFD_T_RST is too short for the TDC.
  a_therm_clean: assert property (@(posedge f_ref) disable iff (!rst_n)
      ((therm & (therm + 1'b1)) == '0))
    else $error("TDC thermometer code %b has a bubble", therm);

  freq_divider #(.DIV(DIV_RATIO)) u_div (
    .clk     (f_out),
    .rst_n   (rst_n),
    .clk_div (f_fb)
  );

endmodule
