`timescale 1ps / 1fs
// bdco: behavioural model of the bootstrapped digitally controlled oscillator.
//
// The 9-bit code is split D[8:7] coarse, D[6:4] medium and D[3:0] fine; three
// binary-to-thermometer converters (synthesizable, b2t) turn the fields into
// 3 + 7 + 15 switch enables of the weighted resistor network (wtrn), whose
// output V_C supplies the 5-stage bootstrapped ring oscillator (btro). The
// dither bit from the sigma-delta modulator switches one more fine-weight
// element. With the default model constants the frequency is
//     f = 602 MHz - (512 - code - dither) * 563 kHz
// i.e. about 314 MHz at code 0 and 480 MHz near code 295.
//
// Behavioural model, because V_C and the ring are analog; the converters are
// real logic. The code split and the converters follow the source design.
module bdco
  import adpll_pkg::*;
#(
  parameter real VDD    = 0.5,
  parameter real VC_LSB = 3.4292e-4,
  parameter real K_BT   = 912.1212e6
) (
  input  logic                en,       // 0 holds the ring stopped
  input  logic [DCO_BITS-1:0] code,     // D[8:0]
  input  logic                dither,   // SDM carry
  output logic [4:0]          phase,    // 5 ring phases
  output logic                clk_out,  // F_OUT
  output real                 vc,       // ring supply, V
  output real                 freq_hz   // model frequency, Hz
);

  logic [(1<<COARSE_BITS)-2:0] t_c;
  logic [(1<<MEDIUM_BITS)-2:0] t_m;
  logic [(1<<FINE_BITS)-2:0]   t_f;

  b2t #(.N(COARSE_BITS)) u_b2t_c (.bin(code[DCO_BITS-1 -: COARSE_BITS]),          .therm(t_c));
  b2t #(.N(MEDIUM_BITS)) u_b2t_m (.bin(code[FINE_BITS +: MEDIUM_BITS]),           .therm(t_m));
  b2t #(.N(FINE_BITS))   u_b2t_f (.bin(code[FINE_BITS-1:0]),                      .therm(t_f));

  wtrn #(.VDD(VDD), .VC_LSB(VC_LSB)) u_wtrn (
    .t_c    (t_c),
    .t_m    (t_m),
    .t_f    (t_f),
    .dither (dither),
    .vc     (vc)
  );

  btro #(.N_STAGES(5), .K_BT(K_BT)) u_btro (
    .en      (en),
    .vc      (vc),
    .phase   (phase),
    .out     (clk_out),
    .freq_hz (freq_hz)
  );

endmodule
