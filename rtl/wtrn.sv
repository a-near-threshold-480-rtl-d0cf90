`timescale 1ps / 1fs
// wtrn: behavioural model of the weighted thermometer-controlled resistor network.
//
// A PMOS switch array between VDD and the ring-oscillator supply node V_C.
// The switches are grouped as 3 coarse (T_C1..3), 7 medium (T_M1..7) and
// 15 fine (T_F1..15) thermometer-driven switches plus one dither switch driven
// by the sigma-delta modulator. Their sizes are weighted so that each coarse
// switch is worth 128 fine steps and each medium switch 16, which makes V_C
// grow linearly with the 9-bit code; the dither switch is worth one fine step.
// This model computes
//     n   = 128 * #coarse_on + 16 * #medium_on + #fine_on + dither  (0..512)
//     V_C = VDD - (512 - n) * VC_LSB
// and outputs V_C as a real.
//
// Behavioural model (analog). From the source design: the switch grouping,
// the 2/3/4-bit code split, the dither switch, VDD = 0.5 V, and the aim of a
// linear code-to-frequency curve. The ideal linear law and VC_LSB are this
// model's choices; VC_LSB = 0.343 mV is chosen so that, with the BTRO model,
// one code step moves the output by 563 kHz, the DCO gain given for 0.5 V.
module wtrn
  import adpll_pkg::*;
#(
  parameter real VDD    = 0.5,          // supply, V
  parameter real VC_LSB = 3.4292e-4     // V_C step per fine code, V
) (
  input  logic [(1<<COARSE_BITS)-2:0] t_c,     // coarse switches, 1 = on
  input  logic [(1<<MEDIUM_BITS)-2:0] t_m,     // medium switches, 1 = on
  input  logic [(1<<FINE_BITS)-2:0]   t_f,     // fine switches, 1 = on
  input  logic                        dither,  // dither switch, 1 = on
  output real                         vc       // regulated ring supply, V
);

  localparam int unsigned W_MED    = 1 << FINE_BITS;                  // 16
  localparam int unsigned W_COARSE = 1 << (FINE_BITS + MEDIUM_BITS);  // 128
  localparam int unsigned N_FULL   = 1 << DCO_BITS;                   // 512

  int unsigned n_on;

  always_comb begin
    n_on = 32'(dither);
    for (int unsigned k = 0; k < $bits(t_c); k++) n_on += t_c[k] ? W_COARSE : 0;
    for (int unsigned k = 0; k < $bits(t_m); k++) n_on += t_m[k] ? W_MED : 0;
    for (int unsigned k = 0; k < $bits(t_f); k++) n_on += 32'(t_f[k]);
  end

  assign vc = VDD - real'(N_FULL - n_on) * VC_LSB;

endmodule
