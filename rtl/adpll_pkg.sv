`timescale 1ps / 1fs
// adpll_pkg: widths and constants shared by the near-threshold ADPLL blocks.
//
// The loop is an all-digital PLL: a PFD and phase selector turn the phase error
// into LEAD/LAG edges, a 4-bit Vernier TDC measures it, a proportional-integral
// loop filter clocked by the reference produces a 9-bit integer DCO code plus a
// 4-bit fraction, and a 4-bit first-order sigma-delta modulator dithers the DCO
// LSB with that fraction. The DCO output is divided by 16 and fed back.
//
// Numbers taken from the source design: 4-bit TDC with 16 comparators, 9-bit
// DCO code split 2/3/4 (coarse/medium/fine), 4-bit SDM, divide ratio 16,
// Kp = 2^-1 and Ki = 2^-4. The internal fraction width of the integrator
// (DLF_FRAC) is this implementation's choice.
package adpll_pkg;

  // Time-to-digital converter
  localparam int unsigned TDC_BITS   = 4;               // binary TDC output
  localparam int unsigned TDC_STAGES = 16;              // comparators / thermometer bits

  // DCO control word: D[8:7] coarse, D[6:4] medium, D[3:0] fine
  localparam int unsigned COARSE_BITS = 2;
  localparam int unsigned MEDIUM_BITS = 3;
  localparam int unsigned FINE_BITS   = 4;
  localparam int unsigned DCO_BITS    = COARSE_BITS + MEDIUM_BITS + FINE_BITS; // 9

  // Sigma-delta modulator / DLF fractional output
  localparam int unsigned SDM_BITS = 4;

  // Loop filter gains as right shifts: Kp = 2^-1, Ki = 2^-4
  localparam int unsigned KP_SHIFT = 1;
  localparam int unsigned KI_SHIFT = 4;

  // Extra fraction bits kept inside the integrator so that Ki * (TDC LSB)
  // is representable (the TDC LSB is worth one SDM LSB, 2^-4 DCO code).
  localparam int unsigned DLF_FRAC = SDM_BITS + KI_SHIFT;     // 8

  // Feedback divider
  localparam int unsigned DIV_RATIO = 16;

  // Signed phase error as seen by the loop filter (sign-magnitude -> two's complement)
  localparam int unsigned ERR_BITS = TDC_BITS + 1;
  typedef logic signed [ERR_BITS-1:0] phase_err_t;

  // DCO control word carried from the loop filter to the oscillator
  typedef struct packed {
    logic [DCO_BITS-1:0] code;   // integer part, D[8:0]
    logic [SDM_BITS-1:0] frac;   // fraction for the SDM (DLF_out[3:0])
  } dco_ctrl_t;

endpackage
