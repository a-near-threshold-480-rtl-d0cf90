`timescale 1ps / 1fs
// tdc_t2b: thermometer-to-binary decoder of the Vernier TDC.
//
// The 16 phase comparators of the TDC produce a thermometer code whose number
// of ones grows with the LEAD-to-LAG time difference. This decoder counts the
// ones (so an isolated bubble costs at most one LSB instead of a wrong MSB) and
// saturates the count at 15 so that the result fits the 4-bit TDC output.
// Purely combinational.
//
// From the source design: 16-bit thermometer in, 4-bit binary out. The ones
// counting and the saturation of the all-ones code (16) to 15 are this
// implementation's choices; the source only names the decoder.
module tdc_t2b
  import adpll_pkg::*;
#(
  parameter int unsigned N_THERM = TDC_STAGES,   // thermometer bits
  parameter int unsigned N_BIN   = TDC_BITS      // binary bits
) (
  input  logic [N_THERM-1:0] therm,  // bit k = 1: LEAD still ahead after k+1 stages
  output logic [N_BIN-1:0]   bin     // number of ones, saturated at 2^N_BIN-1
);

  localparam int unsigned CW = $clog2(N_THERM + 1);
  localparam int unsigned MAXV = (1 << N_BIN) - 1;

  logic [CW-1:0] ones;

  always_comb begin
    ones = '0;
    for (int unsigned k = 0; k < N_THERM; k++)
      ones = ones + CW'(therm[k]);
  end

  always_comb begin
    if (32'(ones) > MAXV) bin = N_BIN'(MAXV);
    else                  bin = N_BIN'(ones);
  end

endmodule
