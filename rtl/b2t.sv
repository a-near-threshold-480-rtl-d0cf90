`timescale 1ps / 1fs
// b2t: binary-to-thermometer code converter of the WTRN.
//
// Turns an N-bit binary field of the DCO code into 2^N-1 thermometer bits:
// output bit k is 1 when the binary value exceeds k, so the number of ones
// equals the binary value. In the DCO three of these drive the coarse (2-bit ->
// T_C1..T_C3), medium (3-bit -> T_M1..T_M7) and fine (4-bit -> T_F1..T_F15)
// PMOS switches. Combinational.
//
// From the source design: the three field widths and the switch counts.
// Active-high switch enables (1 = switch on, more current into V_C) are this
// implementation's choice; the PMOS gates would take the inverted level.
module b2t #(
  parameter int unsigned N = 4                 // binary width
) (
  input  logic [N-1:0]          bin,
  output logic [(1<<N)-2:0]     therm          // therm[k] = (bin > k)
);

  always_comb begin
    for (int unsigned k = 0; k < (1 << N) - 1; k++)
      therm[k] = (32'(bin) > k);
  end

endmodule
