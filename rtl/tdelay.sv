`timescale 1ps / 1fs
// tdelay: transport delay element for the behavioural timing models.
//
// Every change of a is reproduced on y exactly D picoseconds later, however
// close together the changes are (a transport delay: pulses narrower than D
// are not swallowed). Each change starts its own short-lived process, so
// several edges can be in flight at once. y starts at 0.
//
// Behavioural (non-synthesizable) helper used for the delay buffers of the
// phase selector, the delay lines of the Vernier TDC and the reset path of
// the PFD.
module tdelay #(
  parameter real D = 10.0          // delay, ps
) (
  input  logic a,
  output logic y
);

  initial y = 1'b0;

  always @(a) begin
    fork
      automatic logic v = a;
      begin
        #(D);
        y = v;
      end
    join_none
  end

endmodule
