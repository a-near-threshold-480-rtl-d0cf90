`timescale 1ps / 1fs
// sdm: 4-bit first-order sigma-delta modulator for DCO LSB dithering.
//
// A 4-bit adder adds the 4-bit fractional loop filter output to a 4-bit
// register; the sum goes back into the register on every DCO clock and the
// adder's carry out is the one-bit dither that is added to the DCO code LSB.
// Over 16 DCO cycles the carry is high "in" times, so the mean DCO code gains
// in/16 of an LSB: a 16-fold finer effective resolution.
//
// Interface: clk is the DCO output (CLK_BDCO), in is DLF_out[3:0]. The carry
// is combinational from the register and the input (as drawn: adder output
// straight to the register D, carry out taken from the adder), so it changes
// right after each clock edge. Reset clears the register; the reset is this
// implementation's addition.
module sdm
  import adpll_pkg::*;
#(
  parameter int unsigned W = SDM_BITS
) (
  input  logic         clk,      // CLK_BDCO
  input  logic         rst_n,    // asynchronous, active low
  input  logic [W-1:0] in,       // fractional code
  output logic         carry,    // dither bit
  output logic [W-1:0] acc       // register contents (Y input of the adder)
);

  logic [W:0] sum;

  always_comb sum = {1'b0, in} + {1'b0, acc};
  assign carry = sum[W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else        acc <= sum[W-1:0];
  end

endmodule
