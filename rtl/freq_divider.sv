`timescale 1ps / 1fs
// freq_divider: the DIV 16 feedback divider.
//
// A free-running counter clocked by the DCO output; the feedback clock is its
// most significant bit, so for a power-of-two ratio the output is a square
// wave at F_OUT / DIV with 50 % duty cycle and its rising edge comes
// DIV cycles apart. The feedback rising edge follows the DCO edge on which the
// counter wraps from DIV/2-1 to DIV/2.
//
// From the source design: the ratio of 16. The counter form and the
// asynchronous reset are this implementation's choices.
module freq_divider
  import adpll_pkg::*;
#(
  parameter int unsigned DIV = DIV_RATIO       // power of two, >= 2
) (
  input  logic clk,        // F_OUT
  input  logic rst_n,
  output logic clk_div     // F_OUT / DIV
);

  localparam int unsigned W = $clog2(DIV);

  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  assign clk_div = cnt[W-1];

endmodule
