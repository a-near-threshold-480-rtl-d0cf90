`timescale 1ps / 1fs
// phase_comp: behavioural model of the COMP phase comparator (arbiter).
//
// The real cell is two cross-coupled latches: the first resolves which of
// IN1 and IN2 rose first, the second holds that decision while both inputs
// are low again. This model has the same behaviour: a rising edge on in1
// while in2 is still low sets q, a rising edge on in2 while in1 is low clears
// it, simultaneous edges keep the old value, and q holds between decisions.
// q follows its deciding edge after T_CQ. Used once in the phase selector
// (SIGN) and 16 times in the Vernier TDC.
//
// Behavioural model (not synthesizable logic): the cell is a full-custom
// latch pair whose decision depends on sub-gate-delay timing. The
// clock-to-output delay and the start-up value q = 0 are this model's choices.
module phase_comp #(
  parameter real T_CQ = 5.0        // decision delay, ps
) (
  input  logic in1,
  input  logic in2,
  output logic q,                  // 1: in1 rose first
  output logic qb                  // complement of q
);

  logic dec;                       // decision, before the output delay

  initial dec = 1'b0;

  always @(posedge in1 or posedge in2) begin
    if (in1 && !in2)      dec <= 1'b1;
    else if (in2 && !in1) dec <= 1'b0;
  end

  tdelay #(.D(T_CQ)) u_out_dly (.a(dec), .y(q));

  assign qb = ~q;

endmodule
