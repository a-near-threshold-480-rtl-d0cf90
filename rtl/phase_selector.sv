`timescale 1ps / 1fs
// phase_selector: behavioural model of the PS phase selector.
//
// The Vernier TDC only measures a positive delay from LEAD to LAG, so the
// selector puts the earlier of UP and DN on LEAD. A COMP arbiter (IN1 = UP,
// IN2 = DN) decides which rose first and drives SIGN. UP and DN are each
// delayed by T_DT (the two "delta t" buffers) so that SIGN has settled before
// the delayed edges reach the two 2:1 multiplexers:
//     SIGN = 1 (UP first):  LEAD = UP delayed, LAG = DN delayed
//     SIGN = 0 (DN first):  LEAD = DN delayed, LAG = UP delayed
// which is the 0/1 input assignment of the multiplexers in the source
// schematic. The delays are transport delays, so short pulses pass.
//
// Behavioural model (the delay buffers and the arbiter are timing cells).
// The value of T_DT is this model's choice; it must exceed the arbiter delay,
// which an assertion checks: SIGN never changes while a delayed pulse is high.
module phase_selector #(
  parameter real T_DT = 40.0,      // delta-t buffer delay, ps
  parameter real T_CQ = 5.0        // arbiter decision delay, ps
) (
  input  logic up,
  input  logic dn,
  output logic sign,               // 1: UP rose first (reference leads)
  output logic lead,
  output logic lag
);

  logic up_d, dn_d, sign_b;

  phase_comp #(.T_CQ(T_CQ)) u_comp (
    .in1 (up),
    .in2 (dn),
    .q   (sign),
    .qb  (sign_b)
  );

  tdelay #(.D(T_DT)) u_up_dly (.a(up), .y(up_d));
  tdelay #(.D(T_DT)) u_dn_dly (.a(dn), .y(dn_d));

  // SIGN may only switch while no delayed pulse is in the multiplexers,
  // otherwise LEAD or LAG would glitch.
  always @(sign) begin
    a_sign_settled: assert (!up_d && !dn_d)
      else $error("SIGN switched while a delayed pulse was high");
  end

  assign lead = sign ? up_d : dn_d;
  assign lag  = sign ? dn_d : up_d;

endmodule
