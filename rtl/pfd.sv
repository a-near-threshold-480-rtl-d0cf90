`timescale 1ps / 1fs
// pfd: behavioural model of the tri-state phase frequency detector.
//
// Two edge-triggered cells: the one clocked by the reference (F_REF) raises UP,
// the one clocked by the divided feedback (F_B) raises DN. When both are high
// a reset, fed back through a gate, clears both after T_RST. The output that
// rose first therefore stays high longer by exactly the phase error, and
// while the feedback is too slow UP keeps leading, so the detector also
// steers the frequency. An edge that arrives while the reset is active is
// lost (the detector's dead time).
//
// Behavioural model: the source cells are dynamic true-single-phase circuits
// whose timing matters to the loop; the propagation delay T_CQ and the reset
// path delay T_RST are this model's choices, as is the start-up value of 0.
// T_RST sets the width of the shorter pulse. It must exceed the Vernier TDC
// span (16 x 15 ps) so that the LEAD and LAG pulses still overlap at the last
// comparator; 300 ps is a plausible reset delay for near-threshold gates.
// Outputs are active high.
module pfd #(
  parameter real T_CQ  = 10.0,     // clock to UP/DN, ps
  parameter real T_RST = 300.0     // both high -> both cleared, ps
) (
  input  logic f_ref,
  input  logic f_fb,
  output logic up,
  output logic dn
);

  logic rst;

  logic both, ref_d, fb_d;

  initial begin
    up = 1'b0;
    dn = 1'b0;
  end

  // clock-to-output delay of the two cells, then the reset path delay
  tdelay #(.D(T_CQ))  u_ref_dly (.a(f_ref), .y(ref_d));
  tdelay #(.D(T_CQ))  u_fb_dly  (.a(f_fb),  .y(fb_d));
  assign both = up & dn;
  tdelay #(.D(T_RST)) u_rst_dly (.a(both),  .y(rst));

  always @(posedge ref_d or posedge rst) begin
    if (rst) up <= 1'b0;
    else     up <= 1'b1;
  end

  always @(posedge fb_d or posedge rst) begin
    if (rst) dn <= 1'b0;
    else     dn <= 1'b1;
  end

endmodule
