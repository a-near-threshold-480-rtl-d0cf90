`timescale 1ps / 1fs
// btro: behavioural model of the 5-stage bootstrapped ring oscillator.
//
// Each bootstrapped delay cell swings from -V_C to 2 V_C, which drives the
// next cell's transistors into strong inversion and makes the stage delay
// close to inversely proportional to (2 beta V_C - Vth). The model uses that
// first-order law:
//     f   = K_BT * (2 * BETA * vc - VTH)      (clamped to at least F_MIN)
//     t_d = 1 / (2 * N_STAGES * f)             per stage
// and builds a ring of N_STAGES inverting stages whose delay is re-evaluated
// from vc at every transition, so a change of vc shows within one stage. The
// N_STAGES node voltages are the output phases (with their complements, 10
// phases); out is the last stage, as in the source schematic.
//
// en = 0 holds the ring in the alternating state 0,1,0,1,0 (one travelling
// edge once released), so the ring always starts in its fundamental mode.
//
// Behavioural model (analog). From the source design: 5 stages, beta = 90 %,
// NMOS Vth = 240 mV, and 602 MHz at V_C = 0.5 V, which fixes
// K_BT = 602 MHz / (0.9 V - 0.24 V). The enable and F_MIN are this model's.
//
// Lint reports ZERODLY for the stage delay in this model because it is computed at run
// time; F_MIN keeps it strictly positive, so the warning stands.
module btro #(
  parameter int unsigned N_STAGES = 5,
  parameter real         BETA     = 0.9,
  parameter real         VTH      = 0.24,        // V
  parameter real         K_BT     = 912.1212e6,  // Hz per V of (2 beta V_C - Vth)
  parameter real         F_MIN    = 1.0e6        // Hz, floor of the model
) (
  input  logic                en,
  input  real                 vc,         // ring supply, V
  output logic [N_STAGES-1:0] phase,      // stage outputs
  output logic                out,        // last stage
  output real                 freq_hz     // present model frequency
);

  logic node [N_STAGES];

  function automatic real stage_delay_ps(input real v);
    real f;
    f = K_BT * (2.0 * BETA * v - VTH);
    if (f < F_MIN) f = F_MIN;
    return 1.0e12 / (2.0 * real'(N_STAGES) * f);
  endfunction

  always_comb begin
    freq_hz = K_BT * (2.0 * BETA * vc - VTH);
    if (freq_hz < F_MIN) freq_hz = F_MIN;
  end

  for (genvar i = 0; i < N_STAGES; i++) begin : g_stage
    localparam int unsigned PREV = (i + N_STAGES - 1) % N_STAGES;
    initial node[i] = 1'(i % 2);
    always @(node[PREV] or en) begin
      if (!en) node[i] = 1'(i % 2);
      else begin
        fork
          automatic logic v  = ~node[PREV];
          automatic real  td = stage_delay_ps(vc);
          begin
            #(td);
            if (en) node[i] = v;
          end
        join_none
      end
    end
    assign phase[i] = node[i];
  end

  assign out = node[N_STAGES-1];

endmodule
