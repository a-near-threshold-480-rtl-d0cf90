`timescale 1ps / 1fs
// vernier_tdc: behavioural model of the 4-bit Vernier time-to-digital converter.
//
// LEAD runs down a chain of N_STAGES buffers of delay T_STAGE + DT, LAG down a
// chain of buffers of delay T_STAGE. After k stages the LEAD edge has lost
// k * DT of its head start. Comparator k (a COMP arbiter, IN1 = LEAD tap,
// IN2 = LAG tap, both taken after stage k+1) outputs 1 while LEAD is still
// ahead, so the comparators form a thermometer code with about
// (head start) / DT ones. The thermometer-to-binary decoder turns it into the
// 4-bit code. SIGN from the phase selector passes through to the loop filter
// beside the code, as in the source block diagram.
//
// Timing: a measurement is complete N_STAGES * (T_STAGE + DT) after the LEAD
// edge plus the comparator delay; the code then holds until the next pair of
// edges. The loop filter samples it one reference period later.
//
// Behavioural model (delay lines). From the source design: 16 comparators,
// 4-bit output, DT = 15 ps (0.5 V typical corner). T_STAGE is this model's
// choice. Transport delays are used so that narrow pulses propagate.
module vernier_tdc
  import adpll_pkg::*;
#(
  parameter int unsigned N_STAGES = TDC_STAGES,
  parameter real         T_STAGE  = 60.0,   // LAG chain stage delay T, ps
  parameter real         DT       = 15.0,   // resolution: extra delay of the LEAD chain, ps
  parameter real         T_CQ     = 5.0     // comparator decision delay, ps
) (
  input  logic                lead,
  input  logic                lag,
  input  logic                sign_in,
  output logic                sign,
  output logic [N_STAGES-1:0] therm,      // comparator outputs
  output logic [TDC_BITS-1:0] code        // binary TDC output
);

  logic ld [N_STAGES];              // LEAD after stage k+1
  logic lg [N_STAGES];              // LAG after stage k+1
  logic [N_STAGES-1:0] qb_unused;

  for (genvar k = 0; k < N_STAGES; k++) begin : g_stage
    logic ld_in, lg_in;
    if (k == 0) begin : g_first
      assign ld_in = lead;
      assign lg_in = lag;
    end else begin : g_next
      assign ld_in = ld[k-1];
      assign lg_in = lg[k-1];
    end

    tdelay #(.D(T_STAGE + DT)) u_lead_buf (.a(ld_in), .y(ld[k]));
    tdelay #(.D(T_STAGE))      u_lag_buf  (.a(lg_in), .y(lg[k]));

    phase_comp #(.T_CQ(T_CQ)) u_comp (
      .in1 (ld[k]),
      .in2 (lg[k]),
      .q   (therm[k]),
      .qb  (qb_unused[k])
    );
  end

  tdc_t2b #(.N_THERM(N_STAGES), .N_BIN(TDC_BITS)) u_t2b (
    .therm (therm),
    .bin   (code)
  );

  assign sign = sign_in;

endmodule
