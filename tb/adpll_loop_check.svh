// adpll_loop_check.svh: body shared by the end-to-end ADPLL testbenches.
//
// Expects, declared by the including module: localparam real T_REF (ps),
// N_DIV, MAX_CYCLES, LOCK_TOL_PS, F_TARGET_HZ, a task end_of_test() that
// prints the result line and ends the simulation, and an adpll_top instance
// `dut` with the signals f_ref, rst_n, f_out, f_fb, up, dn, sign, tdc_code,
// dco_ctrl, dither, err connected.
//
// Sequence: reset, release, let the loop acquire; declare lock after 64
// consecutive reference cycles with |fb - ref| below LOCK_TOL_PS; then, over a
// 256-cycle window, check that exactly N_DIV * 256 DCO edges occur (phase lock
// means an exact frequency ratio), that the phase error stays within
// LOCK_TOL_PS on every cycle and that the model frequency is within 0.5 % of
// the target. Every loop mechanism must have happened at least once:
// reference-leads and feedback-leads decisions, a saturated and an
// in-range nonzero TDC code, a zero code (dead zone), frequency detection (a
// reference edge while UP is already high), SDM dither pulses, and
// integrator movement.

  int checks = 0, failures = 0;
  int n_ref = 0, lock_run = 0, lock_cycle = -1;
  int cnt_sign1 = 0, cnt_sign0 = 0, cnt_sat = 0, cnt_mid = 0, cnt_zero = 0;
  int cnt_freqdet = 0, cnt_dither = 0, cnt_code_move = 0;
  int out_edges = 0;
  realtime t_ref_last, t_fb_last;
  real phase_err_ps;
  logic [8:0] last_code;

  always #(T_REF / 2.0) f_ref = ~f_ref;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge f_out) out_edges++;
  always @(posedge dither) cnt_dither++;
  always @(posedge f_fb) t_fb_last = $realtime;

  // frequency detection: a reference edge arriving while UP is still high
  always @(posedge f_ref) begin
    if (rst_n && up && !dn) cnt_freqdet++;
    t_ref_last = $realtime;
  end

  // what the loop filter sampled on this edge
  always @(negedge f_ref) if (rst_n) begin
    n_ref++;
    if (err > 0) cnt_sign1++;
    if (err < 0) cnt_sign0++;
    if (err == 15 || err == -15) cnt_sat++;
    else if (err != 0) cnt_mid++;
    else cnt_zero++;
    if (dco_ctrl.code != last_code) cnt_code_move++;
    last_code = dco_ctrl.code;
  end

  // phase error of the latest edge pair, nearest alignment
  function automatic real cur_phase_err();
    real d;
    d = t_fb_last - t_ref_last;
    if (d >  T_REF / 2.0) d = d - T_REF;
    if (d < -T_REF / 2.0) d = d + T_REF;
    return d;
  endfunction

  initial begin
    int e0;
    real fhz;
    last_code = '0;
    t_ref_last = 0.0;
    t_fb_last = 0.0;
    rst_n = 1'b0;
    #(3.0 * T_REF);
    rst_n = 1'b1;
    // acquisition
    while (lock_cycle < 0 && n_ref < MAX_CYCLES) begin
      @(posedge f_ref);
      #(T_REF / 4.0 + T_REF / (2.0 * N_DIV));
      phase_err_ps = cur_phase_err();
      if (phase_err_ps < LOCK_TOL_PS && phase_err_ps > -LOCK_TOL_PS) lock_run++;
      else lock_run = 0;
      if (lock_run == 64) lock_cycle = n_ref;
    end
    chk(lock_cycle >= 0, $sformatf("lock within %0d reference cycles", MAX_CYCLES));
    $display("lock after %0d reference cycles, DCO code %0d.%0d", lock_cycle, dco_ctrl.code, dco_ctrl.frac);
    // locked window
    @(posedge f_ref);
    #(T_REF / 4.0 + T_REF / (2.0 * N_DIV));
    e0 = out_edges;
    repeat (256) begin
      @(posedge f_ref);
      #(T_REF / 4.0 + T_REF / (2.0 * N_DIV));
      phase_err_ps = cur_phase_err();
      chk(phase_err_ps < LOCK_TOL_PS && phase_err_ps > -LOCK_TOL_PS,
          $sformatf("phase error %0.1f ps in lock", phase_err_ps));
    end
    chk(out_edges - e0 == 256 * N_DIV, $sformatf("%0d DCO edges in 256 reference cycles, exp %0d", out_edges - e0, 256 * N_DIV));
    fhz = dut.u_bdco.freq_hz;
    chk(fhz / F_TARGET_HZ > 0.995 && fhz / F_TARGET_HZ < 1.005, $sformatf("DCO at %f MHz", fhz / 1e6));
    $display("mechanisms: ref-leads=%0d fb-leads=%0d tdc-saturated=%0d tdc-in-range=%0d dead-zone=%0d freq-detect=%0d dither-pulses=%0d code-moves=%0d",
             cnt_sign1, cnt_sign0, cnt_sat, cnt_mid, cnt_zero, cnt_freqdet, cnt_dither, cnt_code_move);
    chk(cnt_sign1 > 0, "reference-leads decision seen");
    chk(cnt_sign0 > 0, "feedback-leads decision seen");
    chk(cnt_sat > 0, "saturated TDC code seen");
    chk(cnt_mid > 0, "in-range TDC code seen");
    chk(cnt_zero > 0, "zero TDC code seen");
    chk(cnt_freqdet > 0, "PFD frequency detection seen");
    chk(cnt_dither > 0, "SDM dither pulses seen");
    chk(cnt_code_move > 0, "loop filter moved the DCO code");
    end_of_test();
  end

  initial begin
    #(real'(MAX_CYCLES + 400) * T_REF);
    failures++;
    $display("FAIL: watchdog");
    end_of_test();
  end
