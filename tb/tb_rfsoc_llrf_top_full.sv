// End-to-end test of the controller top with a cavity model in the loop.
//
// Full-size version: the top runs with its default parameters
// (decimation 2^15 to 3.75 kSps, 1024-bin spectrum frames, 32 LMS taps,
// 4 Kalman filters, 64-point FFT frames); otherwise the same sequence and
// checks as the reduced end-to-end test, about 23 million clocks.
// The cavity phase is the sum of a static offset, a response to the
// piezo excitation (a 3-tap system driven by the random piezo_ref), a
// microphonic tone and, at the end, a 1 kHz frequency detuning.
// Phases:
//   A  open loop, raw and shifted reference: no lock
//   B  phase alignment: lock
//   C  open loop with piezo response and tone: the adaptive LMS must
//      explain most of the detuning, a spectrum frame with one peak must
//      activate one Kalman filter, the feedforward NCO (DAC6) must carry
//      the selected signal as phase offset; every frame of identified
//      detuning that passes FFT, deconvolution (unit piezo response) and
//      inverse FFT must come back as its negation, and is played out as
//      the feedforward excitation; a frame without peaks must
//      switch the filter off; LMS adaptation is frozen for a while
//   D  loop closed with 1 kHz detuning: DAC5 frequency = reference minus
//      detuning, lock
// Every mechanism is counted; one that never happened is a failure.
module tb_rfsoc_llrf_top_full;
  import rfsoc_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int R_LOG2 = 15, NB = 1024, TAPS = 32, NF = 4, FFT_LOG2N = 6;
  localparam int FFT_N = 1 << FFT_LOG2N;
  // rounding of the N bins summed by the inverse FFT: about 8*sqrt(N) LSB
  localparam int EXC_TOL = 8 * (1 << (FFT_LOG2N / 2)) + 8;

  logic clk = 0, rst = 1;
  always #4 clk = ~clk;

  sel_mode_e sel_mode;
  logic ref_mux_sel, adc1_valid, dac5_valid, dac6_valid, locked, phase_err_valid;
  logic [NCO_W-1:0] fcw_ref, fcw_out, fcw_ff, detune_fcw;
  logic signed [17:0] kp, ki;
  iq_t adc1;
  dac_iq_t [LANES-1:0] dac5, dac6;
  logic signed [ERR_W-1:0] phase_err, piezo_ref, detune, aff_y, aff_e, kal_est, kal_y;
  logic signed [NCO_W-1:0] freq_corr;
  logic aff_adapt, detune_valid, aff_valid, spec_valid, spec_last, kal_adapt;
  logic kal_est_valid, kal_lms_valid, ff_sel;
  logic [5:0] aff_mu_shift, kal_mu_shift;
  logic [23:0] spec_mag;
  logic signed [NF-1:0][17:0] slot_k1, slot_k2;
  logic [NF-1:0] kal_active;
  logic [$clog2(NF+1)-1:0] kal_peak_count;
  real phi;
  logic pz_wr_en, exc_valid;
  logic [FFT_LOG2N-1:0] pz_wr_addr;
  logic [15:0] pz_wr_amp, pz_amp_min;
  logic signed [15:0] pz_wr_phase;
  logic signed [ERR_W-1:0] exc;

  rfsoc_llrf_top dut (
    .clk, .rst, .sel_mode, .ref_mux_sel, .fcw_ref, .fcw_out, .kp, .ki,
    .lock_threshold(PHASE_36DEG), .adc1_valid, .adc1, .dac5_valid, .dac5,
    .dac6_valid, .dac6, .locked, .phase_err_valid, .phase_err, .freq_corr,
    .piezo_ref, .aff_adapt, .aff_mu_shift, .detune_valid, .detune, .aff_valid,
    .aff_y, .aff_e, .pz_wr_en, .pz_wr_addr, .pz_wr_amp, .pz_wr_phase, .pz_amp_min,
    .exc_valid, .exc, .spec_valid, .spec_mag, .spec_last, .peak_threshold(24'd20000),
    .slot_k1, .slot_k2, .kal_adapt, .kal_mu_shift, .kal_active, .kal_peak_count,
    .kal_est_valid, .kal_est, .kal_lms_valid, .kal_y, .ff_sel, .fcw_ff
  );

  cavity_model #(.DELAY(8)) cav (
    .clk, .dac0(dac5[0]), .dac_valid(dac5_valid), .detune_fcw, .phi0(phi),
    .adc(adc1), .adc_valid(adc1_valid)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real wrap(input real a);
    while (a >= PI) a -= 2.0 * PI;
    while (a < -PI) a += 2.0 * PI;
    return a;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_open, n_rawref, n_align_stb, n_lock_rise, n_track, n_dec, n_aff_adapt,
      n_aff_frozen, n_peaks, n_activate, n_deactivate, n_kal_est, n_kal_lms,
      n_ff_aff, n_ff_kal, n_fft_frame, n_deconv, n_exc, n_exc_frame;
  logic locked_q;
  logic [NF-1:0] act_q;
  always @(posedge clk) if (!rst) begin
    locked_q <= locked;
    act_q    <= kal_active;
    if (sel_mode == SEL_OPEN) n_open++;
    if (!ref_mux_sel) n_rawref++;
    if (dut.u_sel.align_stb) n_align_stb++;
    if (locked && !locked_q) n_lock_rise++;
    if (sel_mode == SEL_TRACK) n_track++;
    if (detune_valid) n_dec++;
    if (aff_valid && aff_adapt) n_aff_adapt++;
    if (aff_valid && !aff_adapt) n_aff_frozen++;
    if (dut.u_obs.pk_valid && dut.u_obs.pk_count != 0) n_peaks++;
    if ((kal_active & ~act_q) != 0) n_activate++;
    if ((~kal_active & act_q) != 0) n_deactivate++;
    if (kal_est_valid) n_kal_est++;
    if (kal_lms_valid) n_kal_lms++;
    if (!ff_sel && exc_valid) n_ff_aff++;
    if (dut.fft_v && dut.dec_in_ready && dut.fft_idx == '0) n_fft_frame++;
    if (dut.dc_v && dut.exc_in_ready) n_deconv++;
    if (exc_valid) n_exc++;
    if (ff_sel && kal_lms_valid) n_ff_kal++;
  end

  // ---------------- feedforward NCO monitor ----------------
  // model of the selected LMS output, and the DAC6 phase minus the nominal
  // advance of 4*fcw_ff per clock, accumulated
  longint ffy_model, ffy_hist [4];
  real ff_res, ff_prev;
  bit ff_started = 0;
  always @(posedge clk) if (!rst) begin
    real p;
    if (!ff_sel && exc_valid) ffy_model = exc;
    else if (ff_sel && kal_lms_valid) ffy_model = kal_y;
    for (int k = 3; k > 0; k--) ffy_hist[k] = ffy_hist[k-1];
    ffy_hist[0] = ffy_model;
    p = $atan2(real'(dac6[0].q), real'(dac6[0].i));
    if (ff_started) ff_res += wrap(p - ff_prev - 2.0 * PI * real'(LANES) * real'(fcw_ff) / (2.0 ** NCO_W));
    ff_prev = p;
    ff_started = dac6_valid;
  end

  // ---------------- frequency-domain path monitor ----------------
  // frames taken by the FFT; when the excitation buffer has been refilled
  // it must hold the negated frame (unit piezo response: A = 1, phi = 0)
  longint cur_frame [FFT_N], last_frame [FFT_N];
  int cur_n = 0;
  always @(posedge clk) if (!rst) begin
    if (aff_valid && dut.u_fft.in_ready) begin
      cur_frame[cur_n] = aff_y;
      cur_n++;
      if (cur_n == FFT_N) begin last_frame = cur_frame; cur_n = 0; end
    end
    if (dut.exc_frame_unused) begin
      int bad;
      bad = 0;
      for (int k = 0; k < FFT_N; k++) begin
        longint d;
        d = longint'(dut.u_exc.buffer[k]) + last_frame[k];
        if (d > EXC_TOL || d < -EXC_TOL) bad++;
      end
      n_exc_frame++;
      check(bad == 0, $sformatf("excitation frame %0d: %0d samples differ from the negated detuning frame", n_exc_frame, bad));
    end
  end

  // ---------------- cavity phase: piezo response + tone ----------------
  real h [3] = '{0.0, 0.6, -0.3};   // PH units of phase per piezo unit
  real pz [3] = '{0.0, 0.0, 0.0};
  real tone_amp = 0.0, base_phi = 100.0 * PI / 180.0, mech;
  longint tcount = 0;
  localparam int TONE_BIN = 160;    // theta = 160/(2*1024) turn per decimated sample
  always @(posedge clk) begin
    tcount++;
    mech = 0.0;
    for (int k = 0; k < 3; k++) mech += h[k] * pz[k];
    mech += tone_amp * $sin(2.0 * PI * real'(TONE_BIN) / real'(2 * NB) * real'(tcount) / real'(1 << R_LOG2));
    phi = base_phi + mech * 2.0 * PI / 65536.0;
  end
  // a new piezo excitation value for every decimated interval
  always @(posedge clk) if (detune_valid) begin
    pz[2] = pz[1]; pz[1] = pz[0];
    pz[0] = real'($urandom_range(0, 4000)) - 2000.0;
    piezo_ref <= ERR_W'($rtoi(pz[0]));
  end

  task automatic send_frame(input int c, input int a);
    for (int k = 0; k < NB; k++) begin
      int v, dk;
      dk = k - c;
      v = (a / (1 + dk * dk) > 200) ? a / (1 + dk * dk) : 200;
      spec_valid <= 1; spec_mag <= 24'(v); spec_last <= (k == NB - 1);
      @(posedge clk);
    end
    spec_valid <= 0; spec_last <= 0;
    repeat (200) @(posedge clk);
  endtask

  // measure the DAC5 lane-0 frequency in turns per clock
  task automatic measure(input int n, output real f);
    real p_prev, p, acc;
    acc = 0.0;
    @(posedge clk);
    p_prev = $atan2(real'(dac5[0].q), real'(dac5[0].i));
    for (int t = 0; t < n; t++) begin
      @(posedge clk);
      p = $atan2(real'(dac5[0].q), real'(dac5[0].i));
      acc += wrap(p - p_prev);
      p_prev = p;
    end
    f = acc / real'(n) / (2.0 * PI);
  endtask

  initial begin
    real f, expect_f, se_d, se_e, mean_d, mean_e, ss_est, res0, y0, dres, dy;
    int nd;
    fcw_ref = NCO_W'(64'd348946000);
    fcw_out = fcw_ref >> 2;
    fcw_ff  = NCO_W'(64'd87000000);
    detune_fcw = '0;
    kp = 18'sd32768; ki = 18'sd16;
    sel_mode = SEL_OPEN; ref_mux_sel = 1'b0;
    piezo_ref = '0; aff_adapt = 1; aff_mu_shift = 6'd10;
    kal_adapt = 1; kal_mu_shift = 6'd14;
    spec_valid = 0; spec_last = 0; spec_mag = '0; ff_sel = 0;
    // steady-state gains for one oscillator at theta = 10/128 turn, r = 0.951
    slot_k1 = '{18'sd0, 18'sd0, 18'sd0, 18'sd14000};
    slot_k2 = '{18'sd0, 18'sd0, 18'sd0, -18'sd3000};
    n_open = 0; n_rawref = 0; n_align_stb = 0; n_lock_rise = 0; n_track = 0; n_dec = 0;
    n_aff_adapt = 0; n_aff_frozen = 0; n_peaks = 0; n_activate = 0; n_deactivate = 0;
    n_kal_est = 0; n_kal_lms = 0; n_ff_aff = 0; n_ff_kal = 0;
    n_fft_frame = 0; n_deconv = 0; n_exc = 0; n_exc_frame = 0;
    pz_wr_en = 0; pz_wr_addr = '0; pz_wr_amp = '0; pz_wr_phase = '0; pz_amp_min = 16'd256;
    ffy_model = 0; ff_res = 0.0; ff_prev = 0.0;
    for (int k = 0; k < 4; k++) ffy_hist[k] = 0;
    repeat (10) @(posedge clk);
    rst = 0;
    // unit piezo response in every bin
    for (int k = 0; k < FFT_N; k++) begin
      pz_wr_en = 1; pz_wr_addr = FFT_LOG2N'(k); pz_wr_amp = 16'd4096; pz_wr_phase = '0;
      @(posedge clk);
    end
    pz_wr_en = 0;

    // ---- A: open loop ----
    repeat (1000) @(posedge clk);
    ref_mux_sel = 1'b1;
    repeat (1000) @(posedge clk);
    check(!locked, "locked in open loop");

    // ---- B: alignment ----
    sel_mode = SEL_ALIGN;
    repeat (1000) @(posedge clk);
    check(locked, "no lock after alignment");
    sel_mode = SEL_OPEN;

    // ---- C: feedforward paths ----
    tone_amp = 200.0;
    send_frame(TONE_BIN, 200000);
    check(kal_active == 4'b0001 && kal_peak_count == 1,
          $sformatf("peak frame: active %b count %0d", kal_active, kal_peak_count));
    // adaptation
    repeat (400 << R_LOG2) @(posedge clk);
    se_d = 0; se_e = 0; mean_d = 0; mean_e = 0; nd = 0; ss_est = 0;
    res0 = ff_res; y0 = real'(ffy_hist[3]);
    for (int s = 0; s < 200; s++) begin
      @(posedge clk iff aff_valid);
      se_e += real'(aff_e) ** 2;
      se_d += real'(detune) ** 2;
      mean_d += real'(detune);
      mean_e += real'(aff_e);
      ss_est += real'(kal_est) ** 2;
      nd++;
    end
    mean_d /= nd;
    se_d = se_d / nd - mean_d * mean_d;
    mean_e /= nd;
    se_e = se_e - real'(nd) * mean_e * mean_e;
    $display("detuning variance %f, LMS residual power %f, estimate rms %f", se_d, se_e / nd, $sqrt(ss_est / nd));
    check(se_e / nd < 0.3 * se_d, "adaptive LMS does not explain the piezo-driven detuning");
    check($sqrt(ss_est / nd) > 50.0, "Kalman estimate stays at zero");
    // the feedforward NCO phase must have moved with the selected LMS output
    dres = ff_res - res0; dy = (real'(ffy_hist[3]) - y0) * 2.0 * PI / 65536.0;
    check((wrap(dres - dy) < 0.02) && (wrap(dres - dy) > -0.02),
          $sformatf("DAC6 phase moved %f rad, LMS output asks %f rad", dres, dy));
    // frozen adaptation, then the Kalman-path LMS drives the feedforward NCO
    aff_adapt = 0;
    repeat (20 << R_LOG2) @(posedge clk);
    aff_adapt = 1;
    ff_sel = 1;
    res0 = ff_res; y0 = real'(ffy_hist[3]);
    repeat (50 << R_LOG2) @(posedge clk);
    dres = ff_res - res0; dy = (real'(ffy_hist[3]) - y0) * 2.0 * PI / 65536.0;
    check((wrap(dres - dy) < 0.02) && (wrap(dres - dy) > -0.02),
          $sformatf("DAC6 phase (Kalman path) moved %f rad, LMS output asks %f rad", dres, dy));
    // a frame without peaks switches the filter off
    send_frame(30, 1000);
    check(kal_active == 4'b0000, $sformatf("filters still active: %b", kal_active));
    tone_amp = 0.0;
    for (int k = 0; k < 3; k++) h[k] = 0.0;

    // ---- D: closed loop with 1 kHz detuning ----
    detune_fcw = NCO_W'(17476);
    sel_mode = SEL_TRACK;
    repeat (40000) @(posedge clk);
    measure(2000, f);
    expect_f = real'(fcw_ref - detune_fcw) / (2.0 ** NCO_W);
    check(((f - expect_f) < 1e-6) && ((expect_f - f) < 1e-6),
          $sformatf("tracking: DAC5 %f turns/clk, expected %f", f, expect_f));
    check(locked, "not locked while tracking");

    // ---- mechanisms ----
    $display("open %0d rawref %0d align_stb %0d lock_rise %0d track %0d dec %0d aff_adapt %0d aff_frozen %0d",
             n_open, n_rawref, n_align_stb, n_lock_rise, n_track, n_dec, n_aff_adapt, n_aff_frozen);
    $display("peaks %0d activate %0d deactivate %0d kal_est %0d kal_lms %0d ff_aff %0d ff_kal %0d",
             n_peaks, n_activate, n_deactivate, n_kal_est, n_kal_lms, n_ff_aff, n_ff_kal);
    check(n_open > 0, "open loop never ran");
    check(n_rawref > 0, "raw reference never selected");
    check(n_align_stb > 0, "no alignment strobe");
    check(n_lock_rise > 0, "lock never asserted");
    check(n_track > 0, "loop never closed");
    check(n_dec > 0, "decimator never produced a sample");
    check(n_aff_adapt > 0, "adaptive LMS never adapted");
    check(n_aff_frozen > 0, "adaptive LMS never ran frozen");
    check(n_peaks > 0, "no peak ever detected");
    check(n_activate > 0, "no Kalman filter activated");
    check(n_deactivate > 0, "no Kalman filter switched off");
    check(n_kal_est > 0, "no Kalman estimate");
    check(n_kal_lms > 0, "Kalman-path LMS never ran");
    $display("fft_frame %0d deconv %0d exc %0d exc_frame %0d", n_fft_frame, n_deconv, n_exc, n_exc_frame);
    check(n_fft_frame > 0, "FFT never produced a spectrum");
    check(n_deconv > 0, "deconvolution never produced a bin");
    check(n_exc_frame > 0, "no excitation frame reached the playback buffer");
    check(n_exc > 0, "excitation never played");
    check(n_ff_aff > 0, "feedforward NCO never fed by the inverted piezo excitation");
    check(n_ff_kal > 0, "feedforward NCO never fed by the Kalman-path LMS");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
