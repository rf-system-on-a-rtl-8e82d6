// Self-excited loop with a fast modulation of the cavity resonance.
//
// The cavity model's phase carries a 1.2288 MHz sinusoidal modulation
// (100 clocks per period, 10 degrees amplitude) on top of a static
// offset. After alignment the loop tracks with the same gains as the
// closed-loop test. The loop bandwidth is far below 1.2288 MHz, so the
// loop cannot follow the modulation and it appears in full in the phase
// error: the SEL measures it. The phase error is analysed over 65536
// samples, a resolution bandwidth of 122.88 MHz / 65536 = 1.875 kHz, with
// single-bin DFTs computed here: the 1.2288 MHz bin must hold the
// modulation amplitude within 10 %, bins 20 and 200 resolution bandwidths
// away must be 30 times smaller, and the loop must stay locked (10 degrees
// is inside the 36 degree window) for the whole record.
module tb_sel_modulation;
  import rfsoc_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int NREC = 65536;              // 1.875 kHz resolution bandwidth
  localparam real AMP_DEG = 10.0;
  localparam int PERIOD = 100;               // 122.88 MHz / 100 = 1.2288 MHz

  logic clk = 0, rst = 1;
  always #4 clk = ~clk;

  sel_mode_e mode;
  logic ref_mux_sel;
  logic [NCO_W-1:0] fcw_ref, fcw_out, detune = '0;
  logic signed [17:0] kp, ki;
  logic adc_valid, dac_valid, err_valid, locked;
  iq_t adc;
  dac_iq_t [LANES-1:0] dac;
  logic signed [ERR_W-1:0] phase_err;
  logic signed [PH_W-1:0] pe_w, shift_offset;
  logic signed [NCO_W-1:0] freq_corr;
  real phi = 100.0 * PI / 180.0, mod_amp = 0.0;
  longint tcount = 0;

  sel_loop dut (
    .clk, .rst, .mode, .ref_mux_sel, .fcw_ref, .fcw_out, .kp, .ki,
    .lock_threshold(PHASE_36DEG), .adc_valid, .adc, .dac_valid, .dac,
    .err_valid, .phase_err, .phase_err_wrapped(pe_w), .freq_corr, .shift_offset,
    .locked
  );

  cavity_model #(.DELAY(8)) cav (
    .clk, .dac0(dac[0]), .dac_valid, .detune_fcw(detune), .phi0(phi),
    .adc, .adc_valid
  );

  always @(posedge clk) begin
    tcount++;
    phi = 100.0 * PI / 180.0 + mod_amp * $sin(2.0 * PI * real'(tcount) / real'(PERIOD));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // single-bin DFT amplitudes at three frequencies (cycles per sample)
  real fr [3], cr [3], ci [3];
  int unlocked = 0, nrec = 0;
  bit recording = 0;
  always @(posedge clk) if (recording && err_valid && nrec < NREC) begin
    for (int b = 0; b < 3; b++) begin
      cr[b] += real'(phase_err) * $cos(2.0 * PI * fr[b] * real'(nrec));
      ci[b] += real'(phase_err) * $sin(2.0 * PI * fr[b] * real'(nrec));
    end
    if (!locked) unlocked++;
    nrec++;
  end

  initial begin
    real a [3], expected;
    fcw_ref = NCO_W'(64'd348946000);
    fcw_out = fcw_ref >> 2;
    kp = 18'sd32768; ki = 18'sd16;
    mode = SEL_OPEN; ref_mux_sel = 1'b1;
    // exactly 1.2288 MHz, and 20 and 200 resolution bandwidths away (a
    // rectangular window leaks 1/(pi*20) = 1.6 % at 20 RBW)
    fr[0] = 1.0 / real'(PERIOD);
    fr[1] = fr[0] + 20.0 / real'(NREC);
    fr[2] = fr[0] - 200.0 / real'(NREC);
    for (int b = 0; b < 3; b++) begin cr[b] = 0.0; ci[b] = 0.0; end
    repeat (10) @(posedge clk);
    rst = 0;
    repeat (1000) @(posedge clk);
    mode = SEL_ALIGN;
    repeat (1000) @(posedge clk);
    check(locked, "no lock after alignment");
    mode = SEL_TRACK;
    repeat (5000) @(posedge clk);
    mod_amp = AMP_DEG * PI / 180.0;
    repeat (2000) @(posedge clk);
    recording = 1;
    wait (nrec == NREC);
    for (int b = 0; b < 3; b++) a[b] = 2.0 * $sqrt(cr[b] ** 2 + ci[b] ** 2) / real'(NREC);
    expected = AMP_DEG / 360.0 * 65536.0;
    $display("modulation bin %.1f (expected %.1f), +20 RBW %.2f, -200 RBW %.2f, unlocked samples %0d",
             a[0], expected, a[1], a[2], unlocked);
    check(a[0] > 0.9 * expected && a[0] < 1.1 * expected,
          $sformatf("1.2288 MHz component %.1f, modulation %.1f", a[0], expected));
    check(a[1] < expected / 30.0, "leakage 20 RBW away from the modulation");
    check(a[2] < expected / 30.0, "leakage 200 RBW away from the modulation");
    check(unlocked == 0, $sformatf("lock lost for %0d samples", unlocked));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
