// Closed-loop test of the self-excited loop against a cavity model.
//
// Sequence: open loop with a 100-degree cavity phase offset (must not be
// locked), alignment (phase shifter takes up the offset, lock must come),
// tracking with a 1 kHz cavity detuning and then a detuning step to
// -2 kHz. In each tracking phase the DAC output frequency is measured
// from the DAC samples with real-valued atan2, independently of the RTL,
// and must equal reference frequency minus detuning; the four DAC lanes
// must be consecutive samples of that tone; the loop must be locked.
module tb_sel_loop;
  import rfsoc_pkg::*;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst = 1;
  always #4 clk = ~clk;

  sel_mode_e mode;
  logic ref_mux_sel;
  logic [NCO_W-1:0] fcw_ref, fcw_out, detune;
  logic signed [17:0] kp, ki;
  logic adc_valid, dac_valid, err_valid, locked;
  iq_t adc;
  dac_iq_t [LANES-1:0] dac;
  logic signed [ERR_W-1:0] phase_err;
  logic signed [PH_W-1:0] pe_w, shift_offset;
  logic signed [NCO_W-1:0] freq_corr;

  sel_loop dut (
    .clk, .rst, .mode, .ref_mux_sel, .fcw_ref, .fcw_out, .kp, .ki,
    .lock_threshold(PHASE_36DEG), .adc_valid, .adc, .dac_valid, .dac,
    .err_valid, .phase_err, .phase_err_wrapped(pe_w), .freq_corr, .shift_offset,
    .locked
  );

  cavity_model #(.DELAY(8)) cav (
    .clk, .dac0(dac[0]), .dac_valid, .detune_fcw(detune), .phi0(100.0 * PI / 180.0),
    .adc, .adc_valid
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

  // measure the lane-0 DAC frequency (turns per clock) over n clocks
  task automatic measure(input int n, output real turns_per_clk, output real lane_err);
    real p_prev, p, acc, le;
    acc = 0.0; le = 0.0;
    @(posedge clk);
    p_prev = $atan2(real'(dac[0].q), real'(dac[0].i));
    for (int t = 0; t < n; t++) begin
      @(posedge clk);
      p = $atan2(real'(dac[0].q), real'(dac[0].i));
      acc += wrap(p - p_prev);
      p_prev = p;
      for (int k = 1; k < LANES; k++) begin
        real d;
        d = wrap($atan2(real'(dac[k].q), real'(dac[k].i))
               - $atan2(real'(dac[k-1].q), real'(dac[k-1].i)));
        le = (d - acc / real'(t + 1) / LANES) > le ? (d - acc / real'(t + 1) / LANES) : le;
      end
    end
    turns_per_clk = acc / real'(n) / (2.0 * PI);
    lane_err = le;
  endtask

  initial begin
    real f, le, expect_f;
    fcw_ref = NCO_W'(64'd348946000);       // ~19.967 MHz at 122.88 MHz
    fcw_out = fcw_ref >> 2;                  // four lanes per clock
    detune  = '0;
    kp = 18'sd32768; ki = 18'sd16;
    mode = SEL_OPEN; ref_mux_sel = 1'b1;
    repeat (10) @(posedge clk);
    rst = 0;

    // open loop: constant 100-degree error, no lock
    repeat (2000) @(posedge clk);
    check(!locked, "locked in open loop with 100 degree offset");
    check(pe_w > $signed(16'd17000) || pe_w < -$signed(16'd17000),
          $sformatf("open-loop error %0d not near +-100 degrees", pe_w));

    // alignment
    mode = SEL_ALIGN;
    repeat (1000) @(posedge clk);
    check(locked, "no lock after alignment");
    check(pe_w < 16'sd200 && pe_w > -16'sd200, $sformatf("residual error %0d after alignment", pe_w));

    // tracking with +1 kHz cavity detuning
    detune = NCO_W'(17476);
    mode = SEL_TRACK;
    repeat (40000) @(posedge clk);
    measure(2000, f, le);
    expect_f = real'(fcw_ref - detune) / (2.0 ** NCO_W);
    check(((f - expect_f) < 1e-6) && ((expect_f - f) < 1e-6),
          $sformatf("tracking: DAC %f turns/clk, expected %f", f, expect_f));
    check(le < 0.01, $sformatf("lane spacing error %f rad", le));
    check(locked, "not locked while tracking +1 kHz");
    check(freq_corr < 0, "PI correction has wrong sign for positive detuning");

    // detuning step to -2 kHz
    detune = NCO_W'(-34952);
    repeat (40000) @(posedge clk);
    measure(2000, f, le);
    expect_f = real'(fcw_ref - detune) / (2.0 ** NCO_W);
    check(((f - expect_f) < 1e-6) && ((expect_f - f) < 1e-6),
          $sformatf("after step: DAC %f turns/clk, expected %f", f, expect_f));
    check(locked, "not locked after detuning step");
    check(phase_err < 24'sd400 && phase_err > -24'sd400, $sformatf("steady error %0d", phase_err));

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
