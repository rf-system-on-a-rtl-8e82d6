// Programmable-logic part of the RFSoC cavity controller.
//
// Three detuning/field controllers share one cavity feedback channel:
//  * Self-excited loop (sel_loop): ADC1 (cavity probe) -> phase detection
//    against a reference NCO -> PI -> output NCO -> DAC5 (cavity drive).
//  * Adaptive feedforward: the SEL phase error, i.e. the cavity detuning,
//    is decimated from 122.88 MHz to the piezo bandwidth (ddc_decimator)
//    and an LMS filter identifies the system from the piezo excitation
//    reference to that detuning. Frames of 2^FFT_LOG2N samples of the
//    identified detuning go through an FFT (fft_r2), are deconvolved by
//    the recorded piezo response (piezo_response_lut, deconvolution),
//    and return to the time domain inverted (piezo_excitation), played
//    one sample per decimated sample.
//  * Kalman observer: from spectrum frames of the detuning (supplied by
//    the processor's VNA function) the strongest microphonic peaks are
//    found and one Kalman filter is activated per peak
//    (microphonics_observer); a second LMS filter matches the estimated
//    detuning to the measured one.
// ff_sel chooses what phase-modulates the feedforward output NCO on DAC6:
// the inverted piezo excitation (0) or the Kalman-path LMS output (1).
// The phase offset is that signal in phase-error units (2^16 per turn)
// moved to the NCO's 2^31-per-turn scale.
//
// What the document gives: the three algorithms and their block chains,
// the 122.88 MHz fabric rate, 4 samples per clock to the DACs, 31-bit
// NCOs, 14-bit DAC words, ADC/DAC channel names. This design's choices:
// the sharing of one detuning signal by both feedforward paths, the LMS
// excitation input, decimation before (not after) the LMS filter, the
// phase modulation of the output NCO, all widths and sizes not in the
// document. The RF data converter, the AXI4-Stream bridge to the
// processor and the processor itself are outside this module; their
// signals are the ports.
//
// Timing: single clock domain (fabric clock), synchronous active-high
// reset. The decimated paths produce one sample every 2^DEC_LOG2R clocks.
module rfsoc_llrf_top
  import rfsoc_pkg::*;
#(
  parameter int unsigned DEC_LOG2R = 15,   // 122.88 MHz / 32768 = 3.75 kSps
  parameter int unsigned DEC_ORDER = 3,
  parameter int unsigned LMS_TAPS  = 32,
  parameter int unsigned NF        = 4,
  parameter int unsigned NBINS     = 1024,
  parameter int unsigned FF_SHIFT  = 15,
  parameter int unsigned FFT_LOG2N = 6     // 64 bins at 3.75 kSps: 58.6 Hz per bin
) (
  input  logic                    clk,
  input  logic                    rst,
  // ---- SEL control ----
  input  sel_mode_e               sel_mode,
  input  logic                    ref_mux_sel,
  input  logic [NCO_W-1:0]        fcw_ref,
  input  logic [NCO_W-1:0]        fcw_out,
  input  logic signed [17:0]      kp,
  input  logic signed [17:0]      ki,
  input  logic [PH_W-1:0]         lock_threshold,
  // ---- RF data converter ----
  input  logic                    adc1_valid,
  input  iq_t                     adc1,
  output logic                    dac5_valid,
  output dac_iq_t [LANES-1:0]     dac5,
  output logic                    dac6_valid,
  output dac_iq_t [LANES-1:0]     dac6,
  // ---- SEL status ----
  output logic                    locked,
  output logic                    phase_err_valid,
  output logic signed [ERR_W-1:0] phase_err,
  output logic signed [NCO_W-1:0] freq_corr,
  // ---- adaptive feedforward ----
  input  logic signed [ERR_W-1:0] piezo_ref,      // piezo excitation reference
  input  logic                    aff_adapt,
  input  logic [5:0]              aff_mu_shift,
  output logic                    detune_valid,   // decimated detuning
  output logic signed [ERR_W-1:0] detune,
  output logic                    aff_valid,
  output logic signed [ERR_W-1:0] aff_y,
  output logic signed [ERR_W-1:0] aff_e,
  // ---- frequency-domain path: piezo response tables, excitation ----
  input  logic                    pz_wr_en,
  input  logic [FFT_LOG2N-1:0]    pz_wr_addr,
  input  logic [15:0]             pz_wr_amp,      // Q4.12 gain
  input  logic signed [15:0]      pz_wr_phase,    // 2^16 per turn
  input  logic [15:0]             pz_amp_min,     // bins below: no excitation
  output logic                    exc_valid,      // inverted piezo excitation
  output logic signed [ERR_W-1:0] exc,
  // ---- Kalman observer ----
  input  logic                    spec_valid,
  input  logic [23:0]             spec_mag,
  input  logic                    spec_last,
  input  logic [23:0]             peak_threshold,
  input  logic signed [NF-1:0][17:0] slot_k1,
  input  logic signed [NF-1:0][17:0] slot_k2,
  input  logic                    kal_adapt,
  input  logic [5:0]              kal_mu_shift,
  output logic [NF-1:0]           kal_active,
  output logic [$clog2(NF+1)-1:0] kal_peak_count,
  output logic                    kal_est_valid,
  output logic signed [ERR_W-1:0] kal_est,
  output logic                    kal_lms_valid,
  output logic signed [ERR_W-1:0] kal_y,
  // ---- feedforward output NCO ----
  input  logic                    ff_sel,          // 0: inverted piezo excitation, 1: Kalman-path LMS
  input  logic [NCO_W-1:0]        fcw_ff
);
  // ---------------- self-excited loop ----------------
  logic signed [PH_W-1:0] pe_wrapped_unused, shift_ofs_unused;

  sel_loop u_sel (
    .clk, .rst, .mode(sel_mode), .ref_mux_sel, .fcw_ref, .fcw_out, .kp, .ki,
    .lock_threshold, .adc_valid(adc1_valid), .adc(adc1),
    .dac_valid(dac5_valid), .dac(dac5),
    .err_valid(phase_err_valid), .phase_err, .phase_err_wrapped(pe_wrapped_unused),
    .freq_corr, .shift_offset(shift_ofs_unused), .locked
  );

  // ---------------- decimation to piezo bandwidth ----------------
  ddc_decimator #(.DW(ERR_W), .LOG2R(DEC_LOG2R), .ORDER(DEC_ORDER)) u_ddc (
    .clk, .rst, .in_valid(phase_err_valid), .in_data(phase_err),
    .out_valid(detune_valid), .out_data(detune)
  );

  // ---------------- adaptive feedforward LMS ----------------
  logic aff_ready_unused;
  logic signed [ERR_W-1:0] aff_w_unused;
  lms_filter #(.TAPS(LMS_TAPS), .DW(ERR_W)) u_aff_lms (
    .clk, .rst, .clear(1'b0), .adapt(aff_adapt), .mu_shift(aff_mu_shift),
    .in_valid(detune_valid), .x(piezo_ref), .d(detune),
    .ready(aff_ready_unused), .out_valid(aff_valid), .y(aff_y), .e(aff_e),
    .w_idx('0), .w_val(aff_w_unused)
  );

  // ---------------- Kalman observer and its LMS ----------------
  logic obs_busy_unused;
  microphonics_observer #(.NF(NF), .NBINS(NBINS), .MW(24), .DW(ERR_W)) u_obs (
    .clk, .rst, .spec_valid, .spec_mag, .spec_last, .peak_threshold,
    .slot_k1, .slot_k2, .z_valid(detune_valid), .z(detune),
    .est_valid(kal_est_valid), .est(kal_est), .active(kal_active),
    .peak_count(kal_peak_count), .busy(obs_busy_unused)
  );

  // the measurement that went into the estimate, held for the LMS
  logic signed [ERR_W-1:0] detune_q;
  always_ff @(posedge clk) begin
    if (rst)               detune_q <= '0;
    else if (detune_valid) detune_q <= detune;
  end

  logic kal_ready_unused;
  logic signed [ERR_W-1:0] kal_e_unused, kal_w_unused;
  lms_filter #(.TAPS(LMS_TAPS), .DW(ERR_W)) u_kal_lms (
    .clk, .rst, .clear(1'b0), .adapt(kal_adapt), .mu_shift(kal_mu_shift),
    .in_valid(kal_est_valid), .x(kal_est), .d(detune_q),
    .ready(kal_ready_unused), .out_valid(kal_lms_valid), .y(kal_y), .e(kal_e_unused),
    .w_idx('0), .w_val(kal_w_unused)
  );

  // ---------------- frequency-domain path (Fig. 4) ----------------
  // spectrum of the identified detuning, deconvolved by the recorded piezo
  // response, back to the time domain, inverted and played at 3.75 kSps
  logic                       fft_in_ready_unused, fft_v, fft_last_unused, dec_in_ready;
  logic [FFT_LOG2N-1:0]       fft_idx, pz_addr, dc_idx_unused;
  logic signed [ERR_W-1:0]    fft_re, fft_im, dc_re, dc_im;
  logic [15:0]                pz_amp;
  logic signed [15:0]         pz_phase;
  logic                       dc_v, exc_in_ready, exc_frame_unused;

  fft_r2 #(.LOG2N(FFT_LOG2N), .DW(ERR_W)) u_fft (
    .clk, .rst, .inverse(1'b0), .in_valid(aff_valid), .in_ready(fft_in_ready_unused),
    .in_re(aff_y), .in_im('0), .out_valid(fft_v), .out_ready(dec_in_ready),
    .out_idx(fft_idx), .out_last(fft_last_unused), .out_re(fft_re), .out_im(fft_im)
  );

  piezo_response_lut #(.LOG2N(FFT_LOG2N)) u_pz_lut (
    .clk, .wr_en(pz_wr_en), .wr_addr(pz_wr_addr), .wr_amp(pz_wr_amp),
    .wr_phase(pz_wr_phase), .rd_addr(pz_addr), .rd_amp(pz_amp), .rd_phase(pz_phase)
  );

  deconvolution #(.LOG2N(FFT_LOG2N), .DW(ERR_W)) u_deconv (
    .clk, .rst, .amp_min(pz_amp_min), .in_valid(fft_v), .in_ready(dec_in_ready),
    .in_idx(fft_idx), .in_re(fft_re), .in_im(fft_im), .lut_addr(pz_addr),
    .lut_amp(pz_amp), .lut_phase(pz_phase), .out_valid(dc_v), .out_ready(exc_in_ready),
    .out_idx(dc_idx_unused), .out_re(dc_re), .out_im(dc_im)
  );

  piezo_excitation #(.LOG2N(FFT_LOG2N), .DW(ERR_W)) u_exc (
    .clk, .rst, .in_valid(dc_v), .in_ready(exc_in_ready), .in_re(dc_re), .in_im(dc_im),
    .tick(detune_valid), .exc_valid, .exc, .frame_done(exc_frame_unused)
  );

  // ---------------- feedforward output NCO ----------------
  logic signed [ERR_W-1:0] ff_y;
  always_ff @(posedge clk) begin
    if (rst) ff_y <= '0;
    else if (!ff_sel && exc_valid)    ff_y <= exc;
    else if (ff_sel && kal_lms_valid) ff_y <= kal_y;
  end

  logic signed [LANES-1:0][IQ_W-1:0] ff_i, ff_q;
  logic [NCO_W-1:0] ff_ph_unused;
  nco #(.PHASE_W(NCO_W), .LANES(LANES), .OUT_W(IQ_W)) u_ff_nco (
    .clk, .rst, .en(1'b1), .fcw(fcw_ff), .phase_ofs(NCO_W'(ff_y) << FF_SHIFT),
    .i_o(ff_i), .q_o(ff_q), .phase0_o(ff_ph_unused), .valid_o(dac6_valid)
  );
  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      dac6[k].i = ff_i[k][IQ_W-1 -: DAC_W];
      dac6[k].q = ff_q[k][IQ_W-1 -: DAC_W];
    end
  end
endmodule
