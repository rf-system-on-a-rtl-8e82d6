// Self-excited loop (SEL): digital phase-locked drive of an SRF cavity.
//
// A reference NCO (one sample per clock) sets the frequency the cavity is
// to follow. Its I/Q passes a phase shifter (phase_corrector) and a 2:1
// multiplexer that picks the shifted (1) or the raw (0) reference. The
// phases of the reference and of the cavity feedback from the ADC are
// each found with a CORDIC atan2 and unwrapped; their difference is the
// phase error. A PI controller turns the error into a correction of the
// frequency word of the output NCO, which generates four I/Q pairs per
// clock for the DAC. A lock detector watches the wrapped error.
//
// Operating sequence (mode input, see rfsoc_pkg::sel_mode_e):
//   SEL_OPEN  - output NCO at fcw_out, PI cleared, shifter held.
//   SEL_ALIGN - every ALIGN_PERIOD clocks the shifter takes up the measured
//               error, so the reference phase is brought onto the resonator
//               phase; the PI stays off.
//   SEL_TRACK - the shifter is frozen, both unwrappers restart (so no
//               turns gathered while open are fed to the PI), and the PI
//               loop is closed: the output frequency follows the resonator.
// The block chain, the 31-bit NCOs, four NCO lanes per output channel,
// the 36-degree acceptable match and the absence of an amplitude limiter
// (the DAC range limits) follow the document. The sequencing, widths and
// the use of the PI output as a frequency-word correction of the output
// NCO are this design's choices. The DAC words are the top DAC_W bits of
// the 16-bit NCO samples.
//
// Frequency convention: the reference NCO advances fcw_ref per clock, the
// output NCO lane 0 advances LANES*fcw per clock, so the loop settles at
// LANES*(fcw_out + u) = fcw_ref modulo 2^31 as seen by a feedback sampled
// once per clock.
//
// Timing: the phase error is valid one clock after both phases; all paths
// are fully pipelined at one sample per clock.
module sel_loop
  import rfsoc_pkg::*;
#(
  parameter int unsigned ITER         = 16,
  parameter int unsigned PI_SHIFT     = 12,
  parameter int unsigned LOCK_HOLD    = 64,
  parameter int unsigned ALIGN_PERIOD = 64
) (
  input  logic                    clk,
  input  logic                    rst,
  input  sel_mode_e               mode,
  input  logic                    ref_mux_sel,    // 1: shifted reference
  input  logic [NCO_W-1:0]        fcw_ref,
  input  logic [NCO_W-1:0]        fcw_out,
  input  logic signed [17:0]      kp,
  input  logic signed [17:0]      ki,
  input  logic [PH_W-1:0]         lock_threshold,
  input  logic                    adc_valid,
  input  iq_t                     adc,
  output logic                    dac_valid,
  output dac_iq_t [LANES-1:0]     dac,
  output logic                    err_valid,
  output logic signed [ERR_W-1:0] phase_err,      // unwrapped, saturated
  output logic signed [PH_W-1:0]  phase_err_wrapped,
  output logic signed [NCO_W-1:0] freq_corr,      // PI output
  output logic signed [PH_W-1:0]  shift_offset,
  output logic                    locked
);
  // ---------------- reference NCO and phase shifter ----------------
  logic signed [0:0][IQ_W-1:0] ref_i, ref_q;
  logic ref_v;
  logic [NCO_W-1:0] ref_ph0_unused;

  nco #(.PHASE_W(NCO_W), .LANES(1), .OUT_W(IQ_W)) u_ref_nco (
    .clk, .rst, .en(1'b1), .fcw(fcw_ref), .phase_ofs('0),
    .i_o(ref_i), .q_o(ref_q), .phase0_o(ref_ph0_unused), .valid_o(ref_v)
  );

  logic align_stb;
  logic pe_valid;
  logic signed [ERR_W-1:0] pe;
  logic signed [PH_W-1:0]  pe_w;
  logic corr_v;
  logic signed [IQ_W-1:0] corr_i, corr_q;

  phase_corrector #(.IN_W(IQ_W), .PH_W(PH_W), .ITER(ITER)) u_corr (
    .clk, .rst, .in_valid(ref_v), .in_i(ref_i[0]), .in_q(ref_q[0]),
    .align(align_stb), .err_valid(pe_valid), .err_wrapped(pe_w),
    .offset(shift_offset), .out_valid(corr_v), .out_i(corr_i), .out_q(corr_q)
  );

  // reference selector (the multiplexer of the SEL block diagram)
  logic                   mux_v;
  logic signed [IQ_W-1:0] mux_i, mux_q;
  always_comb begin
    if (ref_mux_sel) begin
      mux_v = corr_v;  mux_i = corr_i;    mux_q = corr_q;
    end else begin
      mux_v = ref_v;   mux_i = ref_i[0];  mux_q = ref_q[0];
    end
  end

  // ---------------- phase detection ----------------
  logic ref_ph_v, fb_ph_v;
  logic signed [PH_W-1:0] ref_ph, fb_ph;

  cordic_atan2 #(.IN_W(IQ_W), .PH_W(PH_W), .ITER(ITER)) u_atan_ref (
    .clk, .rst, .in_valid(mux_v), .in_i(mux_i), .in_q(mux_q),
    .out_valid(ref_ph_v), .phase(ref_ph)
  );
  cordic_atan2 #(.IN_W(IQ_W), .PH_W(PH_W), .ITER(ITER)) u_atan_fb (
    .clk, .rst, .in_valid(adc_valid), .in_i(adc.i), .in_q(adc.q),
    .out_valid(fb_ph_v), .phase(fb_ph)
  );

  // restart the unwrappers when the loop is closed
  sel_mode_e mode_q;
  logic      unwrap_clear;
  always_ff @(posedge clk) begin
    if (rst) mode_q <= SEL_OPEN;
    else     mode_q <= mode;
  end
  assign unwrap_clear = (mode == SEL_TRACK) && (mode_q != SEL_TRACK);

  logic ref_uw_v, fb_uw_v;
  logic signed [UNW_W-1:0] ref_uw, fb_uw;
  phase_unwrap #(.PH_W(PH_W), .UNW_W(UNW_W)) u_unwrap_ref (
    .clk, .rst, .clear(unwrap_clear), .in_valid(ref_ph_v), .phase_in(ref_ph),
    .out_valid(ref_uw_v), .phase_out(ref_uw)
  );
  phase_unwrap #(.PH_W(PH_W), .UNW_W(UNW_W)) u_unwrap_fb (
    .clk, .rst, .clear(unwrap_clear), .in_valid(fb_ph_v), .phase_in(fb_ph),
    .out_valid(fb_uw_v), .phase_out(fb_uw)
  );

  phase_error_detect #(.UNW_W(UNW_W), .PH_W(PH_W), .ERR_W(ERR_W)) u_ped (
    .clk, .rst, .clear(unwrap_clear), .ref_valid(ref_uw_v), .ref_phase(ref_uw),
    .fb_valid(fb_uw_v), .fb_phase(fb_uw),
    .err_valid(pe_valid), .err(pe), .err_wrapped(pe_w)
  );

  // ---------------- alignment strobes ----------------
  localparam int unsigned AW = $clog2(ALIGN_PERIOD);
  logic [AW-1:0] align_cnt;
  always_ff @(posedge clk) begin
    if (rst || mode != SEL_ALIGN) align_cnt <= '0;
    else                          align_cnt <= align_cnt + 1'b1;
  end
  assign align_stb = (mode == SEL_ALIGN) && (align_cnt == AW'(ALIGN_PERIOD - 1));

  // ---------------- PI controller and output NCO ----------------
  logic u_v_unused;
  pi_controller #(.ERR_W(ERR_W), .K_W(18), .OUT_W(NCO_W), .SHIFT(PI_SHIFT)) u_pi (
    .clk, .rst, .en(mode == SEL_TRACK), .kp, .ki,
    .err_valid(pe_valid), .err(pe), .u_valid(u_v_unused), .u(freq_corr)
  );

  logic signed [LANES-1:0][IQ_W-1:0] out_i, out_q;
  logic [NCO_W-1:0] out_ph0_unused;
  nco #(.PHASE_W(NCO_W), .LANES(LANES), .OUT_W(IQ_W)) u_out_nco (
    .clk, .rst, .en(1'b1), .fcw(fcw_out + NCO_W'(freq_corr)), .phase_ofs('0),
    .i_o(out_i), .q_o(out_q), .phase0_o(out_ph0_unused), .valid_o(dac_valid)
  );

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      dac[k].i = out_i[k][IQ_W-1 -: DAC_W];
      dac[k].q = out_q[k][IQ_W-1 -: DAC_W];
    end
  end

  phase_lock_detect #(.PH_W(PH_W), .HOLD(LOCK_HOLD)) u_lock (
    .clk, .rst, .err_valid(pe_valid), .err(pe_w), .threshold(lock_threshold),
    .locked
  );

  assign err_valid         = pe_valid;
  assign phase_err         = pe;
  assign phase_err_wrapped = pe_w;
endmodule
