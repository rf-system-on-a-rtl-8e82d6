// Numerically controlled oscillator with several samples per clock.
//
// A PHASE_W-bit accumulator advances by LANES*fcw every clock; lane k
// reads the sine/cosine table at phase acc + k*fcw + phase_ofs, so the
// LANES outputs of one clock are LANES consecutive samples of one tone.
// With LANES=1 at 122.88 MHz and PHASE_W=31 one step of fcw is
// 122.88e6/2^31 = 0.057 Hz and 0.1 Hz is 1.7476 steps, as in the document.
// The four lanes per DAC channel also follow the document; the table
// (2^LUT_AW entries of cos, sine read a quarter turn later, phase
// truncated to the top LUT_AW bits, no dithering) is this design's choice.
//
// Timing: fcw/phase_ofs sampled on clk; the phase register and the table
// read are both registered, so outputs follow an input change after 2
// clocks. valid_o is en delayed by 2. Synchronous active-high reset clears
// the accumulator.
module nco #(
  parameter int unsigned PHASE_W = 31,
  parameter int unsigned LANES   = 4,
  parameter int unsigned LUT_AW  = 12,
  parameter int unsigned OUT_W   = 16,
  parameter int unsigned AMP     = (1 << (OUT_W - 1)) - 1
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            en,
  input  logic [PHASE_W-1:0]              fcw,        // phase step per sample
  input  logic [PHASE_W-1:0]              phase_ofs,  // static phase offset
  output logic signed [LANES-1:0][OUT_W-1:0] i_o,     // cos, lane 0 = earliest
  output logic signed [LANES-1:0][OUT_W-1:0] q_o,     // sin
  output logic [PHASE_W-1:0]              phase0_o,   // lane-0 phase of i_o/q_o
  output logic                            valid_o
);
  localparam int unsigned N = 1 << LUT_AW;

  logic signed [OUT_W-1:0] cos_lut [N];
  logic [PHASE_W-1:0] acc;
  logic [LANES-1:0][PHASE_W-1:0] ph;
  logic [PHASE_W-1:0] ph0_d;
  logic [1:0] vld;

  // cos(2*pi*n/N) scaled to AMP, rounded to nearest
  initial begin
    for (int n = 0; n < N; n++) begin
      real v;
      v = $cos(2.0 * 3.14159265358979323846 * real'(n) / real'(N)) * real'(AMP);
      cos_lut[n] = OUT_W'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0;
      ph  <= '0;
      vld <= '0;
    end else begin
      vld <= {vld[0], en};
      if (en) begin
        acc <= acc + PHASE_W'(LANES) * fcw;
        for (int k = 0; k < LANES; k++)
          ph[k] <= acc + PHASE_W'(k) * fcw + phase_ofs;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < LANES; k++) begin
      logic [LUT_AW-1:0] a;
      a = ph[k][PHASE_W-1 -: LUT_AW];
      i_o[k] <= cos_lut[a];
      q_o[k] <= cos_lut[a - LUT_AW'(N / 4)];
    end
    ph0_d <= ph[0];
  end

  assign phase0_o = ph0_d;
  assign valid_o  = vld[1];
endmodule
