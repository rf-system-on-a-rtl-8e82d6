// Behavioural cavity/loop-back model for testbenches (not synthesizable).
//
// Takes lane 0 of the controller's DAC output, delays it by DELAY clocks
// (converter and cable latency), rotates it by a phase phi0 plus an
// accumulated detuning phase (detune_fcw added every clock, 2^31 = one
// turn) and returns it as the ADC sample, scaled back to 16 bits. A
// frequency detuning of the cavity thus appears as a steadily turning
// feedback phase that the self-excited loop has to follow.
module cavity_model
  import rfsoc_pkg::*;
#(
  parameter int unsigned DELAY = 8
) (
  input  logic                clk,
  input  dac_iq_t             dac0,
  input  logic                dac_valid,
  input  logic [NCO_W-1:0]    detune_fcw,
  input  real                 phi0,       // radians
  output iq_t                 adc,
  output logic                adc_valid
);
  localparam real PI = 3.14159265358979323846;
  dac_iq_t          dl [DELAY];
  logic [DELAY-1:0] vl = '0;
  logic [NCO_W-1:0] cav_ph = '0;

  initial for (int k = 0; k < DELAY; k++) dl[k] = '0;

  always @(posedge clk) begin
    real ph, xi, xq;
    dl[0] <= dac0;
    vl[0] <= dac_valid;
    for (int k = 1; k < DELAY; k++) begin
      dl[k] <= dl[k-1];
      vl[k] <= vl[k-1];
    end
    cav_ph <= cav_ph + detune_fcw;
    ph = phi0 + 2.0 * PI * real'(cav_ph) / (2.0 ** NCO_W);
    xi = real'(dl[DELAY-1].i) * 3.99;
    xq = real'(dl[DELAY-1].q) * 3.99;
    adc.i     <= IQ_W'($rtoi(xi * $cos(ph) - xq * $sin(ph)));
    adc.q     <= IQ_W'($rtoi(xi * $sin(ph) + xq * $cos(ph)));
    adc_valid <= vl[DELAY-1];
  end
endmodule
