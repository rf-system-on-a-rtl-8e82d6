// Shared widths, types and constants of the RFSoC cavity controller.
//
// The programmable logic runs at the 122.88 MHz fabric/AXI clock. ADC
// samples arrive as one 16-bit I/Q pair per clock; each DAC channel takes
// four I/Q pairs per clock (the converter interpolates by 8 to reach
// 3932.16 MSps). Phases are two's-complement fractions of a turn: a PH_W-bit
// phase covers [-pi, pi), so wrap-around at +-pi is plain integer overflow.
// The 31-bit NCO phase width, the 4 samples per clock, the 14-bit DAC range
// and the 122.88 MHz clock follow the document; the other widths are this
// design's choice.
package rfsoc_pkg;
  localparam int unsigned IQ_W     = 16;  // ADC sample width per component
  localparam int unsigned DAC_W    = 14;  // DAC full scale
  localparam int unsigned NCO_W    = 31;  // NCO phase accumulator width
  localparam int unsigned LANES    = 4;   // samples per clock towards the DAC
  localparam int unsigned PH_W     = 16;  // wrapped phase width (one turn)
  localparam int unsigned UNW_W    = 32;  // unwrapped phase width
  localparam int unsigned ERR_W    = 24;  // phase error width

  typedef struct packed {
    logic signed [IQ_W-1:0] i;
    logic signed [IQ_W-1:0] q;
  } iq_t;

  typedef struct packed {
    logic signed [DAC_W-1:0] i;
    logic signed [DAC_W-1:0] q;
  } dac_iq_t;

  // 36 degrees in PH_W-bit phase units: 36/360 * 2^16
  localparam logic [PH_W-1:0] PHASE_36DEG = 16'd6554;

  // SEL operating modes
  typedef enum logic [1:0] {
    SEL_OPEN  = 2'd0,  // output NCO free-running at its base frequency
    SEL_ALIGN = 2'd1,  // phase shifter aligns reference to resonator phase
    SEL_TRACK = 2'd2   // PI loop closed, phase shifter frozen
  } sel_mode_e;
endpackage
