// Phase unwrapping: turns a wrapped phase (one turn = 2^PH_W) into a
// continuous phase of UNW_W bits.
//
// The difference between consecutive wrapped samples is taken modulo one
// turn, i.e. as a signed PH_W-bit number in [-pi, pi), and added to the
// unwrapped accumulator. A jump across +-pi therefore continues into the
// next period instead of stepping back by 2*pi. This is valid while the
// true phase moves by less than half a turn between samples. The document
// gives the function (extend the phase across the 2*pi boundary into a new
// period); the difference-and-accumulate form is this design's choice.
//
// Timing: one sample per clock, result registered, latency 1 clock. The
// first sample after reset (or clear) loads the accumulator with its own
// sign-extended value.
module phase_unwrap #(
  parameter int unsigned PH_W  = 16,
  parameter int unsigned UNW_W = 32
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    clear,      // restart from the next sample
  input  logic                    in_valid,
  input  logic signed [PH_W-1:0]  phase_in,
  output logic                    out_valid,
  output logic signed [UNW_W-1:0] phase_out
);
  logic signed [PH_W-1:0] prev;
  logic                   have_prev;
  logic signed [PH_W-1:0] step;

  assign step = phase_in - prev;  // modulo one turn

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      have_prev <= 1'b0;
      prev      <= '0;
      phase_out <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        prev      <= phase_in;
        have_prev <= 1'b1;
        phase_out <= have_prev ? phase_out + UNW_W'(step) : UNW_W'(phase_in);
      end
    end
  end
endmodule
