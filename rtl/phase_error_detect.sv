// Phase error detection of the self-excited loop.
//
// The error is the corrected reference phase minus the cavity feedback
// phase, both unwrapped. The unwrapped phases themselves wrap around
// their UNW_W-bit range (a 19.97 MHz carrier covers 2^15 turns in about
// 3 ms), at slightly different moments for the two channels, so their
// difference is taken modulo 2^UNW_W; it is exact while the true
// difference stays below 2^(UNW_W-1) phase units. The difference is reduced to ERR_W bits with
// saturation, so a large transient does not wrap into a small error of
// the wrong sign. The two unwrappers start independently, so their
// difference may begin a whole number of turns away from the true phase
// difference; on the first pair after reset or clear the block therefore
// stores the whole-turn correction that brings that first difference into
// [-pi, pi) and adds it to every later difference. err_wrapped is the
// difference modulo one turn, used by the phase alignment and the lock
// detector. The document defines the error as the difference of the two
// phases; the turn correction, the saturation and the widths are this
// design's choice.
//
// Timing: inputs must arrive on the same clock with both valids high;
// error is registered, latency 1 clock.
module phase_error_detect #(
  parameter int unsigned UNW_W = 32,
  parameter int unsigned PH_W  = 16,
  parameter int unsigned ERR_W = 24
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    clear,       // restart the turn correction
  input  logic                    ref_valid,
  input  logic signed [UNW_W-1:0] ref_phase,
  input  logic                    fb_valid,
  input  logic signed [UNW_W-1:0] fb_phase,
  output logic                    err_valid,
  output logic signed [ERR_W-1:0] err,         // saturated unwrapped difference
  output logic signed [PH_W-1:0]  err_wrapped  // difference modulo one turn
);
  localparam logic signed [UNW_W+1:0] MAXV = (UNW_W+2)'((1 << (ERR_W - 1)) - 1);
  localparam logic signed [UNW_W+1:0] MINV = -(UNW_W+2)'(1 << (ERR_W - 1));

  logic signed [UNW_W+1:0] raw, diff, corr, corr_now;
  logic                  need_init;
  always_comb begin
    raw      = (UNW_W+2)'($signed(UNW_W'(ref_phase - fb_phase)));
    corr_now = need_init ? (UNW_W+2)'($signed(raw[PH_W-1:0])) - raw : corr;
    diff     = raw + corr_now;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      need_init   <= 1'b1;
      corr        <= '0;
      err_valid   <= 1'b0;
      err         <= '0;
      err_wrapped <= '0;
    end else begin
      err_valid <= ref_valid && fb_valid;
      if (ref_valid && fb_valid) begin
        need_init <= 1'b0;
        corr      <= corr_now;
        if (diff > MAXV)      err <= MAXV[ERR_W-1:0];
        else if (diff < MINV) err <= MINV[ERR_W-1:0];
        else                  err <= diff[ERR_W-1:0];
        err_wrapped <= diff[PH_W-1:0];
      end
    end
  end
endmodule
