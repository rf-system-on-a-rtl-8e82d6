// Proportional-integral controller of the self-excited loop.
//
// On each valid error sample e:
//   integ <= sat(integ + ki*e)
//   u     <= sat_OUT_W((kp*e + integ + ki*e) >>> SHIFT)
// kp and ki are run-time signed gains, SHIFT a fixed binary scale, so the
// effective gains are kp/2^SHIFT and ki/2^SHIFT per sample. The integrator
// saturates (anti-windup) and the output saturates to OUT_W bits. With en
// low the integrator is cleared and u is 0, which opens the loop. The
// document specifies a PI controller with proportional and integral
// coefficients; the fixed-point form, saturation and widths are this
// design's choice. The output is used as a correction of an NCO frequency
// control word.
//
// Timing: latency 1 clock from err_valid to u_valid.
module pi_controller #(
  parameter int unsigned ERR_W = 24,
  parameter int unsigned K_W   = 18,
  parameter int unsigned OUT_W = 31,
  parameter int unsigned SHIFT = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic signed [K_W-1:0]   kp,
  input  logic signed [K_W-1:0]   ki,
  input  logic                    err_valid,
  input  logic signed [ERR_W-1:0] err,
  output logic                    u_valid,
  output logic signed [OUT_W-1:0] u
);
  localparam int unsigned PW = ERR_W + K_W;      // product width
  localparam int unsigned AW = PW + 8;           // accumulator width
  localparam logic signed [AW-1:0] IMAX = AW'(1) <<< (AW - 2);
  localparam logic signed [AW-1:0] IMIN = -IMAX;
  localparam logic signed [AW-1:0] UMAX = (AW'(1) <<< (OUT_W - 1)) - 1;
  localparam logic signed [AW-1:0] UMIN = -(AW'(1) <<< (OUT_W - 1));

  logic signed [AW-1:0] integ, integ_next, p_term, i_term, sum, scaled;

  always_comb begin
    p_term = AW'(err) * AW'(kp);
    i_term = AW'(err) * AW'(ki);
    integ_next = integ + i_term;
    if (integ_next > IMAX) integ_next = IMAX;
    if (integ_next < IMIN) integ_next = IMIN;
    sum    = p_term + integ_next;
    scaled = sum >>> SHIFT;
  end

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      integ   <= '0;
      u       <= '0;
      u_valid <= 1'b0;
    end else begin
      u_valid <= err_valid;
      if (err_valid) begin
        integ <= integ_next;
        if (scaled > UMAX)      u <= UMAX[OUT_W-1:0];
        else if (scaled < UMIN) u <= UMIN[OUT_W-1:0];
        else                    u <= scaled[OUT_W-1:0];
      end
    end
  end
endmodule
