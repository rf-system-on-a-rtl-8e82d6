// Adaptive LMS FIR filter in system-identification mode.
//
// For each input pair (x = excitation, d = observed response) the filter
//   1. shifts x into a TAPS-long delay line,
//   2. computes y = sum_k w[k]*x[n-k] >>> FRAC (one tap per clock),
//   3. forms the error e = d - y,
//   4. if adapt is set, updates w[k] += (e*x[n-k]) >>> mu_shift (one tap
//      per clock).
// When e stays near zero, w holds the impulse response of the unknown
// system from x to d; with adapt low the block is a plain FIR with those
// weights. The number of taps and the step size (here 2^-mu_shift) are
// the two tuning parameters the document names; the sequential single-
// multiplier form, the widths and the saturation are this design's
// choices, suited to the kHz sample rate of the piezo path.
//
// Interface: in_valid is accepted when ready is high; y/e are valid for
// one clock (out_valid) 2*TAPS+2 clocks after the input (TAPS+2 with adapt
// low). Weights are signed WW-bit, FRAC fractional bits; clear zeroes them.
// w_idx/w_val read one weight combinationally for monitoring.
module lms_filter #(
  parameter int unsigned TAPS = 32,
  parameter int unsigned DW   = 18,
  parameter int unsigned WW   = 24,
  parameter int unsigned FRAC = 16
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      clear,
  input  logic                      adapt,
  input  logic [5:0]                mu_shift,
  input  logic                      in_valid,
  input  logic signed [DW-1:0]      x,
  input  logic signed [DW-1:0]      d,
  output logic                      ready,
  output logic                      out_valid,
  output logic signed [DW-1:0]      y,
  output logic signed [DW-1:0]      e,
  input  logic [$clog2(TAPS)-1:0]   w_idx,
  output logic signed [WW-1:0]      w_val
);
  localparam int unsigned IW  = $clog2(TAPS);
  localparam int unsigned PW  = DW + WW;
  localparam int unsigned ACW = PW + IW + 1;

  typedef enum logic [1:0] {IDLE, FILT, ERR, UPD} state_e;
  state_e state;

  logic signed [DW-1:0] xd [TAPS];
  logic signed [WW-1:0] w  [TAPS];
  logic signed [DW-1:0] d_q;
  logic [IW-1:0]        k;
  logic signed [ACW-1:0] acc;

  function automatic logic signed [DW-1:0] sat_dw(input logic signed [ACW-1:0] v);
    if (v > ACW'((1 <<< (DW - 1)) - 1)) return DW'((1 <<< (DW - 1)) - 1);
    if (v < -ACW'(1 <<< (DW - 1)))      return DW'(-(1 <<< (DW - 1)));
    return v[DW-1:0];
  endfunction

  // weight update term for tap k
  logic signed [DW+DW:0]  ex;
  logic signed [WW+1:0]   w_new;
  always_comb begin
    ex    = (DW+DW+1)'(e) * (DW+DW+1)'(xd[k]);
    w_new = (WW+2)'(w[k]) + (WW+2)'(ex >>> mu_shift);
  end

  assign ready = (state == IDLE);
  assign w_val = w[w_idx];

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      out_valid <= 1'b0;
      k         <= '0;
      acc       <= '0;
      y         <= '0;
      e         <= '0;
      d_q       <= '0;
      for (int i = 0; i < TAPS; i++) begin xd[i] <= '0; w[i] <= '0; end
    end else begin
      out_valid <= 1'b0;
      if (clear) for (int i = 0; i < TAPS; i++) w[i] <= '0;
      unique case (state)
        IDLE: if (in_valid) begin
          xd[0] <= x;
          for (int i = 1; i < TAPS; i++) xd[i] <= xd[i-1];
          d_q   <= d;
          acc   <= '0;
          k     <= '0;
          state <= FILT;
        end
        FILT: begin
          acc <= acc + ACW'(xd[k]) * ACW'(w[k]);
          if (k == IW'(TAPS - 1)) state <= ERR;
          k <= k + 1'b1;
        end
        ERR: begin
          y <= sat_dw(acc >>> FRAC);
          e <= sat_dw(ACW'(d_q) - ACW'(sat_dw(acc >>> FRAC)));
          k <= '0;
          if (adapt) state <= UPD;
          else begin
            state     <= IDLE;
            out_valid <= 1'b1;
          end
        end
        UPD: begin
          if (!clear) begin
            if (w_new > (WW+2)'((1 <<< (WW - 1)) - 1))  w[k] <= WW'((1 <<< (WW - 1)) - 1);
            else if (w_new < -(WW+2)'(1 <<< (WW - 1)))  w[k] <= WW'(-(1 <<< (WW - 1)));
            else                                        w[k] <= w_new[WW-1:0];
          end
          if (k == IW'(TAPS - 1)) begin
            state     <= IDLE;
            out_valid <= 1'b1;
          end
          k <= k + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
