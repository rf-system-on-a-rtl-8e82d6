// Sequential radix-2 FFT of one frame of N = 2^LOG2N complex samples.
//
// Used for the spectrum of the decimated detuning ("FFT Phase detuning")
// and, with inverse=1, to return the deconvolved spectrum to the time
// domain for the piezo excitation. The frame is written into two register
// arrays (real, imaginary) at bit-reversed addresses while it streams in;
// then LOG2N decimation-in-time stages of N/2 butterflies run, one
// butterfly per clock, in place; then the N results stream out in natural
// order. Twiddles W = exp(-+j*2*pi*k/N) come from a table of cos/sin
// rounded to TW_W bits (Q2.(TW_W-2), so that 1.0 is exact) filled at
// elaboration.
//
// Products and halvings are rounded, so errors do not build up a bias.
// Scaling: the forward transform halves every butterfly output, so it
// returns DFT(x)/N and cannot overflow; the inverse transform does not
// scale, so inverse(forward(x)) = x up to rounding.
//
// Interface: in_ready is high while a frame is being loaded; each
// in_valid && in_ready sample is taken. After the last input the
// transform takes LOG2N*N/2 clocks. Outputs are offered with out_valid and
// out_idx and advance on out_ready (out_last marks bin N-1); then the core
// is ready for the next frame. inverse must be held for a whole frame.
//
// The figure names an FFT only; the size, the algorithm, the scaling and
// the handshake are this design's choices.
module fft_r2 #(
  parameter int unsigned LOG2N = 6,
  parameter int unsigned DW    = 24,
  parameter int unsigned TW_W  = 18
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  inverse,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [DW-1:0]  in_re,
  input  logic signed [DW-1:0]  in_im,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [LOG2N-1:0]      out_idx,
  output logic                  out_last,
  output logic signed [DW-1:0]  out_re,
  output logic signed [DW-1:0]  out_im
);
  localparam int unsigned N  = 1 << LOG2N;
  localparam int unsigned SW = (LOG2N > 1) ? $clog2(LOG2N) : 1;
  localparam int unsigned PW = DW + TW_W + 1;

  logic signed [DW-1:0]   mre [N];
  logic signed [DW-1:0]   mim [N];
  logic signed [TW_W-1:0] cos_t [N/2];
  logic signed [TW_W-1:0] sin_t [N/2];

  initial begin
    for (int k = 0; k < N / 2; k++) begin
      cos_t[k] = TW_W'($rtoi($floor($cos(2.0 * 3.14159265358979323846 * k / N)
                                    * (2.0 ** (TW_W - 2)) + 0.5)));
      sin_t[k] = TW_W'($rtoi($floor($sin(2.0 * 3.14159265358979323846 * k / N)
                                    * (2.0 ** (TW_W - 2)) + 0.5)));
    end
  end

  typedef enum logic [1:0] {S_LOAD, S_RUN, S_OUT} state_e;
  state_e st;
  logic [LOG2N-1:0] cnt;     // load / output index
  logic [LOG2N-2:0] bj;      // butterfly index within a stage
  logic [SW-1:0]    stage;

  function automatic logic [LOG2N-1:0] bitrev(input logic [LOG2N-1:0] a);
    for (int i = 0; i < LOG2N; i++) bitrev[i] = a[LOG2N-1-i];
  endfunction

  // butterfly addresses and twiddle for (stage, bj)
  logic [LOG2N-1:0] ia, ib, half, pos;
  logic [LOG2N-2:0] tw;
  logic signed [TW_W-1:0] wc, ws;
  logic signed [PW-1:0] pr, pi;
  logic signed [DW:0] tr, ti, ar, ai, sr, si, dr, di;

  always_comb begin
    half = LOG2N'(1) << stage;
    pos  = LOG2N'(bj) & (half - 1'b1);
    ia   = ((LOG2N'(bj) >> stage) << (stage + 1)) | pos;
    ib   = ia | half;
    tw   = (LOG2N-1)'(pos << (LOG2N - 1 - int'(stage)));
    wc   = cos_t[tw];
    // forward: W = cos - j sin; inverse: W = cos + j sin
    ws   = inverse ? sin_t[tw] : -sin_t[tw];
    // t = W * x[ib]
    pr = PW'(wc) * PW'(mre[ib]) - PW'(ws) * PW'(mim[ib]);
    pi = PW'(wc) * PW'(mim[ib]) + PW'(ws) * PW'(mre[ib]);
    tr = (DW+1)'((pr + (PW'(1) << (TW_W - 3))) >>> (TW_W - 2));   // rounded
    ti = (DW+1)'((pi + (PW'(1) << (TW_W - 3))) >>> (TW_W - 2));
    ar = (DW+1)'(mre[ia]);
    ai = (DW+1)'(mim[ia]);
    sr = ar + tr;  si = ai + ti;
    dr = ar - tr;  di = ai - ti;
  end

  function automatic logic signed [DW-1:0] fit(input logic signed [DW:0] v, input logic halve);
    logic signed [DW+1:0] h;
    h = halve ? (((DW+2)'(v) + 1) >>> 1) : (DW+2)'(v);   // rounded halving
    if (h > (DW+2)'((1 << (DW - 1)) - 1))  return {1'b0, {(DW-1){1'b1}}};
    if (h < -(DW+2)'(1 << (DW - 1)))       return {1'b1, {(DW-1){1'b0}}};
    return DW'(h);
  endfunction

  assign in_ready  = (st == S_LOAD);
  assign out_valid = (st == S_OUT);
  assign out_idx   = cnt;
  assign out_last  = (st == S_OUT) && (cnt == LOG2N'(N - 1));
  assign out_re    = mre[cnt];
  assign out_im    = mim[cnt];

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_LOAD; cnt <= '0; bj <= '0; stage <= '0;
      for (int k = 0; k < N; k++) begin mre[k] <= '0; mim[k] <= '0; end
    end else begin
      unique case (st)
        S_LOAD: if (in_valid) begin
          mre[bitrev(cnt)] <= in_re;
          mim[bitrev(cnt)] <= in_im;
          cnt <= cnt + 1'b1;
          if (cnt == LOG2N'(N - 1)) begin
            st <= S_RUN; bj <= '0; stage <= '0;
          end
        end
        S_RUN: begin
          mre[ia] <= fit(sr, !inverse);  mim[ia] <= fit(si, !inverse);
          mre[ib] <= fit(dr, !inverse);  mim[ib] <= fit(di, !inverse);
          bj <= bj + 1'b1;
          if (bj == '1) begin
            if (stage == SW'(LOG2N - 1)) begin
              st <= S_OUT; cnt <= '0;
            end else begin
              stage <= stage + 1'b1;
            end
          end
        end
        S_OUT: if (out_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == LOG2N'(N - 1)) st <= S_LOAD;
        end
        default: st <= S_LOAD;
      endcase
    end
  end
endmodule
