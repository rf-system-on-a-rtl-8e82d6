// Inverted piezo excitation: turns the deconvolved spectrum back into a
// time signal, inverts it and plays it out at the piezo sample rate.
//
// The deconvolved bins X[k] (natural order) go into an inverse FFT
// (fft_r2 with inverse=1, unscaled). The real part of each output sample,
// negated and saturated, is stored in a playback buffer of N samples: the
// piezo then pushes against the perturbation that the spectrum described.
// Once a whole frame has been stored, every tick (one per decimated
// sample) puts the next buffer entry on exc and pulses exc_valid, going
// round the buffer; a new frame overwrites it in place.
//
// Interface: bins are taken when in_valid && in_ready. frame_done pulses
// when the last sample of a frame is in the buffer. exc_valid follows
// tick by one clock.
//
// Inversion and playback to the output NCO are the document's; the
// buffer, the playback order and the saturation are this design's choices.
module piezo_excitation #(
  parameter int unsigned LOG2N = 6,
  parameter int unsigned DW    = 24
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  input  logic                 tick,
  output logic                 exc_valid,
  output logic signed [DW-1:0] exc,
  output logic                 frame_done
);
  localparam int unsigned N = 1 << LOG2N;

  logic                 o_valid, o_last;
  logic [LOG2N-1:0]     o_idx, rd_ptr;
  logic signed [DW-1:0] o_re, o_im_unused;
  logic signed [DW-1:0] buffer [N];
  logic                 have_frame;

  fft_r2 #(.LOG2N(LOG2N), .DW(DW)) u_ifft (
    .clk, .rst, .inverse(1'b1), .in_valid, .in_ready, .in_re, .in_im,
    .out_valid(o_valid), .out_ready(1'b1), .out_idx(o_idx), .out_last(o_last),
    .out_re(o_re), .out_im(o_im_unused)
  );

  function automatic logic signed [DW-1:0] neg_sat(input logic signed [DW-1:0] v);
    return (v == {1'b1, {(DW-1){1'b0}}}) ? {1'b0, {(DW-1){1'b1}}} : -v;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      have_frame <= 1'b0; rd_ptr <= '0; exc_valid <= 1'b0; exc <= '0; frame_done <= 1'b0;
      for (int k = 0; k < N; k++) buffer[k] <= '0;
    end else begin
      frame_done <= o_valid && o_last;
      if (o_valid) buffer[o_idx] <= neg_sat(o_re);
      if (o_valid && o_last) have_frame <= 1'b1;
      exc_valid <= tick && have_frame;
      if (tick && have_frame) begin
        exc    <= buffer[rd_ptr];
        rd_ptr <= rd_ptr + 1'b1;
      end
    end
  end
endmodule
