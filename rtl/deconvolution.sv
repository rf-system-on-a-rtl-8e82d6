// Deconvolution of the detuning spectrum by the piezo response.
//
// For each FFT bin D[k] of the detuning, the piezo excitation that would
// have produced it is X[k] = D[k] / H[k], with the piezo response H[k] =
// A[k]*exp(j*phi[k]) read from piezo_response_lut. In polar form this is
// a rotation by -phi[k] (pipelined CORDIC, cordic_rotate) followed by a
// division of both components by A[k] (two restoring dividers side by
// side, one quotient bit per clock). Bins where A[k] is below amp_min
// (the piezo barely acts there) give X[k] = 0 instead of amplified noise.
// The quotient keeps the data scale: A = 2^AFRAC is a gain of one.
//
// Interface: a bin is taken when in_valid && in_ready; lut_addr then
// addresses the tables (read one clock later). The result is offered with
// out_valid and held until out_ready. A result is offered
// ITER + DW + AFRAC + 3 clocks after its bin is taken; results keep the
// input's bin index.
//
// The deconvolution step is the document's; doing it in polar form, the
// threshold, the divider and all widths are this design's choices.
module deconvolution #(
  parameter int unsigned LOG2N = 6,
  parameter int unsigned DW    = 24,
  parameter int unsigned AMP_W = 16,
  parameter int unsigned AFRAC = 12,
  parameter int unsigned PH_W  = 16,
  parameter int unsigned ITER  = 16
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [AMP_W-1:0]       amp_min,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [LOG2N-1:0]       in_idx,
  input  logic signed [DW-1:0]   in_re,
  input  logic signed [DW-1:0]   in_im,
  output logic [LOG2N-1:0]       lut_addr,
  input  logic [AMP_W-1:0]       lut_amp,
  input  logic signed [PH_W-1:0] lut_phase,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [LOG2N-1:0]       out_idx,
  output logic signed [DW-1:0]   out_re,
  output logic signed [DW-1:0]   out_im
);
  localparam int unsigned NW = DW - 1 + AFRAC;    // numerator magnitude width
  localparam int unsigned CW = $clog2(NW + 1);

  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_LUT, S_ROT, S_DIV, S_OUT} state_e;
  state_e st;

  logic signed [DW-1:0] d_re, d_im;
  logic [AMP_W-1:0]     amp;
  logic                 weak_bin;
  logic                 rot_in_v, rot_out_v;
  logic signed [DW-1:0] rot_re, rot_im;
  logic                 neg_re, neg_im;
  logic [NW-1:0]        num_re, num_im, q_re, q_im;
  logic [AMP_W:0]       rem_re, rem_im;
  logic [CW-1:0]        cnt;

  cordic_rotate #(.IN_W(DW), .PH_W(PH_W), .ITER(ITER)) u_rot (
    .clk, .rst, .in_valid(rot_in_v), .in_i(d_re), .in_q(d_im), .angle(-lut_phase),
    .out_valid(rot_out_v), .out_i(rot_re), .out_q(rot_im)
  );

  // one restoring-division step: shift in the next numerator bit
  logic [AMP_W+1:0] tr_re, tr_im;
  assign tr_re = {rem_re, num_re[NW-1]} - {2'b0, amp};
  assign tr_im = {rem_im, num_im[NW-1]} - {2'b0, amp};

  function automatic logic signed [DW-1:0] signed_sat(input logic [NW-1:0] q, input logic neg);
    logic [DW-1:0] m;
    m = (q > NW'((1 << (DW - 1)) - 1)) ? DW'((1 << (DW - 1)) - 1) : DW'(q);
    return neg ? -DW'(m) : DW'(m);
  endfunction

  assign in_ready  = (st == S_IDLE);
  assign out_valid = (st == S_OUT);
  assign lut_addr  = out_idx;
  assign rot_in_v  = (st == S_LUT);
  assign out_re    = weak_bin ? '0 : signed_sat(q_re, neg_re);
  assign out_im    = weak_bin ? '0 : signed_sat(q_im, neg_im);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; out_idx <= '0; d_re <= '0; d_im <= '0; amp <= '0; weak_bin <= 1'b0;
      neg_re <= 1'b0; neg_im <= 1'b0; num_re <= '0; num_im <= '0; q_re <= '0; q_im <= '0;
      rem_re <= '0; rem_im <= '0; cnt <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (in_valid) begin
          out_idx <= in_idx; d_re <= in_re; d_im <= in_im;
          st <= S_ADDR;
        end
        S_ADDR: st <= S_LUT;                 // table read in flight
        S_LUT: begin                         // table data valid, rotation starts
          amp   <= lut_amp;
          weak_bin <= (lut_amp < amp_min) || (lut_amp == '0);
          st    <= S_ROT;
        end
        S_ROT: if (rot_out_v) begin
          neg_re <= rot_re[DW-1];
          neg_im <= rot_im[DW-1];
          num_re <= (rot_re[DW-1] ? -NW'(rot_re) : NW'(rot_re)) << AFRAC;
          num_im <= (rot_im[DW-1] ? -NW'(rot_im) : NW'(rot_im)) << AFRAC;
          rem_re <= '0; rem_im <= '0; q_re <= '0; q_im <= '0;
          cnt    <= CW'(NW);
          st     <= S_DIV;
        end
        S_DIV: begin
          num_re <= num_re << 1;
          num_im <= num_im << 1;
          if (!tr_re[AMP_W+1]) begin rem_re <= tr_re[AMP_W:0]; q_re <= {q_re[NW-2:0], 1'b1}; end
          else begin rem_re <= {rem_re[AMP_W-1:0], num_re[NW-1]}; q_re <= {q_re[NW-2:0], 1'b0}; end
          if (!tr_im[AMP_W+1]) begin rem_im <= tr_im[AMP_W:0]; q_im <= {q_im[NW-2:0], 1'b1}; end
          else begin rem_im <= {rem_im[AMP_W-1:0], num_im[NW-1]}; q_im <= {q_im[NW-2:0], 1'b0}; end
          cnt <= cnt - 1'b1;
          if (cnt == CW'(1)) st <= S_OUT;
        end
        S_OUT: if (out_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
