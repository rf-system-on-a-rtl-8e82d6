// Bank of automatically activated Kalman filters, one per microphonic
// component.
//
// Each filter models one mechanical resonance as a damped oscillator
// sampled at the detuning rate: its two states rotate by theta and shrink
// by r every sample,
//   p1 = r*cos(theta)*x1 - r*sin(theta)*x2
//   p2 = r*sin(theta)*x1 + r*cos(theta)*x2
// and x1 is the component's contribution to the measured detuning. All
// active filters share one measurement z (the noisy detuning), so the
// innovation is nu = z - sum(p1) and each filter corrects its prediction
// with its own fixed gains: x1 = p1 + k1*nu, x2 = p2 + k2*nu. These are
// steady-state Kalman gains (the solution of the Riccati equation for the
// active set of oscillators), loaded with the configuration. The bank output est = sum of the updated
// x1 is the estimated (de-noised) detuning.
//
// A filter is configured through cfg_*: theta (fraction of a turn per
// sample) and r (UQ1.16) come from a found peak; a CORDIC rotation of
// (r, 0) by theta gives the two coefficients, after which the filter's
// states are cleared and it becomes active. cfg_enable = 0 switches a
// filter off. The document describes the bank (one Kalman filter per
// found microphonic component, activated automatically) but not its
// equations; the oscillator model, the shared innovation, the fixed gains
// and all widths are this design's choices.
//
// Timing: a configuration takes ITER+3 clocks (cfg_ready low meanwhile);
// est_valid follows z_valid by one clock.
module kalman_bank #(
  parameter int unsigned NF   = 4,
  parameter int unsigned DW   = 24,
  parameter int unsigned PH_W = 16,
  parameter int unsigned ITER = 16
) (
  input  logic                        clk,
  input  logic                        rst,
  // configuration
  input  logic                        cfg_valid,
  input  logic [$clog2(NF)-1:0]       cfg_idx,
  input  logic                        cfg_enable,
  input  logic [PH_W-1:0]             cfg_theta,
  input  logic [16:0]                 cfg_r,       // UQ1.16, <= 1.0
  input  logic signed [17:0]          cfg_k1,      // gains, Q2.16
  input  logic signed [17:0]          cfg_k2,
  output logic                        cfg_ready,
  // measurement and estimate
  input  logic                        z_valid,
  input  logic signed [DW-1:0]        z,
  output logic                        est_valid,
  output logic signed [DW-1:0]        est,
  output logic signed [DW-1:0]        innovation,
  output logic [NF-1:0]               active,
  output logic signed [NF-1:0][DW-1:0] comp,       // per-filter x1
  output logic signed [NF-1:0][17:0]  coef_c,      // r*cos(theta), Q2.16
  output logic signed [NF-1:0][17:0]  coef_s       // r*sin(theta), Q2.16
);
  localparam int unsigned IW = $clog2(NF);
  localparam int unsigned PW = DW + 18;
  localparam int unsigned SW = DW + IW + 2;

  // ---------------- coefficient generation ----------------
  logic rot_in_v, rot_out_v;
  logic signed [17:0] rot_i, rot_q;
  logic [IW-1:0] pend_idx;
  logic signed [17:0] k1 [NF];
  logic signed [17:0] k2 [NF];
  logic          pend;

  cordic_rotate #(.IN_W(18), .PH_W(PH_W), .ITER(ITER)) u_rot (
    .clk, .rst, .in_valid(rot_in_v), .in_i(18'(cfg_r)), .in_q('0),
    .angle(cfg_theta), .out_valid(rot_out_v), .out_i(rot_i), .out_q(rot_q)
  );

  assign cfg_ready = !pend;
  assign rot_in_v  = cfg_valid && cfg_enable && !pend;

  function automatic logic signed [DW-1:0] sat(input logic signed [PW:0] v);
    if (v > (PW+1)'((1 <<< (DW - 1)) - 1)) return DW'((1 <<< (DW - 1)) - 1);
    if (v < -(PW+1)'(1 <<< (DW - 1)))      return DW'(-(1 <<< (DW - 1)));
    return v[DW-1:0];
  endfunction

  // ---------------- filter update ----------------
  logic signed [DW-1:0] x1 [NF];
  logic signed [DW-1:0] x2 [NF];
  logic signed [DW-1:0] p1 [NF];
  logic signed [DW-1:0] p2 [NF];
  logic signed [DW-1:0] n1 [NF];
  logic signed [DW-1:0] n2 [NF];
  logic signed [SW-1:0] psum, esum;
  logic signed [DW-1:0] nu;

  always_comb begin
    psum = '0;
    for (int f = 0; f < NF; f++) begin
      p1[f] = sat(((PW+1)'($signed(coef_c[f])) * (PW+1)'(x1[f]) - (PW+1)'($signed(coef_s[f])) * (PW+1)'(x2[f])) >>> 16);
      p2[f] = sat(((PW+1)'($signed(coef_s[f])) * (PW+1)'(x1[f]) + (PW+1)'($signed(coef_c[f])) * (PW+1)'(x2[f])) >>> 16);
      if (active[f]) psum = psum + SW'(p1[f]);
    end
    nu = sat((PW+1)'(z) - (PW+1)'(psum));
    esum = '0;
    for (int f = 0; f < NF; f++) begin
      n1[f] = sat((PW+1)'(p1[f]) + (((PW+1)'(k1[f]) * (PW+1)'(nu)) >>> 16));
      n2[f] = sat((PW+1)'(p2[f]) + (((PW+1)'(k2[f]) * (PW+1)'(nu)) >>> 16));
      if (active[f]) esum = esum + SW'(n1[f]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pend <= 1'b0; pend_idx <= '0; active <= '0;
      coef_c <= '0; coef_s <= '0;
      est_valid <= 1'b0; est <= '0; innovation <= '0;
      for (int f = 0; f < NF; f++) begin
        x1[f] <= '0; x2[f] <= '0; k1[f] <= '0; k2[f] <= '0;
      end
    end else begin
      est_valid <= z_valid;
      if (z_valid) begin
        for (int f = 0; f < NF; f++)
          if (active[f]) begin x1[f] <= n1[f]; x2[f] <= n2[f]; end
        est        <= sat((PW+1)'(esum));
        innovation <= nu;
      end
      if (cfg_valid && !pend) begin
        if (cfg_enable) begin
          pend     <= 1'b1;
          pend_idx <= cfg_idx;
          k1[cfg_idx] <= cfg_k1;
          k2[cfg_idx] <= cfg_k2;
          active[cfg_idx] <= 1'b0;
        end else begin
          active[cfg_idx] <= 1'b0;
        end
      end
      if (pend && rot_out_v) begin
        pend <= 1'b0;
        coef_c[pend_idx] <= rot_i;
        coef_s[pend_idx] <= rot_q;
        x1[pend_idx] <= '0;
        x2[pend_idx] <= '0;
        active[pend_idx] <= 1'b1;
      end
    end
  end

  always_comb for (int f = 0; f < NF; f++) comp[f] = x1[f];
endmodule
