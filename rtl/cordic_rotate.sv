// Pipelined CORDIC in rotation mode: rotates an I/Q sample by an angle.
//
// The angle is a PH_W-bit fraction of a turn. Stage 0 folds angles beyond
// +-90 degrees by negating the vector and adding half a turn; ITER stages
// then rotate by +-atan(2^-i) until the residual angle is zero. The CORDIC
// gain (1.6468) is removed by a final multiply with round(0.60725*2^16),
// and the result is saturated to the input width. The vector carries G
// extra fraction bits through the iterations. Helper of the phase
// shifter; every detail here is this design's choice.
//
// Timing: one sample per clock, latency ITER+2 clocks.
module cordic_rotate #(
  parameter int unsigned IN_W = 16,
  parameter int unsigned PH_W = 16,
  parameter int unsigned ITER = 16
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_i,
  input  logic signed [IN_W-1:0] in_q,
  input  logic signed [PH_W-1:0] angle,
  output logic                   out_valid,
  output logic signed [IN_W-1:0] out_i,
  output logic signed [IN_W-1:0] out_q
);
  localparam int unsigned G  = 4;          // fraction guard bits
  localparam int unsigned XW = IN_W + 3 + G;
  localparam int unsigned ZW = PH_W + 4;
  localparam logic signed [17:0] KINV = 18'sd39797;  // 0.60725 * 2^16

  logic signed [XW-1:0] x [ITER+1];
  logic signed [XW-1:0] y [ITER+1];
  logic signed [ZW-1:0] z [ITER+1];
  logic [ITER+1:0]      v;
  logic [ZW-1:0]        atan_tab [ITER];

  initial begin
    for (int i = 0; i < ITER; i++)
      atan_tab[i] = ZW'($rtoi($atan(2.0 ** (-i)) / (2.0 * 3.14159265358979323846)
                            * (2.0 ** ZW) + 0.5));
  end

  always_ff @(posedge clk) begin
    if (rst) v <= '0;
    else     v <= {v[ITER:0], in_valid};
  end

  logic signed [ZW-1:0] a_ext;
  assign a_ext = {angle, 4'b0000};

  always_ff @(posedge clk) begin
    // fold: |angle| > quarter turn -> rotate by half a turn first
    if (angle[PH_W-1] != angle[PH_W-2]) begin
      x[0] <= -(XW'(in_i) <<< G);
      y[0] <= -(XW'(in_q) <<< G);
      z[0] <= a_ext - (ZW'(1) <<< (ZW - 1));
    end else begin
      x[0] <= XW'(in_i) <<< G;
      y[0] <= XW'(in_q) <<< G;
      z[0] <= a_ext;
    end
    for (int i = 0; i < ITER; i++) begin
      if (z[i] >= 0) begin
        x[i+1] <= x[i] - (y[i] >>> i);
        y[i+1] <= y[i] + (x[i] >>> i);
        z[i+1] <= z[i] - ZW'(atan_tab[i]);
      end else begin
        x[i+1] <= x[i] + (y[i] >>> i);
        y[i+1] <= y[i] - (x[i] >>> i);
        z[i+1] <= z[i] + ZW'(atan_tab[i]);
      end
    end
  end

  function automatic logic signed [IN_W-1:0] scale_sat(input logic signed [XW-1:0] a);
    logic signed [XW+18-1:0] p;
    logic signed [XW+18-1:0] s;
    p = (XW+18)'(a) * (XW+18)'(KINV);
    s = (p + (XW+18)'(1 <<< (15 + G))) >>> (16 + G);
    if (s > (XW+18)'((1 <<< (IN_W - 1)) - 1))  return IN_W'((1 <<< (IN_W - 1)) - 1);
    if (s < -(XW+18)'(1 <<< (IN_W - 1)))       return IN_W'(-(1 <<< (IN_W - 1)));
    return s[IN_W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    out_i <= scale_sat(x[ITER]);
    out_q <= scale_sat(y[ITER]);
  end
  assign out_valid = v[ITER+1];
endmodule
