// Pipelined CORDIC in vectoring mode: phase of an I/Q sample (atan2).
//
// Stage 0 folds the left half-plane onto the right one (negates I and Q
// and starts the angle at half a turn). Each of the ITER following stages
// rotates the vector by +-atan(2^-i) towards the I axis and accumulates the
// rotation angle. The result is the phase as a PH_W-bit fraction of a turn,
// two's complement, so 0x8000 is -pi and 0x7fff is just below +pi.
// The document names an atan2 block in both the SEL and the adaptive
// feedforward chains; CORDIC, its width and iteration count are this
// design's choice. Inputs get G fraction bits so that small vectors keep
// their angle resolution. Magnitude is not output.
//
// Timing: fully pipelined, one sample per clock, latency ITER+1 clocks
// from in_valid to out_valid.
module cordic_atan2 #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned PH_W  = 16,
  parameter int unsigned ITER  = 16
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_i,
  input  logic signed [IN_W-1:0] in_q,
  output logic                   out_valid,
  output logic signed [PH_W-1:0] phase
);
  localparam int unsigned G  = 6;          // fraction guard bits
  localparam int unsigned XW = IN_W + 3 + G; // plus CORDIC gain 1.65
  localparam int unsigned ZW = PH_W + 4;   // angle guard bits

  logic signed [XW-1:0] x [ITER+1];
  logic signed [XW-1:0] y [ITER+1];
  logic        [ZW-1:0] z [ITER+1];
  logic [ITER:0]        v;
  logic [ZW-1:0]        atan_tab [ITER];

  // atan(2^-i) as a fraction of a turn, ZW bits
  initial begin
    for (int i = 0; i < ITER; i++)
      atan_tab[i] = ZW'($rtoi($atan(2.0 ** (-i)) / (2.0 * 3.14159265358979323846)
                            * (2.0 ** ZW) + 0.5));
  end

  always_ff @(posedge clk) begin
    if (rst) v <= '0;
    else     v <= {v[ITER-1:0], in_valid};
  end

  always_ff @(posedge clk) begin
    if (in_i < 0) begin
      x[0] <= -(XW'(in_i) <<< G);
      y[0] <= -(XW'(in_q) <<< G);
      z[0] <= ZW'(1) << (ZW - 1);   // half a turn
    end else begin
      x[0] <= XW'(in_i) <<< G;
      y[0] <= XW'(in_q) <<< G;
      z[0] <= '0;
    end
    for (int i = 0; i < ITER; i++) begin
      if (y[i] >= 0) begin
        x[i+1] <= x[i] + (y[i] >>> i);
        y[i+1] <= y[i] - (x[i] >>> i);
        z[i+1] <= z[i] + atan_tab[i];
      end else begin
        x[i+1] <= x[i] - (y[i] >>> i);
        y[i+1] <= y[i] + (x[i] >>> i);
        z[i+1] <= z[i] - atan_tab[i];
      end
    end
  end

  // round the angle to PH_W bits
  logic [ZW-1:0] z_rnd;
  assign z_rnd     = z[ITER] + (ZW'(1) << (ZW - PH_W - 1));
  assign phase     = z_rnd[ZW-1 -: PH_W];
  assign out_valid = v[ITER];
endmodule
