// Phase error correction (phase shifter) of the self-excited loop.
//
// Rotates the reference NCO's I/Q by a stored offset angle so that the
// reference phase matches the resonator phase before the PI loop is
// closed. Each align strobe subtracts the measured wrapped phase error
// (corrected reference minus cavity feedback) from the offset, so one
// strobe after the error has settled brings the two phases together;
// repeated strobes remove what the finite resolution leaves. With align
// low the offset is held. The document gives the function (match the
// resonator phase to the reference phase, then switch on the regulator);
// the rotate-by-CORDIC form and the strobe are this design's choice.
//
// Timing: rotation latency ITER+2 clocks; the offset updates one clock
// after an align strobe that comes with err_valid.
module phase_corrector #(
  parameter int unsigned IN_W = 16,
  parameter int unsigned PH_W = 16,
  parameter int unsigned ITER = 16
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_i,
  input  logic signed [IN_W-1:0] in_q,
  input  logic                   align,       // strobe: take up measured error
  input  logic                   err_valid,
  input  logic signed [PH_W-1:0] err_wrapped,
  output logic signed [PH_W-1:0] offset,
  output logic                   out_valid,
  output logic signed [IN_W-1:0] out_i,
  output logic signed [IN_W-1:0] out_q
);
  always_ff @(posedge clk) begin
    if (rst)                     offset <= '0;
    else if (align && err_valid) offset <= offset - err_wrapped;
  end

  cordic_rotate #(.IN_W(IN_W), .PH_W(PH_W), .ITER(ITER)) u_rot (
    .clk, .rst, .in_valid, .in_i, .in_q, .angle(offset),
    .out_valid, .out_i, .out_q
  );
endmodule
