// Decimator from the FPGA sample rate to the piezo bandwidth.
//
// The adaptive feedforward path works at the piezo actuator's response
// rate (a few kHz) while the phase detuning is produced at the 122.88 MHz
// fabric rate. This block is a cascaded integrator-comb (CIC) decimator:
// ORDER integrators at the input rate, decimation by 2^LOG2R, ORDER combs
// (differential delay 1) at the output rate, and a shift by ORDER*LOG2R
// that removes the CIC gain exactly, so a constant input comes out
// unchanged. With LOG2R = 15 the output rate is 122.88 MHz / 32768 =
// 3.75 kSps. The document only names the block ("DDC fpga bw to piezo
// bw"); the CIC structure, its order and the rate are this design's choice.
//
// Timing: one input per clock at most (in_valid); one output every 2^LOG2R
// valid inputs, registered one clock after the decimation instant.
module ddc_decimator #(
  parameter int unsigned DW    = 24,
  parameter int unsigned LOG2R = 15,
  parameter int unsigned ORDER = 3
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_data,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_data
);
  localparam int unsigned AW = DW + ORDER * LOG2R;

  logic signed [AW-1:0] integ [ORDER];
  logic signed [AW-1:0] comb_d [ORDER];
  logic [LOG2R-1:0]     phase_cnt;

  // integrators (wrap-around arithmetic is exact for a CIC)
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < ORDER; s++) integ[s] <= '0;
      phase_cnt <= '0;
    end else if (in_valid) begin
      integ[0] <= integ[0] + AW'(in_data);
      for (int s = 1; s < ORDER; s++) integ[s] <= integ[s] + integ[s-1];
      phase_cnt <= phase_cnt + 1'b1;
    end
  end

  // combs at the decimated rate
  logic dec_stb;
  assign dec_stb = in_valid && (phase_cnt == '1);

  logic signed [AW-1:0] c [ORDER+1];
  always_comb begin
    c[0] = integ[ORDER-1];
    for (int s = 0; s < ORDER; s++) c[s+1] = c[s] - comb_d[s];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < ORDER; s++) comb_d[s] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= dec_stb;
      if (dec_stb) begin
        for (int s = 0; s < ORDER; s++) comb_d[s] <= c[s];
        out_data <= DW'(c[ORDER] >>> (ORDER * LOG2R));
      end
    end
  end
endmodule
