// Piezo response tables: amplitude and phase of the piezo-to-detuning
// transfer function, one entry per FFT bin.
//
// The response is measured beforehand (swept with a lock-in amplifier on
// the PLL) and written here by the processor; the deconvolution reads it
// bin by bin. Two memories, amplitude (unsigned, AFRAC fraction bits) and
// phase (PH_W bits per turn), share one write port and one read address.
// For a real detuning signal the processor writes the negative-frequency
// bins N/2..N-1 with the same amplitude and the negated phase.
//
// Timing: write in the clock where wr_en is high; read data appear one
// clock after rd_addr (registered read, block-RAM style). The memories
// have no reset: they hold what was last written.
//
// The two tables are the document's; their layout, widths and ports are
// this design's choices.
module piezo_response_lut #(
  parameter int unsigned LOG2N = 6,
  parameter int unsigned AMP_W = 16,
  parameter int unsigned PH_W  = 16
) (
  input  logic                   clk,
  input  logic                   wr_en,
  input  logic [LOG2N-1:0]       wr_addr,
  input  logic [AMP_W-1:0]       wr_amp,
  input  logic signed [PH_W-1:0] wr_phase,
  input  logic [LOG2N-1:0]       rd_addr,
  output logic [AMP_W-1:0]       rd_amp,
  output logic signed [PH_W-1:0] rd_phase
);
  localparam int unsigned N = 1 << LOG2N;

  logic [AMP_W-1:0]       amp_mem [N];
  logic signed [PH_W-1:0] ph_mem  [N];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      amp_mem[wr_addr] <= wr_amp;
      ph_mem[wr_addr]  <= wr_phase;
    end
    rd_amp   <= amp_mem[rd_addr];
    rd_phase <= ph_mem[rd_addr];
  end
endmodule
