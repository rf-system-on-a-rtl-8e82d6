// Phase lock detection of the self-excited loop.
//
// The loop counts as locked once |phase error| has stayed within
// threshold for HOLD consecutive error samples; a single sample outside
// the window drops lock at once. The default window is 36 degrees, the
// acceptable reference/resonator phase match the document quotes; the
// consecutive-sample hold is this design's choice, since the document only
// names the block.
//
// Timing: error sampled when err_valid is high; locked is registered.
module phase_lock_detect #(
  parameter int unsigned PH_W = 16,
  parameter int unsigned HOLD = 64
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   err_valid,
  input  logic signed [PH_W-1:0] err,        // wrapped phase error
  input  logic [PH_W-1:0]        threshold,  // window, same units as err
  output logic                   locked
);
  localparam int unsigned CW = $clog2(HOLD + 1);
  logic [CW-1:0] cnt;
  logic [PH_W-1:0] mag;

  assign mag = err[PH_W-1] ? PH_W'(-err) : PH_W'(err);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      locked <= 1'b0;
    end else if (err_valid) begin
      if (mag > threshold) begin
        cnt    <= '0;
        locked <= 1'b0;
      end else if (cnt == CW'(HOLD)) begin
        locked <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
