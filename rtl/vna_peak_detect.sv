// Peak detection on a resonator frequency response (VNA-style spectrum).
//
// A spectrum frame arrives as a stream of power bins, lowest frequency
// first, with last on the final bin. A bin is a peak when it exceeds the
// threshold, is larger than the bin before it and not smaller than the bin
// after it (the first and last bins cannot be peaks). The NPEAK largest
// peaks of the frame are kept in a list sorted by power, so the most
// distinguishable microphonic components come first. After the last bin
// the list is presented for one clock with peaks_valid and count.
// The document states the function (periodic update of the resonator's
// frequency response, search for the most distinguishable peaks); the
// local-maximum-plus-threshold rule and the sorted list are this design's
// choice.
//
// Timing: one bin per clock at most; peaks_valid comes 2 clocks after the
// last bin is accepted.
module vna_peak_detect #(
  parameter int unsigned MW    = 24,    // power width
  parameter int unsigned NBINS = 1024,  // bins per frame
  parameter int unsigned NPEAK = 4      // peaks kept (= Kalman filters)
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          in_valid,
  input  logic [MW-1:0]                 in_mag,
  input  logic                          in_last,
  input  logic [MW-1:0]                 threshold,
  output logic                          peaks_valid,
  output logic [$clog2(NPEAK+1)-1:0]    count,
  output logic [NPEAK-1:0][$clog2(NBINS)-1:0] peak_bin,
  output logic [NPEAK-1:0][MW-1:0]      peak_mag
);
  localparam int unsigned BW = $clog2(NBINS);
  localparam int unsigned CW = $clog2(NPEAK + 1);

  logic [BW-1:0] idx;
  logic [MW-1:0] m1, m2;          // previous and the one before
  logic [1:0]    seen;            // how many bins of the frame so far (saturating)
  logic          cand_v;
  logic [BW-1:0] cand_bin;
  logic [MW-1:0] cand_mag;
  logic          flush;

  logic [NPEAK-1:0][BW-1:0] lb;
  logic [NPEAK-1:0][MW-1:0] lm;
  logic [CW-1:0]            ln;

  // stage 1: candidate detection, the middle of (m2, m1, in_mag)
  always_ff @(posedge clk) begin
    if (rst) begin
      idx <= '0; m1 <= '0; m2 <= '0; seen <= '0;
      cand_v <= 1'b0; cand_bin <= '0; cand_mag <= '0; flush <= 1'b0;
    end else begin
      cand_v <= 1'b0;
      flush  <= 1'b0;
      if (in_valid) begin
        m2 <= m1;
        m1 <= in_mag;
        cand_bin <= idx - 1'b1;
        cand_mag <= m1;
        cand_v   <= (seen == 2'd2) && (m1 > threshold) && (m1 > m2) && (m1 >= in_mag);
        if (in_last) begin
          idx  <= '0;
          seen <= '0;
          flush <= 1'b1;
        end else begin
          idx  <= idx + 1'b1;
          if (seen != 2'd2) seen <= seen + 1'b1;
        end
      end
    end
  end

  // stage 2: sorted insertion into the peak list
  always_ff @(posedge clk) begin
    if (rst) begin
      lb <= '0; lm <= '0; ln <= '0;
      peaks_valid <= 1'b0; count <= '0; peak_bin <= '0; peak_mag <= '0;
    end else begin
      logic [NPEAK-1:0][BW-1:0] nb;
      logic [NPEAK-1:0][MW-1:0] nm;
      logic [CW-1:0]            nn;
      logic                     ins;
      nb = lb; nm = lm; nn = ln;
      if (cand_v) begin
        ins = 1'b0;
        for (int s = 0; s < NPEAK; s++) begin
          if (!ins && (CW'(s) >= ln || cand_mag > lm[s])) begin
            for (int t = NPEAK - 1; t > s; t--) begin
              nb[t] = lb[t-1]; nm[t] = lm[t-1];
            end
            nb[s] = cand_bin; nm[s] = cand_mag;
            ins = 1'b1;
          end
        end
        if (ins && ln != CW'(NPEAK)) nn = ln + 1'b1;
      end
      peaks_valid <= flush;
      if (flush) begin
        count    <= nn;
        peak_bin <= nb;
        peak_mag <= nm;
        lb <= '0; lm <= '0; ln <= '0;
      end else begin
        lb <= nb; lm <= nm; ln <= nn;
      end
    end
  end
endmodule
