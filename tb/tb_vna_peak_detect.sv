// Sends spectrum frames (random noise floor plus a random number of
// resonance-shaped peaks, some below the threshold, plus frames with more
// peaks than the list holds) and compares the reported list with a model
// that finds all local maxima above threshold and sorts them by power
// (ties by bin). Checks count, order, bins, powers and the 2-clock latency.
module tb_vna_peak_detect;
  localparam int MW = 24, NB = 256, NP = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, in_last = 0, peaks_valid;
  logic [MW-1:0] in_mag, threshold = 24'd5000;
  logic [$clog2(NP+1)-1:0] count;
  logic [NP-1:0][$clog2(NB)-1:0] peak_bin;
  logic [NP-1:0][MW-1:0] peak_mag;
  int checks = 0, failures = 0;

  vna_peak_detect #(.MW(MW), .NBINS(NB), .NPEAK(NP)) dut (.*);

  int spec [NB];

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 60; f++) begin
      int np, cb [$], cm [$], lat;
      cb.delete(); cm.delete();
      np = (f % 10 == 0) ? 0 : $urandom_range(1, 9);
      for (int k = 0; k < NB; k++) spec[k] = $urandom_range(0, 3000);
      for (int p = 0; p < np; p++) begin
        int c, a, w;
        c = $urandom_range(3, NB - 4);
        a = $urandom_range(2000, 2000000);
        w = $urandom_range(1, 6);
        for (int k = 0; k < NB; k++) begin
          int dk, v;
          dk = k - c;
          v = a / (1 + (dk * dk * 4) / (w * w));
          if (v > spec[k]) spec[k] = v;
        end
      end
      // model
      for (int k = 1; k < NB - 1; k++)
        if (spec[k] > 5000 && spec[k] > spec[k-1] && spec[k] >= spec[k+1]) begin
          int pos;
          pos = 0;
          while (pos < cm.size() && cm[pos] >= spec[k]) pos++;
          cm.insert(pos, spec[k]); cb.insert(pos, k);
        end
      for (int k = 0; k < NB; k++) begin
        in_valid <= 1; in_mag <= MW'(spec[k]); in_last <= (k == NB - 1);
        @(posedge clk);
        if (k != NB - 1 && $urandom_range(0, 7) == 0) begin in_valid <= 0; @(posedge clk); end
      end
      in_valid <= 0; in_last <= 0;
      lat = 1;
      #1;
      while (!peaks_valid) begin @(posedge clk); #1; lat++; end
      checks++;
      if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
      checks++;
      if (int'(count) != ((cm.size() > NP) ? NP : cm.size())) begin
        failures++; $display("FAIL frame %0d count %0d want %0d", f, count, cm.size());
      end
      for (int s = 0; s < NP && s < cm.size(); s++) begin
        checks++;
        if (int'(peak_bin[s]) != cb[s] || int'(peak_mag[s]) != cm[s]) begin
          failures++;
          $display("FAIL frame %0d slot %0d bin %0d/%0d mag %0d/%0d", f, s, peak_bin[s], cb[s], peak_mag[s], cm[s]);
        end
      end
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60 * NB * 3) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
