// Writes spectrum frames with Lorentzian-like peaks of random width and
// asks for the assessment of a random bin (peak bins mostly, frame edges
// too). A model counts the bins above half the peak power on each side;
// width, half-bandwidth and Q = floor(p*2^QF/width) must match, and done
// must come at the clock count worked out from the walk lengths.
module tb_vna_peak_assess;
  localparam int MW = 24, NB = 256, QF = 8, BW = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, in_last = 0, start = 0, busy, done;
  logic [MW-1:0] in_mag;
  logic [BW-1:0] peak_bin;
  logic [BW:0] width, hbw;
  logic [BW+QF-1:0] q_factor;
  int checks = 0, failures = 0;

  vna_peak_assess #(.MW(MW), .NBINS(NB), .QF(QF)) dut (.*);

  int spec [NB];

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 80; f++) begin
      int c, a, w, p, l, r, wd, lat;
      c = $urandom_range(0, NB - 1);
      a = $urandom_range(100000, 4000000);
      w = $urandom_range(1, 20);
      for (int k = 0; k < NB; k++) begin
        int dk;
        dk = k - c;
        spec[k] = a / (1 + (dk * dk * 4) / (w * w)) + $urandom_range(0, 50);
      end
      for (int k = 0; k < NB; k++) begin
        in_valid <= 1; in_mag <= MW'(spec[k]); in_last <= (k == NB - 1);
        @(posedge clk);
      end
      in_valid <= 0; in_last <= 0;
      p = (f % 5 == 4) ? $urandom_range(0, NB - 1) : c;
      l = 0; r = 0;
      while (p - l - 1 >= 0 && spec[p - l - 1] > spec[p] / 2) l++;
      while (p + r + 1 < NB && spec[p + r + 1] > spec[p] / 2) r++;
      wd = 1 + l + r;
      start <= 1; peak_bin <= BW'(p);
      @(posedge clk);
      start <= 0;
      lat = 0;
      #1;
      while (!done) begin @(posedge clk); #1; lat++; end
      checks++;
      if (int'(width) != wd || int'(hbw) != wd || int'(q_factor) != (p << QF) / wd) begin
        failures++;
        $display("FAIL f=%0d p=%0d width %0d/%0d q %0d/%0d", f, p, width, wd, q_factor, (p << QF) / wd);
      end
      checks++;
      // PEAK, left walk (stops early at bin 0), right walk, divider, FIN
      if (lat != 1 + ((p == 0) ? 0 : ((p - l == 0) ? l : l + 1)) + r + 1 + BW + QF + 1) begin
        failures++; $display("FAIL latency %0d (l=%0d r=%0d)", lat, l, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100 * (NB + 100)) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
