// Deconvolution test. Random bins D are offered with random table entries
// (amplitude 0.5..4 in Q.12, any phase); each result must equal
// D * exp(-j*phi) / A computed here in double precision, within the CORDIC
// error (3 LSB plus 2^-15 of |D| before the division, divided by A) plus
// 2 LSB. Entries
// below amp_min must give zero. The table is modelled here with its
// one-clock read latency. The clocks from taking a bin to offering its
// result must be the same for every bin (ITER + DW + AFRAC + 3), and a
// result must stay while out_ready is low.
module tb_deconvolution;
  localparam real PI = 3.14159265358979323846;
  localparam int LOG2N = 5, DW = 24, AFRAC = 12, ITER = 16;
  localparam int LAT = ITER + DW + AFRAC + 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [15:0] amp_min = 16'd256, lut_amp;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [LOG2N-1:0] in_idx, lut_addr, out_idx;
  logic signed [DW-1:0] in_re, in_im, out_re, out_im;
  logic signed [15:0] lut_phase;
  int checks = 0, failures = 0;
  logic [15:0] tab_a [1 << LOG2N];
  logic signed [15:0] tab_p [1 << LOG2N];

  deconvolution #(.LOG2N(LOG2N), .DW(DW), .AFRAC(AFRAC), .ITER(ITER)) dut (.*);

  always @(posedge clk) begin
    lut_amp   <= tab_a[lut_addr];
    lut_phase <= tab_p[lut_addr];
  end

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    int lat;
    real a, ph, er, ei, tol;
    for (int k = 0; k < (1 << LOG2N); k++) begin
      tab_a[k] = (k % 8 == 5) ? 16'($urandom_range(1, 255)) : 16'($urandom_range(2048, 16384));
      tab_p[k] = 16'($urandom);
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 200; n++) begin
      int k;
      k = $urandom_range(0, (1 << LOG2N) - 1);
      while (!in_ready) begin @(posedge clk); #1; end
      in_valid = 1; in_idx = LOG2N'(k);
      in_re = DW'(longint'($urandom_range(0, 1 << 20)) - (1 << 19));
      in_im = DW'(longint'($urandom_range(0, 1 << 20)) - (1 << 19));
      @(posedge clk); #1;
      in_valid = 0;
      lat = 0;
      while (!out_valid) begin @(posedge clk); #1; lat++; end
      check(lat == LAT, $sformatf("latency %0d expected %0d", lat, LAT));
      if (n % 5 == 2) begin
        out_ready = 0;
        repeat (3) @(posedge clk);
        #1;
        check(out_valid, "result dropped while out_ready low");
        out_ready = 1;
      end
      a  = real'(tab_a[k]) / real'(1 << AFRAC);
      ph = 2.0 * PI * real'(tab_p[k]) / 65536.0;
      if (tab_a[k] < amp_min) begin
        er = 0.0; ei = 0.0; tol = 0.0;
      end else begin
        er = (real'(in_re) * $cos(ph) + real'(in_im) * $sin(ph)) / a;
        ei = (real'(in_im) * $cos(ph) - real'(in_re) * $sin(ph)) / a;
        tol = 2.0 + (3.0 + (fabs(real'(in_re)) + fabs(real'(in_im))) / 32768.0) / a;
      end
      check(out_idx == LOG2N'(k), "bin index");
      check(fabs(real'(out_re) - er) <= tol && fabs(real'(out_im) - ei) <= tol,
            $sformatf("bin %0d amp %0d: (%0d,%0d) expected (%.1f,%.1f)", k, tab_a[k], out_re, out_im, er, ei));
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
