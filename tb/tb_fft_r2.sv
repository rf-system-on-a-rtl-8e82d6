// FFT test. Random complex frames go through the forward transform and
// every bin is compared with a double-precision DFT divided by N
// (tolerance 2 LSB plus the twiddle quantization, 2^-17 of the bin
// magnitude per stage). The forward output of a frame is then
// fed back through the inverse transform and must reproduce the input
// frame within N+3 LSB (forward rounding errors summed over N bins). The time from the last input to the first output
// must be LOG2N*N/2 clocks, and outputs must hold while out_ready is low.
module tb_fft_r2;
  localparam real PI = 3.14159265358979323846;
  localparam int LOG2N = 5, N = 1 << LOG2N, DW = 24;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic inverse = 0, in_valid = 0, in_ready, out_valid, out_ready = 1, out_last;
  logic signed [DW-1:0] in_re, in_im, out_re, out_im;
  logic [LOG2N-1:0] out_idx;
  int checks = 0, failures = 0;

  fft_r2 #(.LOG2N(LOG2N), .DW(DW)) dut (.*);

  longint xr [N], xi [N], yr [N], yi [N];

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  // load a frame, return the clock count from the last input to the first output
  task automatic run_frame(input bit inv, input longint ar [N], input longint ai [N], output int lat);
    inverse = inv;
    for (int k = 0; k < N; k++) begin
      in_valid = 1; in_re = DW'(ar[k]); in_im = DW'(ai[k]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
    end
    in_valid = 0;
    lat = 0;
    while (!out_valid) begin @(posedge clk); #1; lat++; end
    for (int k = 0; k < N; k++) begin
      // stall the output now and then
      if (k % 7 == 3) begin
        out_ready = 0;
        check(out_idx == LOG2N'(k), "index moved while stalled");
        @(posedge clk); #1;
        check(out_valid && out_idx == LOG2N'(k), "output lost while stalled");
        out_ready = 1;
      end
      check(out_valid && out_idx == LOG2N'(k), $sformatf("out_idx %0d expected %0d", out_idx, k));
      check((k == N - 1) == out_last, "out_last");
      yr[k] = out_re; yi[k] = out_im;
      @(posedge clk); #1;
    end
  endtask

  initial begin
    int lat;
    real dr, di, a, tol;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int f = 0; f < 8; f++) begin
      for (int k = 0; k < N; k++) begin
        xr[k] = longint'($urandom_range(0, 1 << 22)) - (1 << 21);
        xi[k] = (f % 2) ? longint'($urandom_range(0, 1 << 22)) - (1 << 21) : 0;
      end
      run_frame(0, xr, xi, lat);
      check(lat == LOG2N * N / 2, $sformatf("forward latency %0d", lat));
      for (int m = 0; m < N; m++) begin
        dr = 0; di = 0;
        for (int k = 0; k < N; k++) begin
          a = -2.0 * PI * real'(m * k) / real'(N);
          dr += real'(xr[k]) * $cos(a) - real'(xi[k]) * $sin(a);
          di += real'(xr[k]) * $sin(a) + real'(xi[k]) * $cos(a);
        end
        dr /= N; di /= N;
        // rounding (about 1 LSB) plus twiddle quantization (2^-17 relative per stage)
        tol = 2.0 + (fabs(dr) + fabs(di)) * real'(LOG2N) / 131072.0;
        check(fabs(real'(yr[m]) - dr) <= tol && fabs(real'(yi[m]) - di) <= tol,
              $sformatf("frame %0d bin %0d: (%0d,%0d) expected (%.1f,%.1f)", f, m, yr[m], yi[m], dr, di));
      end
      // the unscaled inverse of DFT(x)/N is x; the forward rounding errors
      // (about 1 LSB rms per bin) add up over N bins to about sqrt(N) LSB
      // rms per sample, hence a tolerance of N LSB
      begin
        longint br [N], bi [N];
        for (int k = 0; k < N; k++) begin br[k] = yr[k]; bi[k] = yi[k]; end
        run_frame(1, br, bi, lat);
        check(lat == LOG2N * N / 2, $sformatf("inverse latency %0d", lat));
        for (int k = 0; k < N; k++)
          check(fabs(real'(yr[k] - xr[k])) <= 3 + N && fabs(real'(yi[k] - xi[k])) <= 3 + N,
                $sformatf("frame %0d round trip %0d: (%0d,%0d) expected (%0d,%0d)", f, k, yr[k], yi[k], xr[k], xi[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
