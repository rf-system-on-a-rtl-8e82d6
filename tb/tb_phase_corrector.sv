// Phase shifter test: align strobes with known errors must move the offset
// by minus the error (and strobes without err_valid must not); random I/Q
// samples must come out rotated by the offset, compared with a real-valued
// rotation (tolerance 8 LSB), after ITER+2 clocks.
module tb_phase_corrector;
  localparam real PI = 3.14159265358979323846;
  localparam int ITER = 16, LAT = ITER + 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, align = 0, err_valid = 0, out_valid;
  logic signed [15:0] in_i, in_q, err_wrapped, offset, out_i, out_q;
  int checks = 0, failures = 0;

  phase_corrector #(.IN_W(16), .PH_W(16), .ITER(ITER)) dut (.*);

  logic signed [15:0] hist_i [LAT+1], hist_q [LAT+1];
  logic               hist_v [LAT+1];

  initial begin
    logic signed [15:0] want_ofs;
    want_ofs = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int r = 0; r < 12; r++) begin
      logic signed [15:0] e;
      logic ev;
      e = 16'($urandom);
      ev = (r % 4 != 3);
      // apply one strobe
      align <= 1; err_valid <= ev; err_wrapped <= e;
      @(posedge clk);
      align <= 0; err_valid <= 0;
      if (ev) want_ofs = want_ofs - e;
      @(posedge clk); #1;
      checks++;
      if (offset != want_ofs) begin failures++; $display("FAIL offset %0d want %0d", offset, want_ofs); end
      // stream vectors through the rotation
      for (int k = 0; k <= LAT; k++) hist_v[k] = 0;
      for (int t = 0; t < 300; t++) begin
        real a, ri, rq, xi, xq, mag, ang;
        mag = 30000.0 * real'($urandom_range(100, 1000)) / 1000.0;
        ang = 2.0 * PI * real'($urandom) / 4294967296.0;
        xi = mag * $cos(ang); xq = mag * $sin(ang);
        in_valid <= 1; in_i <= 16'($rtoi(xi)); in_q <= 16'($rtoi(xq));
        @(posedge clk); #1;
        for (int k = LAT; k > 0; k--) begin
          hist_i[k] = hist_i[k-1]; hist_q[k] = hist_q[k-1]; hist_v[k] = hist_v[k-1];
        end
        hist_i[0] = 16'($rtoi(xi)); hist_q[0] = 16'($rtoi(xq)); hist_v[0] = 1;
        // the sample presented LAT clocks ago must be at the output now
        if (hist_v[LAT-1]) begin
          a = 2.0 * PI * real'(want_ofs) / 65536.0;
          ri = real'(hist_i[LAT-1]) * $cos(a) - real'(hist_q[LAT-1]) * $sin(a);
          rq = real'(hist_i[LAT-1]) * $sin(a) + real'(hist_q[LAT-1]) * $cos(a);
          checks++;
          if (!out_valid || (real'(out_i) - ri) > 8.0 || (ri - real'(out_i)) > 8.0
              || (real'(out_q) - rq) > 8.0 || (rq - real'(out_q)) > 8.0) begin
            failures++;
            if (failures < 10) $display("FAIL rot ofs=%0d got %0d,%0d want %f,%f", want_ofs, out_i, out_q, ri, rq);
          end
        end
      end
      in_valid <= 0;
      repeat (LAT + 2) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
