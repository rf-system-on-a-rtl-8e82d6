// Feeds random and corner-case I/Q samples to the CORDIC atan2, one per
// clock, and compares each result with real-valued $atan2 (tolerance
// 3 LSB of a 16-bit turn, modulo one turn). Checks the ITER+1 latency.
module tb_cordic_atan2;
  localparam real PI = 3.14159265358979323846;
  localparam int ITER = 16, LAT = ITER + 1, N = 4000;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic signed [15:0] in_i, in_q, phase;
  logic signed [15:0] si [N], sq [N];
  int checks = 0, failures = 0;

  cordic_atan2 #(.IN_W(16), .PH_W(16), .ITER(ITER)) dut (.*);

  initial begin
    for (int n = 0; n < N; n++) begin
      si[n] = 16'($urandom);
      sq[n] = 16'($urandom);
      if (n % 50 == 0) sq[n] = 0;          // on the real axis
      if (n % 50 == 1) begin si[n] = -16'sd32768; sq[n] = 16'sd3; end
      if (n % 50 == 2) begin si[n] = 16'sd0; sq[n] = -16'sd1000; end
      if (n % 50 == 3) begin si[n] = -16'sd500; sq[n] = 16'sd0; end
      if ((si[n] > -64 && si[n] < 64) && (sq[n] > -64 && sq[n] < 64)) si[n] = 16'sd3000;
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    fork
      for (int n = 0; n < N; n++) begin
        in_valid <= 1; in_i <= si[n]; in_q <= sq[n];
        @(posedge clk);
      end
      begin : chk
        int n = 0, cyc = 0, first = -1;
        while (n < N) begin
          @(posedge clk); #1; cyc++;
          if (out_valid) begin
            real ref_t, d;
            if (first < 0) begin
              first = cyc;
              checks++;
              if (cyc != LAT) begin failures++; $display("FAIL latency %0d", cyc); end
            end
            ref_t = $atan2(real'(sq[n]), real'(si[n])) / (2.0 * PI) * 65536.0;
            d = real'(phase) - ref_t;
            if (d > 32768.0) d -= 65536.0;
            if (d < -32768.0) d += 65536.0;
            checks++;
            if (d > 3.0 || d < -3.0) begin
              failures++;
              if (failures < 10) $display("FAIL n=%0d i=%0d q=%0d got %0d want %f", n, si[n], sq[n], phase, ref_t);
            end
            n++;
          end
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
