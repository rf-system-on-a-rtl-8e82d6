// LMS system identification test. An unknown 8-tap FIR (the "system")
// produces d from random x; the 16-tap LMS filter must converge so that its
// weights match the system's taps (zero beyond tap 7) and the error gets
// small. Then adaptation is frozen and every output must equal the exact
// FIR sum of the frozen weights computed here, with latency TAPS+2; the
// adapting latency must be 2*TAPS+2. clear must zero the weights.
module tb_lms_filter;
  localparam int TAPS = 16, DW = 18, WW = 24, FRAC = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic clear = 0, adapt = 1, in_valid = 0, ready, out_valid;
  logic [5:0] mu_shift = 6'd16;
  logic signed [DW-1:0] x, d, y, e;
  logic [3:0] w_idx;
  logic signed [WW-1:0] w_val;
  int checks = 0, failures = 0;

  lms_filter #(.TAPS(TAPS), .DW(DW), .WW(WW), .FRAC(FRAC)) dut (.*);

  longint h [8] = '{40000, -20000, 12000, 65536, -30000, 5000, 0, -7000};
  longint xh [TAPS];

  task automatic push(input longint xv, output int lat);
    longint dv;
    for (int k = TAPS - 1; k > 0; k--) xh[k] = xh[k-1];
    xh[0] = xv;
    dv = 0;
    for (int k = 0; k < 8; k++) dv += h[k] * xh[k];
    dv = dv >>> FRAC;
    @(posedge clk iff ready);
    in_valid <= 1; x <= DW'(xv); d <= DW'(dv);
    @(posedge clk);
    in_valid <= 0;
    lat = 1;
    while (!out_valid) begin @(posedge clk); #1; lat++; end
  endtask

  initial begin
    int lat;
    longint w_now [TAPS];
    for (int k = 0; k < TAPS; k++) xh[k] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      push(longint'($urandom_range(0, 40000)) - 20000, lat);
      if (n == 10) begin
        checks++;
        if (lat != 2 * TAPS + 2) begin failures++; $display("FAIL adapt latency %0d", lat); end
      end
    end
    checks++;
    if (e > 50 || e < -50) begin failures++; $display("FAIL residual error %0d", e); end
    for (int k = 0; k < TAPS; k++) begin
      longint want;
      w_idx = 4'(k); #1;
      want = (k < 8) ? h[k] : 0;
      w_now[k] = w_val;
      checks++;
      if (longint'(w_val) - want > 200 || want - longint'(w_val) > 200) begin
        failures++; $display("FAIL w[%0d]=%0d want %0d", k, w_val, want);
      end
    end
    // frozen: exact FIR with the learnt weights
    adapt = 0;
    for (int n = 0; n < 200; n++) begin
      longint s;
      push(longint'($urandom_range(0, 40000)) - 20000, lat);
      s = 0;
      for (int k = 0; k < TAPS; k++) s += w_now[k] * xh[k];
      s = s >>> FRAC;
      checks++;
      if (longint'(y) != s || lat != TAPS + 2) begin
        failures++;
        if (failures < 10) $display("FAIL frozen y=%0d want %0d lat=%0d", y, s, lat);
      end
    end
    clear <= 1; @(posedge clk); clear <= 0; @(posedge clk);
    w_idx = 4'd3; #1;
    checks++;
    if (w_val != 0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
