// Runs the PI controller on random errors and gains against a reference
// model written with 64-bit integers (same saturation rules), checks the
// 1-clock latency, output saturation and that en=0 clears it.
module tb_pi_controller;
  localparam int SHIFT = 8;
  logic clk = 0, rst = 1, en = 0;
  always #5 clk = ~clk;
  logic signed [17:0] kp, ki;
  logic err_valid = 0, u_valid;
  logic signed [23:0] err;
  logic signed [30:0] u;
  int checks = 0, failures = 0;

  pi_controller #(.ERR_W(24), .K_W(18), .OUT_W(31), .SHIFT(SHIFT)) dut (.*);

  initial begin
    longint integ, s, want, imax, umax;
    int sat_hits;
    imax = longint'(1) <<< 48;   // AW = 50
    umax = (longint'(1) <<< 30) - 1;
    integ = 0; sat_hits = 0;
    repeat (3) @(posedge clk);
    rst <= 0; en <= 1;
    for (int t = 0; t < 4000; t++) begin
      logic v;
      v = (t % 4 != 0);
      err_valid <= v;
      kp <= 18'($urandom); ki <= (t < 2000) ? 18'($urandom_range(0, 200)) : 18'sd100000;
      err <= (t < 2000) ? 24'($urandom_range(0, 20000)) - 24'sd10000 : 24'sd8000000;
      @(posedge clk); #1;
      if (v) begin
        integ += longint'(err) * longint'(ki);
        if (integ > imax) integ = imax;
        if (integ < -imax) integ = -imax;
        s = (longint'(err) * longint'(kp) + integ) >>> SHIFT;
        want = s > umax ? umax : (s < -umax - 1 ? -umax - 1 : s);
        if (s > umax) sat_hits++;
        checks++;
        if (longint'(u) != want || !u_valid) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d u=%0d want %0d", t, u, want);
        end
      end
    end
    checks++;
    if (sat_hits == 0) begin failures++; $display("FAIL saturation never exercised"); end
    en <= 0; @(posedge clk); #1;
    checks++;
    if (u != 0) begin failures++; $display("FAIL en=0 output %0d", u); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
