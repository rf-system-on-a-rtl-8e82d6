// End-to-end test of the observer chain at NBINS = 256. A frame with three
// resonance peaks (one below threshold) must activate exactly two filters,
// tuned to the two peak bins; the measured detuning (two tones at those
// frequencies plus noise) must then be estimated better than it is
// measured. A second frame with a single peak must switch one filter off.
// After each frame the coefficients of every active filter must describe
// a pole at the peak frequency, angle 2*pi*bin/(2*NBINS) within 0.002 rad,
// with a radius between 0.95 and 1, and the peak count must match.
module tb_microphonics_observer;
  localparam real PI = 3.14159265358979323846;
  localparam int NF = 4, NB = 256, MW = 24, DW = 24;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic spec_valid = 0, spec_last = 0, z_valid = 0, est_valid, busy;
  logic [MW-1:0] spec_mag;
  logic signed [NF-1:0][17:0] slot_k1, slot_k2;
  logic signed [DW-1:0] z, est;
  logic [NF-1:0] active;
  logic [$clog2(NF+1)-1:0] peak_count;
  int checks = 0, failures = 0;

  microphonics_observer #(.NF(NF), .NBINS(NB), .MW(MW), .DW(DW)) dut (
    .clk, .rst, .spec_valid, .spec_mag, .spec_last, .peak_threshold(24'd20000),
    .slot_k1, .slot_k2, .z_valid, .z, .est_valid, .est, .active, .peak_count, .busy);

  task automatic send_frame(input int c0, input int a0, input int c1, input int a1, input int c2, input int a2);
    for (int k = 0; k < NB; k++) begin
      int v, cs [3], as [3];
      cs = '{c0, c1, c2}; as = '{a0, a1, a2};
      v = 100;
      for (int p = 0; p < 3; p++) begin
        int dk, t;
        dk = k - cs[p];
        t = as[p] / (1 + dk * dk);
        if (t > v) v = t;
      end
      spec_valid <= 1; spec_mag <= MW'(v); spec_last <= (k == NB - 1);
      @(posedge clk);
    end
    spec_valid <= 0; spec_last <= 0;
    repeat (4) @(posedge clk);
    while (busy) @(posedge clk);
    repeat (30) @(posedge clk);
  endtask

  task automatic check_pole(input int slot, input int bin);
    real c, sn, ang, rad;
    c   = real'($signed(dut.u_bank.coef_c[slot]));
    sn  = real'($signed(dut.u_bank.coef_s[slot]));
    ang = $atan2(sn, c);
    rad = $sqrt(c * c + sn * sn) / 65536.0;
    checks++;
    if (ang - 2.0 * PI * real'(bin) / real'(2 * NB) > 0.002 || ang - 2.0 * PI * real'(bin) / real'(2 * NB) < -0.002) begin
      failures++; $display("FAIL slot %0d angle %f for bin %0d", slot, ang, bin);
    end
    checks++;
    if (rad < 0.95 || rad >= 1.0) begin failures++; $display("FAIL slot %0d radius %f", slot, rad); end
  endtask

  initial begin
    real se_est, se_noise;
    // steady-state gains for r = 0.99385 and process/measurement noise 0.01
    slot_k1 = '{18'sd0, 18'sd0, 18'sd7384, 18'sd7440};
    slot_k2 = '{18'sd0, 18'sd0, -18'sd1206, -18'sd611};
    repeat (3) @(posedge clk);
    rst <= 0;
    send_frame(20, 2000000, 75, 900000, 140, 15000);
    checks++;
    if (active != 4'b0011 || peak_count != 2) begin failures++; $display("FAIL active %b count %0d", active, peak_count); end
    checks++;
    // slot 0 = strongest peak (bin 20): theta = 20/512 turn = 2560
    if (dut.u_bank.coef_s[0] == 0 || $signed(dut.u_bank.coef_c[0]) < 60000) begin
      failures++; $display("FAIL slot 0 coefficients %0d %0d", $signed(dut.u_bank.coef_c[0]), $signed(dut.u_bank.coef_s[0]));
    end
    check_pole(0, 20);
    check_pole(1, 75);
    se_est = 0; se_noise = 0;
    for (int n = 0; n < 8000; n++) begin
      real clean, noise;
      clean = 300000.0 * $sin(2.0 * PI * 20.0 / 512.0 * n) + 200000.0 * $cos(2.0 * PI * 75.0 / 512.0 * n + 1.0);
      noise = 100000.0 * (real'($urandom_range(0, 20000)) / 10000.0 - 1.0);
      z_valid <= 1; z <= DW'($rtoi(clean + noise));
      @(posedge clk);
      z_valid <= 0;
      #1;
      if (n > 3000) begin
        se_est += (real'(est) - clean) ** 2;
        se_noise += noise ** 2;
      end
      @(posedge clk);
    end
    $display("estimate rms error %f, noise rms %f", $sqrt(se_est / 5000.0), $sqrt(se_noise / 5000.0));
    checks++;
    if (se_est > 0.36 * se_noise) begin failures++; $display("FAIL estimate not better than measurement"); end
    send_frame(60, 2000000, 200, 1000, 140, 1000);
    checks++;
    if (active != 4'b0001 || peak_count != 1) begin failures++; $display("FAIL second frame active %b count %0d", active, peak_count); end
    check_pole(0, 60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
