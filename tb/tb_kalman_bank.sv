// Kalman bank test. Two filters are configured for two tones of a noisy
// detuning signal (0.01 and 0.037 turns per sample). Checks:
//  - the CORDIC-made coefficients against r*cos/r*sin (3 LSB),
//  - every estimate against an integer model of the filter equations run
//    here with the same coefficients (exact),
//  - that the estimate is closer to the clean signal than the noisy
//    measurement is (RMS error below 60 % of the noise RMS),
//  - that switching a filter off removes it from the estimate.
module tb_kalman_bank;
  localparam real PI = 3.14159265358979323846;
  localparam int NF = 4, DW = 24;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic cfg_valid = 0, cfg_enable = 0, cfg_ready, z_valid = 0, est_valid;
  logic [1:0] cfg_idx;
  logic [15:0] cfg_theta;
  logic [16:0] cfg_r;
  logic signed [17:0] cfg_k1, cfg_k2;
  longint k1 [NF], k2 [NF];
  logic signed [DW-1:0] z, est, innovation;
  logic [NF-1:0] active;
  logic signed [NF-1:0][DW-1:0] comp;
  logic signed [NF-1:0][17:0] coef_c, coef_s;
  int checks = 0, failures = 0;

  kalman_bank #(.NF(NF), .DW(DW)) dut (.*);

  longint mx1 [NF], mx2 [NF];

  function automatic longint sat(longint v);
    if (v > (1 <<< (DW - 1)) - 1) return (1 <<< (DW - 1)) - 1;
    if (v < -(1 <<< (DW - 1))) return -(1 <<< (DW - 1));
    return v;
  endfunction

  task automatic configure(int idx, int th, int r, int g1, int g2, bit en);
    @(posedge clk iff cfg_ready);
    cfg_valid <= 1; cfg_idx <= 2'(idx); cfg_theta <= 16'(th); cfg_r <= 17'(r); cfg_enable <= en;
    cfg_k1 <= 18'(g1); cfg_k2 <= 18'(g2); k1[idx] = g1; k2[idx] = g2;
    @(posedge clk);
    cfg_valid <= 0;
    repeat (25) @(posedge clk);
  endtask

  initial begin
    real se_est, se_noise;
    int nsum;
    repeat (3) @(posedge clk);
    rst <= 0;
    // steady-state gains for process/measurement noise ratio 0.001
    configure(0, 655, 65536, 2788, -322, 1);
    configure(1, 2425, 65500, 2656, -660, 1);
    checks++;
    if (active != 4'b0011) begin failures++; $display("FAIL active %b", active); end
    for (int f = 0; f < 2; f++) begin
      real th, r, wc, ws;
      th = 2.0 * PI * real'(f == 0 ? 655 : 2425) / 65536.0;
      r  = real'(f == 0 ? 65536 : 65500);
      wc = r * $cos(th); ws = r * $sin(th);
      checks++;
      if ((real'($signed(coef_c[f])) - wc) > 3.0 || (wc - real'($signed(coef_c[f]))) > 3.0 ||
          (real'($signed(coef_s[f])) - ws) > 3.0 || (ws - real'($signed(coef_s[f]))) > 3.0) begin
        failures++; $display("FAIL coef %0d: %0d %0d want %f %f", f, coef_c[f], coef_s[f], wc, ws);
      end
    end
    for (int f = 0; f < NF; f++) begin mx1[f] = 0; mx2[f] = 0; end
    se_est = 0; se_noise = 0; nsum = 0;
    for (int n = 0; n < 6000; n++) begin
      real clean, noise;
      longint psum, nu, esum, p1, p2;
      bit off;
      off = (n >= 4000);
      if (n == 4000) begin
        // switch filter 1 off
        cfg_valid <= 1; cfg_idx <= 2'd1; cfg_enable <= 0;
        @(posedge clk); cfg_valid <= 0;
      end
      clean = 400000.0 * $sin(2.0 * PI * 655.0 / 65536.0 * n + 0.3)
            + (off ? 0.0 : 250000.0 * $cos(2.0 * PI * 2425.0 / 65536.0 * n));
      noise = 150000.0 * (real'($urandom_range(0, 20000)) / 10000.0 - 1.0);
      z_valid <= 1; z <= DW'($rtoi(clean + noise));
      @(posedge clk);
      z_valid <= 0;
      #1;
      // model
      psum = 0;
      for (int f = 0; f < 2; f++) begin
        if (f == 1 && off) continue;
        p1 = sat((longint'($signed(coef_c[f])) * mx1[f] - longint'($signed(coef_s[f])) * mx2[f]) >>> 16);
        psum += p1;
      end
      nu = sat(longint'($rtoi(clean + noise)) - psum);
      esum = 0;
      for (int f = 0; f < 2; f++) begin
        if (f == 1 && off) continue;
        p1 = sat((longint'($signed(coef_c[f])) * mx1[f] - longint'($signed(coef_s[f])) * mx2[f]) >>> 16);
        p2 = sat((longint'($signed(coef_s[f])) * mx1[f] + longint'($signed(coef_c[f])) * mx2[f]) >>> 16);
        mx1[f] = sat(p1 + ((k1[f] * nu) >>> 16));
        mx2[f] = sat(p2 + ((k2[f] * nu) >>> 16));
        esum += mx1[f];
      end
      checks++;
      if (!est_valid || longint'(est) != sat(esum)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d est %0d want %0d", n, est, sat(esum));
      end
      if ((n > 1000 && n < 4000) || n > 4500) begin
        se_est += (real'(est) - clean) ** 2;
        se_noise += noise ** 2;
        nsum++;
      end
      @(posedge clk);
    end
    checks++;
    if (active != 4'b0001) begin failures++; $display("FAIL active after off %b", active); end
    $display("estimate rms error %f, noise rms %f", $sqrt(se_est / nsum), $sqrt(se_noise / nsum));
    checks++;
    if (se_est > 0.36 * se_noise) begin failures++; $display("FAIL estimate not better than measurement"); end
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
