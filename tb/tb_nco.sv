// Checks the NCO against real-valued cos/sin of the ideal phase: every lane
// of every clock must be within 2 LSB plus phase-truncation error, lane k
// must be k samples after lane 0, and the output must appear 2 clocks after
// the frequency word is applied. Also checks the phase offset input.
module tb_nco;
  localparam real PI = 3.14159265358979323846;
  localparam int PW = 31, L = 4, AW = 12, OW = 16;
  logic clk = 0, rst = 1, en = 0;
  always #5 clk = ~clk;
  logic [PW-1:0] fcw, ofs;
  logic signed [L-1:0][OW-1:0] i_o, q_o;
  logic [PW-1:0] ph0;
  logic valid;
  int checks = 0, failures = 0;

  nco #(.PHASE_W(PW), .LANES(L), .LUT_AW(AW), .OUT_W(OW)) dut (
    .clk, .rst, .en, .fcw, .phase_ofs(ofs), .i_o, .q_o, .phase0_o(ph0), .valid_o(valid));

  // allowed error: table step (2*pi/4096 rad of amplitude 32767) plus rounding
  localparam real TOL = 32767.0 * 2.0 * PI / 4096.0 + 2.0;

  initial begin
    longint unsigned model_acc;
    int cyc;
    fcw = 31'd348946000; ofs = '0;
    repeat (3) @(posedge clk);
    rst <= 0; en <= 1;
    @(posedge clk);   // first enabled edge: acc = 0 -> ph regs get lanes of 0
    cyc = 0;
    // after 2 edges, valid must be high
    @(posedge clk); #1;
    checks++; if (valid !== 1'b1) begin failures++; $display("FAIL valid latency"); end
    model_acc = 0;
    for (int t = 0; t < 3000; t++) begin
      if (t == 1500) ofs = 31'h2000_0000;   // quarter turn offset
      for (int k = 0; k < L; k++) begin
        real ph, ei, eq;
        longint unsigned p;
        p = (model_acc + longint'(k) * fcw + ((t >= 1502) ? 64'h2000_0000 : 0)) % (64'd1 << PW);
        ph = 2.0 * PI * real'(p) / (2.0 ** PW);
        ei = real'($signed(i_o[k])) - 32767.0 * $cos(ph);
        eq = real'($signed(q_o[k])) - 32767.0 * $sin(ph);
        checks++;
        if (ei > TOL || ei < -TOL || eq > TOL || eq < -TOL) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d lane=%0d i=%0d q=%0d ph=%f", t, k, $signed(i_o[k]), $signed(q_o[k]), ph);
        end
      end
      model_acc = (model_acc + L * fcw) % (64'd1 << PW);
      @(posedge clk); #1;
    end
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
