// Drives the unwrapper with the wrapped version of a known continuous
// phase (ramps up and down across +-pi many times, random step sizes below
// half a turn) and checks the output equals the continuous phase, with one
// clock of latency. Also checks that clear restarts from the next sample.
module tb_phase_unwrap;
  logic clk = 0, rst = 1, clear = 0, in_valid = 0, out_valid;
  always #5 clk = ~clk;
  logic signed [15:0] phase_in;
  logic signed [31:0] phase_out;
  int checks = 0, failures = 0;

  phase_unwrap #(.PH_W(16), .UNW_W(32)) dut (.*);

  initial begin
    longint truth, start;
    truth = 40000;
    start = 40000 - 65536;  // first wrapped sample of 40000 is -25536
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 5000; t++) begin
      in_valid <= 1;
      phase_in <= 16'(truth);
      @(posedge clk); #1;
      if (t > 0 || 1) begin
        checks++;
        if (phase_out != 32'(truth - 40000 + start)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d got %0d want %0d", t, phase_out, truth - 40000 + start);
        end
      end
      // next true phase: steps up to +-30000 (< half a turn), drifting
      truth += (t < 2500) ? 20000 + $urandom_range(0, 10000) : -20000 - $urandom_range(0, 10000);
    end
    // clear: the next sample is taken as is
    clear <= 1; @(posedge clk); clear <= 0;
    phase_in <= 16'sd1234; @(posedge clk); #1;
    checks++;
    if (phase_out != 32'sd1234) begin failures++; $display("FAIL clear got %0d", phase_out); end
    checks++;
    if (!out_valid) begin failures++; $display("FAIL out_valid"); end
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
