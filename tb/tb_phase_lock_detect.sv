// Checks that lock asserts exactly after HOLD+1 in-window samples, drops
// on the first out-of-window sample (both signs), ignores invalid samples
// and uses the 36-degree window.
module tb_phase_lock_detect;
  localparam int HOLD = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic err_valid = 0, locked;
  logic signed [15:0] err;
  logic [15:0] threshold = 16'd6554;
  int checks = 0, failures = 0;

  phase_lock_detect #(.PH_W(16), .HOLD(HOLD)) dut (.*);

  initial begin
    int run;
    run = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 3000; t++) begin
      logic v, in_win;
      logic signed [15:0] e;
      v = ($urandom_range(0, 9) != 0);
      in_win = ($urandom_range(0, 40) != 0);
      e = in_win ? 16'($urandom_range(0, 13108)) - 16'sd6554
                 : ($urandom_range(0, 1) ? 16'sd6555 + 16'($urandom_range(0, 20000))
                                         : -16'sd6555 - 16'($urandom_range(0, 20000)));
      err_valid <= v; err <= e;
      @(posedge clk); #1;
      if (v) run = in_win ? run + 1 : 0;
      checks++;
      if (locked !== (run >= HOLD + 1)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d run=%0d locked=%0d", t, run, locked);
      end
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
