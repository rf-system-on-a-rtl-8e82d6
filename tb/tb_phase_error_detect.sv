// Random unwrapped reference and feedback phases: checks the saturated
// difference, the difference modulo one turn, the 1-clock latency, that
// err_valid needs both input valids, and the whole-turn correction taken
// on the first pair after reset and after every clear. Phases near both
// ends of the 32-bit range check that the difference is taken modulo 2^32.
module tb_phase_error_detect;
  logic clk = 0, rst = 1, clear = 0;
  always #5 clk = ~clk;
  logic ref_valid = 0, fb_valid = 0, err_valid;
  logic signed [31:0] ref_phase, fb_phase;
  logic signed [23:0] err;
  logic signed [15:0] err_wrapped;
  int checks = 0, failures = 0;

  phase_error_detect #(.UNW_W(32), .PH_W(16), .ERR_W(24)) dut (.*);

  initial begin
    longint corr;
    bit need;
    repeat (3) @(posedge clk);
    rst <= 0;
    need = 1; corr = 0;
    for (int t = 0; t < 3000; t++) begin
      longint d, sat;
      bit clr;
      logic rv, fv;
      clr = (t % 500 == 250);
      clear <= clr;
      rv = (t % 7 != 3); fv = (t % 11 != 5);
      ref_valid <= rv; fb_valid <= fv;
      ref_phase <= (t % 3 == 0) ? 32'($urandom) : 32'($urandom_range(0, 4000000)) - 32'sd2000000;
      fb_phase  <= (t % 5 == 0) ? 32'($urandom) : 32'($urandom_range(0, 4000000)) - 32'sd2000000;
      @(posedge clk); #1;
      checks++;
      if (err_valid !== (rv && fv && !clr)) begin failures++; $display("FAIL valid t=%0d", t); end
      if (clr) begin need = 1; corr = 0; end
      else if (rv && fv) begin
        d = longint'($signed(32'(ref_phase - fb_phase)));   // modulo 2^32
        if (need) begin corr = longint'(16'(d)) - d; need = 0; end
        d += corr;
        sat = d > 8388607 ? 8388607 : (d < -8388608 ? -8388608 : d);
        checks++;
        if (longint'(err) != sat || err_wrapped != 16'(d)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d d=%0d err=%0d wr=%0d", t, d, err, err_wrapped);
        end
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
