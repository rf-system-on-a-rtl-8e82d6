// Inverted piezo excitation test. A random real frame x is turned into
// its spectrum DFT(x)/N here (double precision, rounded), the bins are fed
// in, and the played-out samples must be -x in order, within N/4+2 LSB
// (the rounding of the bins summed by the inverse transform). Nothing may
// be played before the first frame is complete, exc_valid must follow
// tick by one clock, and playback must wrap round the buffer.
module tb_piezo_excitation;
  localparam real PI = 3.14159265358979323846;
  localparam int LOG2N = 4, N = 1 << LOG2N, DW = 24;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, tick = 0, exc_valid, frame_done;
  logic signed [DW-1:0] in_re, in_im, exc;
  int checks = 0, failures = 0, n_done = 0;
  longint x [N];

  piezo_excitation #(.LOG2N(LOG2N), .DW(DW)) dut (.*);

  always @(posedge clk) if (frame_done) n_done++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  task automatic tick_check(input longint expected, input bit played);
    tick = 1; @(posedge clk); #1; tick = 0;
    check(exc_valid == played, "exc_valid in the clock after tick");
    if (played)
      check(exc >= expected - (N / 4 + 2) && exc <= expected + (N / 4 + 2),
            $sformatf("exc %0d expected %0d", exc, expected));
    @(posedge clk); #1;
    check(!exc_valid, "exc_valid without a tick");
  endtask

  initial begin
    real br, bi, a;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    tick_check(0, 0);
    for (int f = 0; f < 3; f++) begin
      for (int k = 0; k < N; k++) x[k] = longint'($urandom_range(0, 1 << 21)) - (1 << 20);
      for (int m = 0; m < N; m++) begin
        br = 0; bi = 0;
        for (int k = 0; k < N; k++) begin
          a = -2.0 * PI * real'(m * k) / real'(N);
          br += real'(x[k]) * $cos(a);
          bi += real'(x[k]) * $sin(a);
        end
        while (!in_ready) begin @(posedge clk); #1; end
        in_valid = 1;
        in_re = DW'($rtoi(br / N + ((br >= 0) ? 0.5 : -0.5)));
        in_im = DW'($rtoi(bi / N + ((bi >= 0) ? 0.5 : -0.5)));
        @(posedge clk); #1;
        in_valid = 0;
      end
      if (f == 0) tick_check(0, 0);        // frame not finished yet
      while (n_done == f) begin @(posedge clk); #1; end
      for (int k = 0; k < N + 3; k++) tick_check(-x[k % N], 1);
      // the read pointer is now 3 past the start; play the rest of the frame
      for (int k = N + 3; k < 2 * N; k++) tick_check(-x[k % N], 1);
    end
    check(n_done == 3, "frame_done count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
