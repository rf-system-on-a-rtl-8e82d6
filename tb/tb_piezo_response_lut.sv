// Piezo response table test: every entry is written with random amplitude
// and phase, then read back in random order; the data must appear exactly
// one clock after the address. Rewriting one entry must change only it.
module tb_piezo_response_lut;
  localparam int LOG2N = 5, N = 1 << LOG2N;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0;
  logic [LOG2N-1:0] wr_addr, rd_addr = '0;
  logic [15:0] wr_amp, rd_amp;
  logic signed [15:0] wr_phase, rd_phase;
  int checks = 0, failures = 0;
  logic [15:0] ma [N], mp [N];

  piezo_response_lut #(.LOG2N(LOG2N)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  task automatic read_check(input int a);
    rd_addr = LOG2N'(a);
    @(posedge clk); #1;
    check(rd_amp == ma[a] && rd_phase == mp[a],
          $sformatf("addr %0d: %0d/%0d expected %0d/%0d", a, rd_amp, rd_phase, ma[a], mp[a]));
  endtask

  initial begin
    @(posedge clk); #1;
    for (int a = 0; a < N; a++) begin
      ma[a] = 16'($urandom); mp[a] = 16'($urandom);
      wr_en = 1; wr_addr = LOG2N'(a); wr_amp = ma[a]; wr_phase = mp[a];
      @(posedge clk); #1;
    end
    wr_en = 0;
    for (int r = 0; r < 4 * N; r++) read_check($urandom_range(0, N - 1));
    ma[3] = 16'h1234; mp[3] = 16'hbeef;
    wr_en = 1; wr_addr = 3; wr_amp = ma[3]; wr_phase = mp[3];
    @(posedge clk); #1;
    wr_en = 0;
    for (int a = 0; a < N; a++) read_check(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
