// CIC decimator test at R = 16, order 3. The expected output is computed
// as a direct FIR with the impulse response of three cascaded length-R
// boxcars, divided by R^3 (floor), at every R-th input. The alignment
// (pipeline delay) is found on the first outputs and then must hold for
// every later output. Also checks one output per R valid inputs and that a
// constant input is passed unchanged.
module tb_ddc_decimator;
  localparam int DW = 24, LOG2R = 4, ORDER = 3, R = 1 << LOG2R;
  localparam int HL = ORDER * (R - 1) + 1;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic signed [DW-1:0] in_data, out_data;
  int checks = 0, failures = 0;

  ddc_decimator #(.DW(DW), .LOG2R(LOG2R), .ORDER(ORDER)) dut (.*);

  longint h [HL];
  longint xs [$];
  int nin = 0, nout = 0;

  function automatic longint fir_at(int n);   // output for last sample index n
    longint s = 0;
    for (int k = 0; k < HL; k++) if (n - k >= 0) s += h[k] * xs[n - k];
    return s >>> (ORDER * LOG2R);   // floor division
  endfunction

  initial begin
    longint b [HL];
    int D;
    // h = boxcar * boxcar * boxcar
    for (int k = 0; k < HL; k++) h[k] = (k < R) ? 1 : 0;
    for (int o = 1; o < ORDER; o++) begin
      for (int k = 0; k < HL; k++) begin
        b[k] = 0;
        for (int j = 0; j < R; j++) if (k - j >= 0) b[k] += h[k - j];
      end
      h = b;
    end
    D = -1;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 20000; t++) begin
      logic v;
      logic signed [DW-1:0] x;
      v = ($urandom_range(0, 3) != 0);
      x = (t < 15000) ? DW'($urandom_range(0, 2000000)) - DW'(1000000) : DW'(-123456);
      in_valid <= v; in_data <= x;
      if (v) begin xs.push_back(x); nin++; end
      @(posedge clk); #1;
      if (out_valid) begin
        nout++;
        if (D < 0) begin
          // find the delay that explains the first output
          for (int d = 0; d < 4 * R; d++)
            if (nin - 1 - d >= 0 && fir_at(nin - 1 - d) == longint'(out_data) && D < 0) D = d;
          checks++;
          if (D < 0) begin failures++; $display("FAIL no alignment found"); D = 0; end
        end else begin
          checks++;
          if (fir_at(nin - 1 - D) != longint'(out_data)) begin
            failures++;
            if (failures < 10) $display("FAIL out %0d got %0d want %0d", nout, out_data, fir_at(nin - 1 - D));
          end
        end
      end
    end
    checks++;
    if (out_data != -DW'(123456)) begin failures++; $display("FAIL dc gain %0d", out_data); end
    checks++;
    if (nout < nin / R - 1 || nout > nin / R) begin failures++; $display("FAIL rate %0d outputs for %0d inputs", nout, nin); end
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
