// Peak assessment: width, half-bandwidth and quality factor of a
// resonance peak found in a spectrum frame.
//
// The block keeps a copy of the latest frame (same stream as the peak
// detector, bin 0 first, last on the final bin). On start it reads the
// peak bin p, then walks left and then right counting the neighbouring
// bins whose power is above half the peak power (-3 dB). With width =
// 1 + left count + right count:
//   half-bandwidth = width/2 bins       (hbw, one fractional bit)
//   Q = f0 / full width = p / width    (q_factor, QF fractional bits)
// computed with a restoring divider, one quotient bit per clock. The
// document states that a peak's quality factor and half-bandwidth are
// calculated; the half-power walk, the bin units and the divider are this
// design's choice. Frequencies are in bins, so Q needs no scaling.
//
// Timing: start is taken when busy is low; done pulses
// 4 + left + right + (BW+QF) clocks after it (one clock less when the left
// walk runs into bin 0, two less when the peak is bin 0). Writing a frame while busy is allowed
// but then the result mixes two frames.
module vna_peak_assess #(
  parameter int unsigned MW    = 24,
  parameter int unsigned NBINS = 1024,
  parameter int unsigned QF    = 8
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       in_valid,
  input  logic [MW-1:0]              in_mag,
  input  logic                       in_last,
  input  logic                       start,
  input  logic [$clog2(NBINS)-1:0]   peak_bin,
  output logic                       busy,
  output logic                       done,
  output logic [$clog2(NBINS):0]     width,     // bins above half power
  output logic [$clog2(NBINS):0]     hbw,       // half-bandwidth, 1 fractional bit
  output logic [$clog2(NBINS)+QF-1:0] q_factor
);
  localparam int unsigned BW = $clog2(NBINS);
  localparam int unsigned NW = BW + QF;

  typedef enum logic [2:0] {IDLE, PEAK, LEFT, RIGHT, DIV, FIN} state_e;
  state_e state;

  logic [MW-1:0] mem [NBINS];
  logic [BW-1:0] wr_addr;

  always_ff @(posedge clk) begin
    if (rst) wr_addr <= '0;
    else if (in_valid) begin
      mem[wr_addr] <= in_mag;
      wr_addr <= in_last ? '0 : wr_addr + 1'b1;
    end
  end

  logic [BW-1:0] p, a;
  logic [MW-1:0] half;
  logic [BW:0]   wcnt;
  logic [NW-1:0] num, quo;
  logic [BW:0]   rem;
  logic [$clog2(NW+1)-1:0] dcnt;

  logic [BW+1:0] trial;
  assign trial = {rem, num[NW-1]} - {1'b0, wcnt};

  assign busy = (state != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; done <= 1'b0;
      p <= '0; a <= '0; half <= '0; wcnt <= '0;
      num <= '0; quo <= '0; rem <= '0; dcnt <= '0;
      width <= '0; hbw <= '0; q_factor <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          p <= peak_bin;
          a <= peak_bin;
          state <= PEAK;
        end
        PEAK: begin
          half <= mem[p] >> 1;
          wcnt <= (BW+1)'(1);
          if (p == '0) begin a <= p; state <= RIGHT; end
          else begin a <= p - 1'b1; state <= LEFT; end
        end
        LEFT: begin
          if (mem[a] > half) begin
            wcnt <= wcnt + 1'b1;
            if (a == '0) begin a <= p; state <= RIGHT; end
            else a <= a - 1'b1;
          end else begin
            a <= p;
            state <= RIGHT;
          end
        end
        RIGHT: begin
          // a starts at p and is advanced before each comparison
          if (a == BW'(NBINS - 1)) state <= DIV;
          else if (mem[a + 1'b1] > half) begin
            wcnt <= wcnt + 1'b1;
            a <= a + 1'b1;
          end else state <= DIV;
          num  <= {p, QF'(0)};
          quo  <= '0;
          rem  <= '0;
          dcnt <= '0;
        end
        DIV: begin
          // restoring division num / wcnt, MSB first
          if (!trial[BW+1]) begin
            rem <= trial[BW:0];
            quo <= {quo[NW-2:0], 1'b1};
          end else begin
            rem <= {rem[BW-1:0], num[NW-1]};
            quo <= {quo[NW-2:0], 1'b0};
          end
          num  <= num << 1;
          dcnt <= dcnt + 1'b1;
          if (dcnt == ($clog2(NW+1))'(NW - 1)) state <= FIN;
        end
        FIN: begin
          width    <= wcnt;
          hbw      <= wcnt;        // width/2 with one fractional bit
          q_factor <= quo;
          done     <= 1'b1;
          state    <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
