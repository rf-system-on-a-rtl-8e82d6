// Microphonics observer: peak search on the resonator's frequency
// response and automatic activation of one Kalman filter per peak.
//
// A spectrum frame of the detuning (NBINS power bins from DC to half the
// detuning sample rate, as sent by the processor's VNA function) goes to
// the peak detector and, in parallel, into the assessment block's frame
// memory. When the detector reports its sorted peak list, a sequencer
// walks the NF filter slots: for slot i below the peak count it has peak i
// assessed (width above half power) and configures Kalman filter i with
//   theta = bin / (2*NBINS) turn per sample          (peak frequency)
//   r     = 1 - pi*width/(2*NBINS)                   (pole radius from the
//                                                     half-power width)
// and the gains of slot i; slots beyond the count are switched off. The
// measured detuning z then runs through the bank, whose sum output is the
// estimated detuning. The document gives this sequence (periodic update of
// the frequency response, search for the most distinguishable peaks,
// calculation of quality factor and half-bandwidth, activation of a
// separate Kalman filter per component); the mapping from bin and width to
// theta and r and the gain table are this design's choices.
//
// Timing: frames may arrive while the sequencer is still busy with the
// previous list; a new list is ignored until it has finished.
module microphonics_observer #(
  parameter int unsigned NF    = 4,
  parameter int unsigned NBINS = 1024,
  parameter int unsigned MW    = 24,
  parameter int unsigned DW    = 24
) (
  input  logic                         clk,
  input  logic                         rst,
  // spectrum frames
  input  logic                         spec_valid,
  input  logic [MW-1:0]                spec_mag,
  input  logic                         spec_last,
  input  logic [MW-1:0]                peak_threshold,
  // steady-state gains per slot, Q2.16
  input  logic signed [NF-1:0][17:0]   slot_k1,
  input  logic signed [NF-1:0][17:0]   slot_k2,
  // detuning measurement and estimate
  input  logic                         z_valid,
  input  logic signed [DW-1:0]         z,
  output logic                         est_valid,
  output logic signed [DW-1:0]         est,
  output logic [NF-1:0]                active,
  output logic [$clog2(NF+1)-1:0]      peak_count,
  output logic                         busy
);
  localparam int unsigned BW = $clog2(NBINS);
  localparam int unsigned PH_W = 16;
  localparam int unsigned IW = $clog2(NF);
  localparam int unsigned CW = $clog2(NF + 1);
  // pi * 2^16 / (2*NBINS), rounded
  localparam int unsigned RSTEP = int'((3.14159265358979323846 * 65536.0) / (2.0 * NBINS) + 0.5);

  logic                      pk_valid;
  logic [CW-1:0]             pk_count;
  logic [NF-1:0][BW-1:0]     pk_bin;
  logic [NF-1:0][MW-1:0]     pk_mag_unused;

  vna_peak_detect #(.MW(MW), .NBINS(NBINS), .NPEAK(NF)) u_detect (
    .clk, .rst, .in_valid(spec_valid), .in_mag(spec_mag), .in_last(spec_last),
    .threshold(peak_threshold), .peaks_valid(pk_valid), .count(pk_count),
    .peak_bin(pk_bin), .peak_mag(pk_mag_unused)
  );

  logic          as_start, as_busy, as_done;
  logic [BW-1:0] as_bin;
  logic [BW:0]   as_width, as_hbw_unused;
  logic [BW+7:0] as_q_unused;

  vna_peak_assess #(.MW(MW), .NBINS(NBINS), .QF(8)) u_assess (
    .clk, .rst, .in_valid(spec_valid), .in_mag(spec_mag), .in_last(spec_last),
    .start(as_start), .peak_bin(as_bin), .busy(as_busy), .done(as_done),
    .width(as_width), .hbw(as_hbw_unused), .q_factor(as_q_unused)
  );

  // ---------------- activation sequencer ----------------
  typedef enum logic [2:0] {S_IDLE, S_SLOT, S_WAIT, S_CFG, S_NEXT} seq_e;
  seq_e st;
  logic [IW:0]           slot;
  logic [CW-1:0]         cnt_q;
  logic [NF-1:0][BW-1:0] bins_q;

  logic          cfg_valid, cfg_enable, cfg_ready;
  logic [IW-1:0] cfg_idx;
  logic [PH_W-1:0] cfg_theta;
  logic [16:0]   cfg_r;
  logic signed [17:0] cfg_k1, cfg_k2;

  logic [31:0] damp;
  assign damp = 32'(as_width) * RSTEP;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; slot <= '0; cnt_q <= '0; bins_q <= '0;
      as_start <= 1'b0; as_bin <= '0;
      cfg_valid <= 1'b0; cfg_enable <= 1'b0; cfg_idx <= '0;
      cfg_theta <= '0; cfg_r <= '0; cfg_k1 <= '0; cfg_k2 <= '0;
      peak_count <= '0;
    end else begin
      as_start  <= 1'b0;
      cfg_valid <= 1'b0;
      unique case (st)
        S_IDLE: if (pk_valid) begin
          cnt_q      <= pk_count;
          peak_count <= pk_count;
          bins_q     <= pk_bin;
          slot       <= '0;
          st         <= S_SLOT;
        end
        S_SLOT: begin
          if ((IW+1)'(slot) < (IW+1)'(cnt_q)) begin
            if (!as_busy) begin
              as_bin   <= bins_q[slot[IW-1:0]];
              as_start <= 1'b1;
              st       <= S_WAIT;
            end
          end else if (cfg_ready) begin
            cfg_valid  <= 1'b1;
            cfg_enable <= 1'b0;
            cfg_idx    <= slot[IW-1:0];
            st         <= S_NEXT;
          end
        end
        S_WAIT: if (as_done) st <= S_CFG;
        S_CFG: if (cfg_ready) begin
          cfg_valid  <= 1'b1;
          cfg_enable <= 1'b1;
          cfg_idx    <= slot[IW-1:0];
          cfg_theta  <= PH_W'(bins_q[slot[IW-1:0]]) << (PH_W - BW - 1);
          cfg_r      <= (damp >= 32'd65536) ? 17'd0 : 17'(32'd65536 - damp);
          cfg_k1     <= slot_k1[slot[IW-1:0]];
          cfg_k2     <= slot_k2[slot[IW-1:0]];
          st         <= S_NEXT;
        end
        S_NEXT: begin
          // wait one clock so that cfg_ready reflects the request
          if (slot == (IW+1)'(NF - 1)) st <= S_IDLE;
          else begin
            slot <= slot + 1'b1;
            st   <= S_SLOT;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE) || !cfg_ready;

  logic signed [DW-1:0] innov_unused;
  logic signed [NF-1:0][DW-1:0] comp_unused;
  logic signed [NF-1:0][17:0] cc_unused, cs_unused;

  kalman_bank #(.NF(NF), .DW(DW), .PH_W(PH_W)) u_bank (
    .clk, .rst, .cfg_valid, .cfg_idx, .cfg_enable, .cfg_theta, .cfg_r,
    .cfg_k1, .cfg_k2, .cfg_ready, .z_valid, .z, .est_valid, .est,
    .innovation(innov_unused), .active, .comp(comp_unused),
    .coef_c(cc_unused), .coef_s(cs_unused)
  );
endmodule
