// multimode_sync: multimode OFDM synchronizer for IEEE 802.11a/g and 802.16d.
//
// One datapath serves both standards; mode picks the delays and the CFO
// step. The chain follows the combined architecture (frequency correction
// first, time-domain integral CFO and symbol boundary detection after):
//   1. frame_detect finds the frame with a delayed autocorrelation (D = 16 or
//      64, L = 64) and hands over Max_c.
//   2. Meanwhile every input sample is written into sample_buffer. frac_cfo
//      estimates the fractional CFO from Max_c with the shared CORDIC and
//      then replays the buffer, starting REWIND samples before the detection
//      point, through the same CORDIC to remove it.
//   3. In 802.16d mode int_cfo searches the corrected stream for the residual
//      integral CFO (-12..12 subcarriers in steps of 4); its estimate is added
//      to the phase step of the same CORDIC. In 802.11a/g mode this stage is
//      bypassed.
//   4. sbd finds the long-preamble boundary in the corrected stream, moving it
//      forward to the first path when a later path is the strongest.
//   5. fft_position keeps the last FFT_DEPTH corrected samples and, once the
//      boundary search has ended, passes the stream on to the FFT starting
//      at the boundary (fft_*).
// The corrected samples also leave directly on out_valid/out/out_idx at the
// input rate; out_idx numbers samples from 0 at restart, as do frame_idx,
// boundary_idx and fft_idx. Reference
// sign sequences (seven integral-CFO hypotheses and one long-preamble
// sequence per mode) are loaded through ref_*. The replay offset, window
// lengths and reference loading port are this design's choices.
//
// Timing: with continuous input, theta_valid comes MAXC_WIN samples after
// frame_det plus about six cycles; the buffer backlog stays near
// REWIND + MAXC_WIN samples and must stay below BUF_DEPTH. sync_done comes
// SBD_WIN correlation outputs after the boundary search starts; the
// boundary must then still be among the last FFT_DEPTH corrected samples
// (about 215 back in 802.11a/g and 265 in 802.16d with the defaults), or
// fft_late is raised. The first forwarded sample follows sync_done by two
// cycles.
module multimode_sync
  import sync_pkg::*;
#(
  parameter int BUF_DEPTH = 256,
  parameter int REWIND    = 128,
  parameter int L         = 64,
  parameter int MAXC_WIN  = 64,
  parameter int ICFO_WIN  = 192,
  parameter int SBD_WIN   = 400,
  parameter int FFT_DEPTH = 300,
  parameter int IDXW      = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  restart,
  input  mode_e                 mode,
  input  logic                  in_valid,
  input  cplx_t                 in,
  // reference sequences: ref_target 0 = integral CFO (ref_sel = hypothesis),
  // 1 = symbol boundary (ref_sel[0] = mode)
  input  logic                  ref_we,
  input  logic                  ref_target,
  input  logic [2:0]            ref_sel,
  input  logic [5:0]            ref_addr,
  input  csign_t                ref_data,
  output logic                  frame_det,
  output logic [IDXW-1:0]       frame_idx,
  output logic                  theta_valid,
  output logic signed [ZW-1:0]  theta,
  output logic                  theta_mirror,   // estimate needed the mirror step
  output logic signed [23:0]    phase_inc,      // per-sample phase step (2^24 = 2*pi)
  output logic                  icfo_done,
  output logic signed [5:0]     icfo_eps,
  output logic                  sync_done,
  output logic [IDXW-1:0]       boundary_idx,
  output logic [IDXW-1:0]       sbd_ref_idx,
  output logic                  boundary_moved,
  output logic                  out_valid,
  output cplx_t                 out,
  output logic [IDXW-1:0]       out_idx,
  output logic                  fft_valid,
  output logic                  fft_first,      // first sample of the boundary window
  output cplx_t                 fft_out,
  output logic [IDXW-1:0]       fft_idx,
  output logic                  fft_late        // boundary already left the buffer
);
  localparam int AW = $clog2(BUF_DEPTH);
  localparam int CW = 32;

  // ---- input side
  logic [IDXW-1:0] wr_idx;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       wr_idx <= '0;
    else if (restart) wr_idx <= '0;
    else if (in_valid) wr_idx <= wr_idx + 1'b1;
  end

  logic                 maxc_valid;
  logic signed [CW-1:0] max_c_re, max_c_im;

  frame_detect #(.L(L), .MAXC_WIN(MAXC_WIN), .CW(CW)) u_fd (
    .clk, .rst_n, .clear(restart), .mode, .in_valid, .in,
    .det(frame_det), .maxc_valid, .max_c_re, .max_c_im, .c_mag(), .p_max()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         frame_idx <= '0;
    else if (frame_det) frame_idx <= wr_idx;
  end

  // ---- buffer and replay
  logic            rd_en, rd_valid;
  logic [IDXW-1:0] rd_idx, rd_idx_q;
  logic [2*DW-1:0] rd_data;
  logic            fc_run;

  sample_buffer #(.DEPTH(BUF_DEPTH), .W(2*DW)) u_buf (
    .clk, .wr_en(in_valid), .wr_addr(wr_idx[AW-1:0]), .wr_data(in),
    .rd_en, .rd_addr(rd_idx[AW-1:0]), .rd_data
  );

  assign rd_en = fc_run && (rd_idx < wr_idx) && !restart;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_idx   <= '0;
      rd_idx_q <= '0;
      rd_valid <= 1'b0;
    end else if (restart) begin
      rd_idx   <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= rd_en;
      rd_idx_q <= rd_idx;
      if (maxc_valid)
        rd_idx <= (frame_idx > IDXW'(REWIND)) ? frame_idx - IDXW'(REWIND) : '0;
      else if (rd_en)
        rd_idx <= rd_idx + 1'b1;
    end
  end

  // the replayed sample must not have been overwritten yet
  assert property (@(posedge clk) disable iff (!rst_n)
    rd_en |-> (wr_idx - rd_idx) <= IDXW'(BUF_DEPTH))
    else $error("sample buffer overrun");

  // ---- fractional CFO estimation and compensation
  logic              fc_icfo_valid;

  frac_cfo #(.CW(CW), .IDXW(IDXW)) u_fc (
    .clk, .rst_n, .clear(restart), .mode,
    .maxc_valid, .max_c_re, .max_c_im,
    .theta_valid, .theta, .theta_mirror, .run(fc_run),
    .in_valid(rd_valid), .in(rd_data), .in_idx(rd_idx_q),
    .icfo_valid(fc_icfo_valid), .icfo_eps,
    .out_valid, .out, .out_idx, .phase_inc
  );

  // ---- integral CFO (802.16d only)
  logic       icfo_start;

  assign icfo_start = theta_valid && (mode == MODE_WMAN);

  int_cfo #(.N(64), .WIN(ICFO_WIN)) u_icfo (
    .clk, .rst_n, .start(icfo_start), .in_valid(out_valid), .in(out),
    .ref_we(ref_we && !ref_target), .ref_sel, .ref_addr, .ref_data,
    .done(icfo_done), .eps(icfo_eps), .best(), .busy()
  );
  assign fc_icfo_valid = icfo_done;

  // ---- symbol boundary detection
  logic sbd_start;
  assign sbd_start = (theta_valid && mode == MODE_WLAN) || icfo_done;

  sbd #(.N(64), .WIN(SBD_WIN), .IDXW(IDXW)) u_sbd (
    .clk, .rst_n, .start(sbd_start), .mode,
    .in_valid(out_valid), .in(out), .in_idx(out_idx),
    .ref_we(ref_we && ref_target), .ref_mode(mode_e'(ref_sel[0])), .ref_addr, .ref_data,
    .busy(), .done(sync_done), .boundary_idx, .ref_idx(sbd_ref_idx),
    .moved(boundary_moved)
  );

  // ---- FFT data forwarding
  fft_position #(.DEPTH(FFT_DEPTH), .IDXW(IDXW)) u_fft_pos (
    .clk, .rst_n, .clear(restart),
    .in_valid(out_valid), .in(out), .in_idx(out_idx),
    .start(sync_done), .boundary_idx,
    .out_valid(fft_valid), .out_first(fft_first), .out(fft_out), .out_idx(fft_idx),
    .late(fft_late)
  );
endmodule
