// sbd: symbol boundary detection on the frequency-corrected stream.
//
// Step 1 cross-correlates the last N = 64 samples with the first 64 samples
// of the long preamble, reduced to signs (conj(p) = +-1 -+ j, so each tap is
// an add or subtract):   M(t) = sum_k r(t-N+1+k) * conj(p(k)).
// Step 2 uses the repetition of the long preamble: with D = 128 (802.16d)
// or 64 (802.11a/g), MM(n) = |M(n)| + |M(n+D)| peaks at the reference
// boundary n_ref. Because the strongest path need not be the first one,
// step 3 searches the SRCH = 10 correlation positions in front of n_ref and
// takes the earliest whose |M| exceeds half of the largest |M| seen; the
// FFT window then starts on the first path instead of inside the ISI zone.
//
// Magnitudes use the a + b/4 approximation. A delay line of D + SRCH + 1
// magnitudes provides |M(n)| and the ten values in front of it; when MM
// sets a new maximum those eleven values are copied. start opens a window of
// WIN correlation outputs (counter_SBD); at its end done pulses with
// boundary_idx, the index (in_idx numbering) of the first sample of the
// detected long-preamble half, plus ref_idx for n_ref and a flag telling
// whether the earlier-path search moved it. Reference signs for both modes
// are written through ref_we/ref_mode/ref_addr/ref_data; fft_position uses
// boundary_idx to pass the stored data on to the FFT. Using signs for the
// reference, the window length (400 outputs, enough to pass both standards'
// long preambles after the start points the top uses while keeping the
// boundary within the 300-sample forwarding buffer) and this reporting form
// are this design's choices.
module sbd
  import sync_pkg::*;
#(
  parameter int N      = 64,
  parameter int D_WMAN = 128,
  parameter int D_WLAN = 64,
  parameter int SRCH   = 10,
  parameter int WIN    = 400,
  parameter int IDXW   = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  mode_e                 mode,
  input  logic                  in_valid,
  input  cplx_t                 in,
  input  logic [IDXW-1:0]       in_idx,
  input  logic                  ref_we,
  input  mode_e                 ref_mode,
  input  logic [$clog2(N)-1:0]  ref_addr,
  input  csign_t                ref_data,
  output logic                  busy,
  output logic                  done,
  output logic [IDXW-1:0]       boundary_idx,
  output logic [IDXW-1:0]       ref_idx,
  output logic                  moved
);
  localparam int MW   = DW + $clog2(N) + 1;           // correlation width
  localparam int DMAX = (D_WMAN > D_WLAN) ? D_WMAN : D_WLAN;
  localparam int LD   = DMAX + SRCH + 1;              // magnitude delay line
  localparam int CNTW = $clog2(WIN + 1);

  csign_t [N-1:0] refs [2];
  always_ff @(posedge clk) begin
    if (ref_we) refs[ref_mode][ref_addr] <= ref_data;
  end

  // ---- step 1: correlation over the sample window
  cplx_t win [N];                 // win[N-1] newest
  cplx_t win_nx [N];
  logic signed [MW-1:0] m_re, m_im;
  logic        [MW-1:0] m_mag;
  logic [$clog2(N):0]   fill;

  always_comb begin
    for (int k = 0; k < N - 1; k++) win_nx[k] = win[k+1];
    win_nx[N-1] = in;
    m_re = '0;
    m_im = '0;
    for (int k = 0; k < N; k++) begin
      // (a + jb) * (pr - j pi) with pr, pi = +-1
      m_re = refs[mode][k].re ? m_re - MW'(win_nx[k].re) : m_re + MW'(win_nx[k].re);
      m_re = refs[mode][k].im ? m_re - MW'(win_nx[k].im) : m_re + MW'(win_nx[k].im);
      m_im = refs[mode][k].re ? m_im - MW'(win_nx[k].im) : m_im + MW'(win_nx[k].im);
      m_im = refs[mode][k].im ? m_im + MW'(win_nx[k].re) : m_im - MW'(win_nx[k].re);
    end
  end

  avac #(.W(MW)) u_mag (.i_in(m_re), .q_in(m_im), .mag(m_mag));

  // ---- step 2/3: MM peak with the ten magnitudes in front of it
  logic [MW-1:0]   mline [LD];            // mline[k] = |M(t-1-k)| before this sample
  logic [MW:0]     mm, mm_max;
  logic [MW-1:0]   m_max;
  logic [MW-1:0]   snap [SRCH+1];         // snap[k] = |M(n_ref - SRCH + k)|
  logic [IDXW-1:0] nref_t;                // in_idx of the newest sample at n_ref
  logic [CNTW-1:0] cnt;
  logic            finish;
  int unsigned     d_cur;

  always_comb begin
    d_cur = (mode == MODE_WMAN) ? D_WMAN : D_WLAN;
    // |M(t-D)| is mline[D-1]
    mm = {1'b0, m_mag} + {1'b0, mline[d_cur-1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      fill   <= '0;
      cnt    <= '0;
      mm_max <= '0;
      m_max  <= '0;
      nref_t <= '0;
      finish <= 1'b0;
      for (int k = 0; k < N; k++) win[k] <= '0;
      for (int k = 0; k < LD; k++) mline[k] <= '0;
      for (int k = 0; k <= SRCH; k++) snap[k] <= '0;
    end else if (start) begin
      busy   <= 1'b1;
      fill   <= '0;
      cnt    <= '0;
      mm_max <= '0;
      m_max  <= '0;
      finish <= 1'b0;
      for (int k = 0; k < LD; k++) mline[k] <= '0;
    end else begin
      finish <= 1'b0;
      if (busy && in_valid) begin
        for (int k = 0; k < N; k++) win[k] <= win_nx[k];
        if (fill != ($clog2(N)+1)'(N)) fill <= fill + 1'b1;
        // a correlation value counts once the window is full
        if (fill >= ($clog2(N)+1)'(N - 1)) begin
          for (int k = LD - 1; k > 0; k--) mline[k] <= mline[k-1];
          mline[0] <= m_mag;
          if (m_mag > m_max) m_max <= m_mag;
          if (mm > mm_max) begin
            mm_max <= mm;
            nref_t <= in_idx - IDXW'(d_cur);
            for (int k = 0; k <= SRCH; k++) snap[k] <= mline[d_cur - 1 + SRCH - k];
          end
          cnt <= cnt + 1'b1;
          if (cnt == CNTW'(WIN - 1)) begin
            busy   <= 1'b0;
            finish <= 1'b1;
          end
        end
      end
    end
  end

  // earliest position in front of n_ref above max|M| / 2
  logic [$clog2(SRCH+1)-1:0] first;
  always_comb begin
    first = ($clog2(SRCH+1))'(SRCH);
    for (int k = SRCH; k >= 0; k--)
      if (snap[k] > (m_max >> 1)) first = ($clog2(SRCH+1))'(k);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done         <= 1'b0;
      boundary_idx <= '0;
      ref_idx      <= '0;
      moved        <= 1'b0;
    end else begin
      done <= finish;
      if (finish) begin
        // newest-sample index -> index of the window's first sample
        ref_idx      <= nref_t - IDXW'(N - 1);
        boundary_idx <= nref_t - IDXW'(N - 1) - IDXW'(SRCH) + IDXW'(first);
        moved        <= (first != ($clog2(SRCH+1))'(SRCH));
      end
    end
  end
endmodule
