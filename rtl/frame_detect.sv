// frame_detect: delay-and-correlate frame detector with Max_c search.
//
// For every input sample s(t) the block keeps, in iterative (running-sum)
// form over a window of L samples,
//   C(t) = sum_{k<L} s(t-k-D) * conj(s(t-k))    (delayed autocorrelation)
//   P(t) = sum_{k<L} |s(t-k)|^2                  (power of the later samples)
// with D = 64 in 802.16d mode and 16 in 802.11a/g mode and L = 64 for both.
// One complex product and one power term enter the sums per sample; the
// terms leaving the window come from two circular delay lines of L entries.
// |C| is taken with the a + b/4 approximation (avac). A frame is declared at
// the first sample where |C| > 0.8 * max P, max P being the largest P seen
// since the last clear; no division is needed. After detection the block
// follows C for MAXC_WIN more samples and reports the C with the largest
// |C| (Max_c), whose angle carries the fractional CFO.
//
// Interface: one sample per in_valid. det pulses one cycle after the sums
// that crossed the threshold were formed (two cycles after the sample);
// maxc_valid pulses once, MAXC_WIN samples later, with max_c. The block then
// waits for clear. Design choices beyond the algorithm: 0.8 is realised as
// 1/2+1/4+1/32+1/64 (0.797), detection is enabled only once both delay lines
// hold a full window, and the Max_c window length.
module frame_detect
  import sync_pkg::*;
#(
  parameter int L        = 64,    // accumulation window
  parameter int D_WMAN   = 64,    // correlation delay, 802.16d
  parameter int D_WLAN   = 16,    // correlation delay, 802.11a/g
  parameter int MAXC_WIN = 64,    // samples searched for Max_c after detection
  parameter int CW       = 32     // width of the running sums
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,      // restart the search
  input  mode_e                mode,
  input  logic                 in_valid,
  input  cplx_t                in,
  output logic                 det,        // frame found (pulse)
  output logic                 maxc_valid, // max_c ready (pulse)
  output logic signed [CW-1:0] max_c_re,
  output logic signed [CW-1:0] max_c_im,
  output logic        [CW-1:0] c_mag,      // current |C| (approximate)
  output logic        [CW-1:0] p_max       // current max P
);
  localparam int DMAX = (D_WMAN > D_WLAN) ? D_WMAN : D_WLAN;
  localparam int PW   = 2*DW + 1;          // width of one product term
  localparam int CNTW = $clog2(DMAX + L + 1) + 1;

  typedef enum logic [1:0] {S_SEARCH, S_TRACK, S_DONE} state_e;
  state_e state;

  // sample delay line (circular, DMAX deep)
  cplx_t                    sdl   [DMAX];
  logic [$clog2(DMAX)-1:0]  sptr;
  // product and power delay lines (circular, L deep)
  logic signed [PW-1:0]     pdl_re [L];
  logic signed [PW-1:0]     pdl_im [L];
  logic        [PW-1:0]     wdl    [L];
  logic [$clog2(L)-1:0]     lptr;
  logic [CNTW-1:0]          fill;

  logic signed [CW-1:0] c_re, c_im;
  logic        [CW-1:0] p_sum;
  logic                 sums_new;

  int unsigned d_cur;
  cplx_t       s_old;
  logic signed [PW-1:0] prod_re, prod_im;
  logic        [PW-1:0] pow;
  logic signed [PW-1:0] ar, ai, br, bi;

  always_comb begin
    d_cur = (mode == MODE_WMAN) ? D_WMAN : D_WLAN;
    // sample D back from the newest one
    s_old = sdl[($clog2(DMAX))'(sptr - ($clog2(DMAX))'(d_cur))];
    ar = PW'(s_old.re);
    ai = PW'(s_old.im);
    br = PW'(in.re);
    bi = PW'(in.im);
    if (fill >= CNTW'(d_cur)) begin
      prod_re = ar * br + ai * bi;
      prod_im = ai * br - ar * bi;
    end else begin
      prod_re = '0;
      prod_im = '0;
    end
    pow = $unsigned(br * br + bi * bi);
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      sdl[sptr]    <= in;
      pdl_re[lptr] <= prod_re;
      pdl_im[lptr] <= prod_im;
      wdl[lptr]    <= pow;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sptr     <= '0;
      lptr     <= '0;
      fill     <= '0;
      c_re     <= '0;
      c_im     <= '0;
      p_sum    <= '0;
      sums_new <= 1'b0;
    end else if (clear) begin
      sptr     <= '0;
      lptr     <= '0;
      fill     <= '0;
      c_re     <= '0;
      c_im     <= '0;
      p_sum    <= '0;
      sums_new <= 1'b0;
    end else begin
      sums_new <= in_valid;
      if (in_valid) begin
        sptr <= sptr + 1'b1;
        lptr <= lptr + 1'b1;
        if (fill != CNTW'(DMAX + L)) fill <= fill + 1'b1;
        if (fill >= CNTW'(L)) begin
          c_re  <= c_re  + CW'(prod_re) - CW'(pdl_re[lptr]);
          c_im  <= c_im  + CW'(prod_im) - CW'(pdl_im[lptr]);
          p_sum <= p_sum + CW'(pow)     - CW'(wdl[lptr]);
        end else begin
          c_re  <= c_re  + CW'(prod_re);
          c_im  <= c_im  + CW'(prod_im);
          p_sum <= p_sum + CW'(pow);
        end
      end
    end
  end

  // |C| and the threshold on the registered sums
  logic [CW-1:0] thr, p_max_nx;
  avac #(.W(CW)) u_avac (.i_in(c_re), .q_in(c_im), .mag(c_mag));

  always_comb begin
    p_max_nx = (p_sum > p_max) ? p_sum : p_max;
    thr = (p_max_nx >> 1) + (p_max_nx >> 2) + (p_max_nx >> 5) + (p_max_nx >> 6);
  end

  logic [CW-1:0]                  best_mag;
  logic [$clog2(MAXC_WIN+1)-1:0]  trk_cnt;
  logic                           full;
  assign full = (fill >= CNTW'(d_cur + L));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_SEARCH;
      p_max      <= '0;
      det        <= 1'b0;
      maxc_valid <= 1'b0;
      max_c_re   <= '0;
      max_c_im   <= '0;
      best_mag   <= '0;
      trk_cnt    <= '0;
    end else if (clear) begin
      state      <= S_SEARCH;
      p_max      <= '0;
      det        <= 1'b0;
      maxc_valid <= 1'b0;
      best_mag   <= '0;
      trk_cnt    <= '0;
    end else begin
      det        <= 1'b0;
      maxc_valid <= 1'b0;
      if (sums_new) begin
        p_max <= p_max_nx;
        case (state)
          S_SEARCH: if (full && c_mag > thr) begin
            det      <= 1'b1;
            state    <= S_TRACK;
            best_mag <= c_mag;
            max_c_re <= c_re;
            max_c_im <= c_im;
            trk_cnt  <= '0;
          end
          S_TRACK: begin
            if (c_mag > best_mag) begin
              best_mag <= c_mag;
              max_c_re <= c_re;
              max_c_im <= c_im;
            end
            trk_cnt <= trk_cnt + 1'b1;
            if (trk_cnt == ($clog2(MAXC_WIN+1))'(MAXC_WIN - 1)) begin
              maxc_valid <= 1'b1;
              state      <= S_DONE;
            end
          end
          default: ;
        endcase
      end
    end
  end
endmodule
