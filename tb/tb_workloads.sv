// tb_workloads: the evaluation conditions of the reference design, run
// through the whole synchronizer at its default parameters.
// Three workloads, FRAMES = 60 frames each, at SNR_DB = 20 dB average SNR:
//   1. 802.11a/g, 20 MHz sampling, CFO 200 kHz (0.64 subcarrier), the
//      exponentially decaying channel with 50 ns rms delay spread: taps every
//      sample, power (1 - e^-1) e^-k for k = 0..10, Rayleigh.
//   2. 802.16d, 7 MHz channel (8 MHz sampling), CFO 5.75 subcarriers, SUI-3:
//      taps at 0, 0.4 and 0.9 us (0, 3 and 7 samples), power 0, -5 and
//      -10 dB, the first Ricean with K = 1, the others Rayleigh.
//   3. 802.16d, 3.5 MHz channel (4 MHz sampling), CFO -170.88 kHz
//      (-10.94 subcarriers of 15.625 kHz), SUI-3 (taps at 0, 2 and 4 samples).
// The channel is drawn anew for every frame and held during it (the SUI
// Doppler rates of under 1 Hz change nothing within a frame). Received
// samples are rounded and clipped to 12 bits. Preambles have the standards'
// period structure with random values, and the reference sign tables are
// loaded through the reference port.
// Per frame the test records: detection inside the preamble, the
// fractional angle within 0.15 rad of the ideal, the integral estimate
// (802.16d), a boundary inside the ISI-free part of the long preamble's
// prefix (no later than the first path, and no earlier than the prefix
// length minus the channel length), a residual phase below 0.15 rad between
// the two corrected long halves, and forwarding of the first FFT window.
// Each of these must succeed in at least 85 % of the frames of a workload;
// one check per workload and quantity. The average SNR is high enough that
// Rayleigh fades rarely push a frame below about 6 dB, where the detection
// rule |C| > 0.8 max P cannot fire (|C| / P is SNR / (SNR + 1)); at
// 10 dB average, 10 to 30 % of the faded frames are missed.
module tb_workloads;
  import sync_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int NS = 1500, LEAD = 120, FRAMES = 60;
  localparam real SNR_DB = 20.0;

  logic clk = 0, rst_n = 0, restart = 0, in_valid = 0;
  mode_e mode = MODE_WLAN;
  cplx_t in = '0, out;
  logic ref_we = 0, ref_target = 0;
  logic [2:0] ref_sel = '0;
  logic [5:0] ref_addr = '0;
  csign_t ref_data = '0;
  logic frame_det, theta_valid, theta_mirror, icfo_done, sync_done, boundary_moved, out_valid;
  logic [31:0] frame_idx, boundary_idx, sbd_ref_idx, out_idx;
  logic signed [ZW-1:0] theta;
  logic signed [23:0] phase_inc;
  logic signed [5:0] icfo_eps;
  logic fft_valid, fft_first, fft_late;
  cplx_t fft_out;
  logic [31:0] fft_idx;

  multimode_sync dut (.*);

  int checks = 0, failures = 0;
  real sr [NS], si [NS];
  real orr [NS], oi [NS];
  bit  ogot [NS], fgot [NS];
  real s16 [16][2], s64 [64][2], l64 [64][2], l128 [128][2];
  real hr [16], hi [16];                 // channel taps
  int  ntap;
  bit  seen_det, seen_icfo, seen_done;
  int  ffirst;

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real urand();
    return (real'($urandom_range(1, 1000000))) / 1000001.0;
  endfunction

  function automatic real gauss();     // N(0, 1), Box-Muller
    return $sqrt(-2.0 * $ln(urand())) * $cos(2.0 * PI * urand());
  endfunction

  function automatic real nrand();
    return (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_idx < NS) begin
      orr[out_idx] <= real'(out.re);
      oi[out_idx]  <= real'(out.im);
      ogot[out_idx] <= 1'b1;
    end
    if (fft_valid && fft_idx < NS) begin
      fgot[fft_idx] <= (fft_out == out_at(fft_idx));
      if (fft_first) ffirst <= int'(fft_idx);
    end
    if (frame_det) seen_det <= 1'b1;
    if (icfo_done) seen_icfo <= 1'b1;
    if (sync_done) seen_done <= 1'b1;
  end

  // corrected output by index, as a packed sample (for the forwarding check)
  cplx_t ostore [NS];
  always @(posedge clk) if (rst_n && out_valid && out_idx < NS) ostore[out_idx] <= out;
  function automatic cplx_t out_at(input logic [31:0] idx);
    return ostore[idx];
  endfunction

  task automatic load_refs();
    for (int j = 0; j < 7; j++)
      for (int k = 0; k < 64; k++) begin
        real w;
        w = 2.0 * PI * real'(4 * (j - 3)) * real'(k) / 256.0;
        @(negedge clk);
        ref_we = 1; ref_target = 0; ref_sel = 3'(j); ref_addr = 6'(k);
        ref_data.re = (s64[k][0] * $cos(w) - s64[k][1] * $sin(w)) < 0.0;
        ref_data.im = (s64[k][0] * $sin(w) + s64[k][1] * $cos(w)) < 0.0;
      end
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      ref_we = 1; ref_target = 1; ref_addr = 6'(k);
      ref_sel = 3'(MODE_WLAN);
      ref_data.re = l64[k][0] < 0.0;  ref_data.im = l64[k][1] < 0.0;
      @(negedge clk);
      ref_sel = 3'(MODE_WMAN);
      ref_data.re = l128[k][0] < 0.0; ref_data.im = l128[k][1] < 0.0;
    end
    @(negedge clk);
    ref_we = 0;
  endtask

  // channel draws; total average power 1
  task automatic chan_exp();          // 50 ns rms at 50 ns sampling
    real s0;
    s0 = 1.0 - $exp(-1.0);
    ntap = 11;
    for (int k = 0; k < ntap; k++) begin
      real sd;
      sd = $sqrt(s0 * $exp(-real'(k)) / 2.0);
      hr[k] = sd * gauss(); hi[k] = sd * gauss();
    end
  endtask

  task automatic chan_sui3(input int d1, input int d2);
    real p [3], ph, norm;
    p[0] = 1.0; p[1] = $pow(10.0, -0.5); p[2] = 0.1;
    norm = p[0] + p[1] + p[2];
    ntap = d2 + 1;
    for (int k = 0; k < ntap; k++) begin hr[k] = 0.0; hi[k] = 0.0; end
    // tap 1: Ricean, K = 1 (half the power fixed, half scattered)
    ph = 2.0 * PI * urand();
    hr[0] = $sqrt(p[0] / norm) * ($sqrt(0.5) * $cos(ph) + $sqrt(0.25) * gauss());
    hi[0] = $sqrt(p[0] / norm) * ($sqrt(0.5) * $sin(ph) + $sqrt(0.25) * gauss());
    hr[d1] = $sqrt(p[1] / norm / 2.0) * gauss(); hi[d1] = $sqrt(p[1] / norm / 2.0) * gauss();
    hr[d2] = $sqrt(p[2] / norm / 2.0) * gauss(); hi[d2] = $sqrt(p[2] / norm / 2.0) * gauss();
  endtask

  function automatic logic signed [DW-1:0] adc(input real v);
    if (v > 2047.0) return 12'sd2047;
    if (v < -2048.0) return -12'sd2048;
    return DW'($rtoi(v));
  endfunction

  // one frame; returns a bit per quantity: det, theta, icfo, boundary, phase, forwarding
  task automatic frame(input mode_e m, input real eps, output bit ok [6]);
    int bexp, d_long, fed, cyc, nfft, gi, bad;
    real yr, yi, w, acc_r, acc_i, a_exp, a_got, err, sigma;
    mode = m;
    nfft = (m == MODE_WMAN) ? 256 : 64;
    d_long = (m == MODE_WMAN) ? 128 : 64;
    gi = (m == MODE_WMAN) ? 64 : 32;
    for (int n = 0; n < NS; n++) begin
      int k;
      k = n - LEAD;
      sr[n] = 700.0 * nrand(); si[n] = 700.0 * nrand();
      if (m == MODE_WLAN) begin
        if (k >= 0 && k < 160) begin sr[n] = s16[k % 16][0]; si[n] = s16[k % 16][1]; end
        else if (k >= 160 && k < 192) begin sr[n] = l64[k - 160 + 32][0]; si[n] = l64[k - 160 + 32][1]; end
        else if (k >= 192 && k < 320) begin sr[n] = l64[(k - 192) % 64][0]; si[n] = l64[(k - 192) % 64][1]; end
        bexp = LEAD + 192;
      end else begin
        if (k >= 0 && k < 320) begin sr[n] = s64[k % 64][0]; si[n] = s64[k % 64][1]; end
        else if (k >= 320 && k < 384) begin sr[n] = l128[k - 320 + 64][0]; si[n] = l128[k - 320 + 64][1]; end
        else if (k >= 384 && k < 640) begin sr[n] = l128[(k - 384) % 128][0]; si[n] = l128[(k - 384) % 128][1]; end
        bexp = LEAD + 384;
      end
      if (k < 0) begin sr[n] = 0.0; si[n] = 0.0; end
      ogot[n] = 0; fgot[n] = 0;
    end
    // signal power per complex sample is 2 * 700^2 / 3
    sigma = $sqrt(2.0 * 700.0 * 700.0 / 3.0 / $pow(10.0, SNR_DB / 10.0) / 2.0);
    @(negedge clk);
    restart = 1;
    @(negedge clk);
    restart = 0;
    seen_det = 0; seen_icfo = 0; seen_done = 0; ffirst = -1;
    fed = 0; cyc = 0;
    while (!seen_done && cyc < 6000) begin
      if (fed < NS) begin
        yr = 0.0; yi = 0.0;
        for (int k = 0; k < ntap; k++)
          if (fed >= k) begin
            yr += hr[k] * sr[fed - k] - hi[k] * si[fed - k];
            yi += hr[k] * si[fed - k] + hi[k] * sr[fed - k];
          end
        w = 2.0 * PI * eps * real'(fed) / real'(nfft) + 1.1;
        in_valid = 1;
        in.re = adc(yr * $cos(w) - yi * $sin(w) + sigma * gauss());
        in.im = adc(yr * $sin(w) + yi * $cos(w) + sigma * gauss());
        fed++;
      end else in_valid = 0;
      @(negedge clk);
      cyc++;
    end
    in_valid = 0;
    repeat (320) @(negedge clk);
    ok[0] = seen_det && frame_idx >= LEAD && frame_idx <= LEAD + ((m == MODE_WMAN) ? 320 : 160);
    a_exp = -2.0 * PI * eps * real'((m == MODE_WMAN) ? 64 : 16) / real'(nfft);
    a_got = real'(theta) / 32768.0 * PI;
    err = a_got - a_exp;
    while (err < -PI) err += 2.0 * PI;
    while (err > PI) err -= 2.0 * PI;
    ok[1] = err ** 2 <= 0.15 ** 2;
    if (m == MODE_WMAN) ok[2] = seen_icfo && int'(icfo_eps) == 4 * $rtoi($floor(eps / 4.0 + 0.5));
    else ok[2] = !seen_icfo;
    ok[3] = seen_done && int'(boundary_idx) <= bexp && int'(boundary_idx) >= bexp - (gi - ntap);
    acc_r = 0.0; acc_i = 0.0;
    for (int n = bexp + 8; n < bexp + d_long; n++)
      if (ogot[n] && ogot[n + d_long]) begin
        acc_r += orr[n + d_long] * orr[n] + oi[n + d_long] * oi[n];
        acc_i += oi[n + d_long] * orr[n] - orr[n + d_long] * oi[n];
      end
    err = $atan2(acc_i, acc_r);
    ok[4] = acc_r != 0.0 && err ** 2 <= 0.15 ** 2;
    bad = 0;
    for (int n = int'(boundary_idx); n < int'(boundary_idx) + nfft && n < NS; n++)
      if (!fgot[n]) bad++;
    ok[5] = !fft_late && ffirst == int'(boundary_idx) && bad == 0;
  endtask

  task automatic workload(input string name, input mode_e m, input real eps, input int kind);
    int good [6];
    bit ok [6];
    string q [6];
    q = '{"detection", "fractional angle", "integral CFO", "ISI-free boundary", "residual phase", "forwarding"};
    for (int i = 0; i < 6; i++) good[i] = 0;
    for (int f = 0; f < FRAMES; f++) begin
      case (kind)
        0: chan_exp();
        1: chan_sui3(3, 7);
        default: chan_sui3(2, 4);
      endcase
      frame(m, eps, ok);
      for (int i = 0; i < 6; i++) if (ok[i]) good[i]++;
    end
    $display("%s:", name);
    for (int i = 0; i < 6; i++) begin
      checks++;
      $display("  %-18s %0d of %0d frames", q[i], good[i], FRAMES);
      if (good[i] * 100 < FRAMES * 85) begin
        failures++;
        $display("  below 85 %%");
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 16; k++) begin s16[k][0] = 700.0 * nrand(); s16[k][1] = 700.0 * nrand(); end
    for (int k = 0; k < 64; k++) begin s64[k][0] = 700.0 * nrand(); s64[k][1] = 700.0 * nrand(); end
    for (int k = 0; k < 64; k++) begin l64[k][0] = 700.0 * nrand(); l64[k][1] = 700.0 * nrand(); end
    for (int k = 0; k < 128; k++) begin l128[k][0] = 700.0 * nrand(); l128[k][1] = 700.0 * nrand(); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    load_refs();
    workload("802.11a/g, 0.64 subcarrier, exponential 50 ns rms", MODE_WLAN, 0.64, 0);
    workload("802.16d 7 MHz, 5.75 subcarriers, SUI-3", MODE_WMAN, 5.75, 1);
    workload("802.16d 3.5 MHz, -10.94 subcarriers, SUI-3", MODE_WMAN, -170.88 / 15.625, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
