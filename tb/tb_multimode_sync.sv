// tb_multimode_sync: end-to-end test of the multimode synchronizer at its
// default parameters.
// Four frames are sent, alternating the mode: 802.11a/g and 802.16d, each
// once through a single path and once through two paths (a weaker first
// path and a stronger one four samples later). The preambles have the
// standards' structure (802.11a/g: ten 16-sample repetitions, then a
// 32-sample prefix and two 64-sample long halves; 802.16d: a 64-sample
// prefix and four 64-sample repetitions, then a 64-sample prefix and two
// 128-sample halves) built from random complex values, with noise and a
// carrier offset given in subcarriers (1.3 and 0.64 for 802.11a/g,
// 64-point; 4.3, 5.75 and -10.9 for 802.16d, 256-point). The reference sign tables are loaded
// through the reference port. For every frame the test checks: detection
// inside the preamble, the fractional angle, the integral estimate (the nearest
// multiple of 4 in 802.16d, none in 802.11a/g), the boundary (first sample of the first long
// half on the first path), the earlier-path move in the two-path frames,
// that the two long halves of the corrected output agree in phase
// (residual offset removed), and that the FFT data forwarding starts at the
// boundary and repeats the corrected samples of the whole first FFT window
// unchanged. It also counts each mechanism: detection, mode switch, mirror
// step, integral CFO applied and bypassed, buffer replay, earlier-path move
// and FFT data forwarding, and fails if one never happened.
module tb_multimode_sync;
  import sync_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int NS = 1500, LEAD = 120;

  logic clk = 0, rst_n = 0, restart = 0, in_valid = 0;
  mode_e mode = MODE_WLAN;
  cplx_t in = '0, out;
  logic ref_we = 0, ref_target = 0;
  logic [2:0] ref_sel = '0;
  logic [5:0] ref_addr = '0;
  csign_t ref_data = '0;
  logic frame_det, theta_valid, theta_mirror, icfo_done, sync_done, boundary_moved, out_valid;
  logic [31:0] frame_idx, boundary_idx, sbd_ref_idx, out_idx;
  logic fft_valid, fft_first, fft_late;
  cplx_t fft_out;
  logic [31:0] fft_idx;
  logic signed [ZW-1:0] theta;
  logic signed [23:0] phase_inc;
  logic signed [5:0] icfo_eps;

  multimode_sync dut (.*);

  int checks = 0, failures = 0;
  int n_det = 0, n_switch = 0, n_mirror = 0, n_icfo = 0, n_bypass = 0, n_replay = 0, n_moved = 0;
  int n_fwd = 0;
  real sr [NS], si [NS];                 // transmitted frame
  real orr [NS], oi [NS];                // corrected output by index
  bit  ogot [NS];
  real fr [NS], fi [NS];                 // forwarded FFT data by index
  bit  fgot [NS];
  int  ffirst;                           // index flagged as first forwarded
  real s16 [16][2], s64 [64][2], l64 [64][2], l128 [128][2];
  bit  seen_det, seen_icfo, seen_done;

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
      fr[fft_idx] <= real'(fft_out.re);
      fi[fft_idx] <= real'(fft_out.im);
      fgot[fft_idx] <= 1'b1;
      if (fft_first) ffirst <= int'(fft_idx);
    end
    if (frame_det) seen_det <= 1'b1;
    if (icfo_done) seen_icfo <= 1'b1;
    if (sync_done) seen_done <= 1'b1;
  end

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

  task automatic frame(input mode_e m, input bit two, input real eps);
    int pstart, bexp, d_long, fed, cyc, nfft;
    real yr, yi, w, acc_r, acc_i, a_exp, a_got, err;
    bit mode_changed;
    mode_changed = (m != mode);
    mode = m;
    nfft = (m == MODE_WMAN) ? 256 : 64;
    d_long = (m == MODE_WMAN) ? 128 : 64;
    // build the transmitted frame
    for (int n = 0; n < NS; n++) begin
      int k;
      k = n - LEAD;
      sr[n] = 500.0 * nrand(); si[n] = 500.0 * nrand();   // data / idle
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
      ogot[n] = 0;
      fgot[n] = 0;
    end
    ffirst = -1;
    // restart and send through channel + CFO + noise
    @(negedge clk);
    restart = 1;
    @(negedge clk);
    restart = 0;
    seen_det = 0; seen_icfo = 0; seen_done = 0;
    fed = 0; cyc = 0;
    while (!seen_done && cyc < 6000) begin
      if (fed < NS) begin
        yr = sr[fed]; yi = si[fed];
        if (two) begin
          yr = 0.75 * sr[fed] + ((fed >= 4) ? sr[fed - 4] : 0.0);
          yi = 0.75 * si[fed] + ((fed >= 4) ? si[fed - 4] : 0.0);
        end
        w = 2.0 * PI * eps * real'(fed) / real'(nfft) + 0.7;
        in_valid = 1;
        in.re = DW'($rtoi(yr * $cos(w) - yi * $sin(w) + 20.0 * nrand()));
        in.im = DW'($rtoi(yr * $sin(w) + yi * $cos(w) + 20.0 * nrand()));
        fed++;
      end else in_valid = 0;
      @(negedge clk);
      cyc++;
    end
    in_valid = 0;
    repeat (320) @(negedge clk);   // let the forwarding drain
    // --- checks
    checks++;
    if (!seen_det || frame_idx < LEAD || frame_idx > LEAD + ((m == MODE_WMAN) ? 320 : 160)) begin
      failures++; $display("mode %0d: frame detection at %0d", m, frame_idx);
    end else n_det++;
    if (mode_changed) n_switch++;
    if (theta_mirror) n_mirror++;
    // fractional angle: -(2*pi*eps*D/N) wrapped
    a_exp = -2.0 * PI * eps * real'((m == MODE_WMAN) ? 64 : 16) / real'(nfft);
    while (a_exp < -PI) a_exp += 2.0 * PI;
    while (a_exp > PI) a_exp -= 2.0 * PI;
    a_got = real'(theta) / 32768.0 * PI;
    checks++;
    if ((a_got - a_exp) ** 2 > 0.05 ** 2) begin
      failures++; $display("mode %0d: theta %f exp %f", m, a_got, a_exp);
    end
    checks++;
    if (m == MODE_WMAN) begin
      if (!seen_icfo || int'(icfo_eps) != 4 * $rtoi($floor(eps / 4.0 + 0.5))) begin failures++; $display("integral CFO %0d", icfo_eps); end
      else n_icfo++;
    end else begin
      if (seen_icfo) begin failures++; $display("integral CFO ran in 802.11a/g mode"); end
      else n_bypass++;
    end
    checks++;
    if (!seen_done || boundary_idx != bexp || boundary_moved != two) begin
      failures++;
      $display("mode %0d two=%0d: boundary %0d exp %0d (MM peak %0d, moved %0d, done %0d)",
               m, two, boundary_idx, bexp, sbd_ref_idx, boundary_moved, seen_done);
    end
    if (boundary_moved) n_moved++;
    // corrected output: the two long halves must agree in phase
    acc_r = 0.0; acc_i = 0.0;
    for (int n = bexp + 8; n < bexp + d_long; n++)
      if (ogot[n] && ogot[n + d_long]) begin
        acc_r += orr[n + d_long] * orr[n] + oi[n + d_long] * oi[n];
        acc_i += oi[n + d_long] * orr[n] - orr[n + d_long] * oi[n];
      end
    err = $atan2(acc_i, acc_r);
    checks++;
    if (acc_r == 0.0 || err ** 2 > 0.1 ** 2) begin
      failures++; $display("mode %0d: residual phase over one long half %f rad", m, err);
    end
    if (ogot[bexp] && ogot[LEAD]) n_replay++;
    // FFT data forwarding: starts at the boundary, same values as the output
    begin
      int bad;
      bad = 0;
      for (int n = bexp; n < bexp + nfft; n++)
        if (!fgot[n] || !ogot[n] || fr[n] != orr[n] || fi[n] != oi[n]) bad++;
      checks++;
      if (fft_late || ffirst != int'(boundary_idx) || bad != 0 || fgot[bexp - 1]) begin
        failures++;
        $display("mode %0d: forwarding first %0d late %0d, %0d of %0d window samples wrong",
                 m, ffirst, fft_late, bad, nfft);
      end else n_fwd++;
    end
    $display("frame mode=%0d two=%0d: detect %0d theta %f eps %0d boundary %0d moved %0d",
             m, two, frame_idx, a_got, icfo_eps, boundary_idx, boundary_moved);
  endtask

  initial begin
    for (int k = 0; k < 16; k++) begin s16[k][0] = 700.0 * nrand(); s16[k][1] = 700.0 * nrand(); end
    for (int k = 0; k < 64; k++) begin s64[k][0] = 700.0 * nrand(); s64[k][1] = 700.0 * nrand(); end
    for (int k = 0; k < 64; k++) begin l64[k][0] = 700.0 * nrand(); l64[k][1] = 700.0 * nrand(); end
    for (int k = 0; k < 128; k++) begin l128[k][0] = 700.0 * nrand(); l128[k][1] = 700.0 * nrand(); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    load_refs();
    frame(MODE_WLAN, 0, 1.3);
    frame(MODE_WMAN, 0, 4.3);
    frame(MODE_WMAN, 1, 5.75);   // the 802.16d evaluation offset
    frame(MODE_WLAN, 1, 0.64);   // 200 kHz at 312.5 kHz spacing
    frame(MODE_WMAN, 0, -10.9);  // 170.88 kHz at 15.625 kHz spacing

    $display("mechanisms: detect %0d, mode switch %0d, mirror %0d, integral CFO %0d, bypass %0d, replay %0d, earlier path %0d, forwarding %0d",
             n_det, n_switch, n_mirror, n_icfo, n_bypass, n_replay, n_moved, n_fwd);
    if (n_det == 0 || n_switch == 0 || n_mirror == 0 || n_icfo == 0 || n_bypass == 0 ||
        n_replay == 0 || n_moved == 0 || n_fwd == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
