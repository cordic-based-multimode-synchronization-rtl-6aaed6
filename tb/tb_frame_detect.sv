// tb_frame_detect: self-checking test of the frame detector in both modes.
// Noise, then a periodic preamble (period 16 for 802.11a/g, 64 for
// 802.16d) with a carrier frequency offset, then noise. An exact integer
// model of C(t), P(t), max P and the a + b/4 magnitude runs beside the
// block: |C| and max P are compared every sample, the detection must come
// at the model's first crossing of 0.8 * max P (one cycle after the sums)
// and Max_c must be the model's largest |C| in the following window. The
// angle of Max_c must match the applied CFO.
module tb_frame_detect;
  import sync_pkg::*;
  localparam int L = 64, MAXC_WIN = 64, CW = 32, NS = 700;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  mode_e mode = MODE_WLAN;
  cplx_t in = '0;
  logic det, maxc_valid;
  logic signed [CW-1:0] max_c_re, max_c_im;
  logic [CW-1:0] c_mag, p_max;
  longint sre [NS], sim [NS];
  int checks = 0, failures = 0, dets = 0;

  frame_detect #(.L(L), .MAXC_WIN(MAXC_WIN), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real nrand();
    return (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0;
  endfunction

  function automatic longint amag(longint a, longint b);
    longint x, y;
    x = a < 0 ? -a : a;
    y = b < 0 ? -b : b;
    return (x >= y) ? x + y / 4 : y + x / 4;
  endfunction

  task automatic run(input mode_e m, input real eps, input int nfft);
    int d, tdet, tmax;
    longint cr [NS], ci [NS], pw [NS], pmax, thr, best, exp_r, exp_i;
    real per [64][2], ang, exp_ang, err;
    mode = m;
    d = (m == MODE_WMAN) ? 64 : 16;
    for (int k = 0; k < d; k++) begin
      per[k][0] = 800.0 * nrand();
      per[k][1] = 800.0 * nrand();
    end
    for (int n = 0; n < NS; n++) begin
      real w;
      w = 2.0 * PI * eps * real'(n) / real'(nfft);
      if (n >= 150 && n < 550) begin
        sre[n] = longint'($rtoi(per[n % d][0] * $cos(w) - per[n % d][1] * $sin(w) + 30.0 * nrand()));
        sim[n] = longint'($rtoi(per[n % d][0] * $sin(w) + per[n % d][1] * $cos(w) + 30.0 * nrand()));
      end else begin
        sre[n] = longint'($rtoi(150.0 * nrand()));
        sim[n] = longint'($rtoi(150.0 * nrand()));
      end
    end
    // model
    tdet = -1; tmax = -1; pmax = 0; best = 0; exp_r = 0; exp_i = 0;
    for (int t = 0; t < NS; t++) begin
      cr[t] = 0; ci[t] = 0; pw[t] = 0;
      for (int u = (t - L + 1 < 0 ? 0 : t - L + 1); u <= t; u++) begin
        if (u >= d) begin
          cr[t] += sre[u-d] * sre[u] + sim[u-d] * sim[u];
          ci[t] += sim[u-d] * sre[u] - sre[u-d] * sim[u];
        end
        pw[t] += sre[u] * sre[u] + sim[u] * sim[u];
      end
    end
    for (int t = 0; t < NS; t++) begin
      if (pw[t] > pmax) pmax = pw[t];
      thr = (pmax >> 1) + (pmax >> 2) + (pmax >> 5) + (pmax >> 6);
      if (tdet < 0 && t + 1 >= d + L && amag(cr[t], ci[t]) > thr) begin
        tdet = t; best = amag(cr[t], ci[t]); exp_r = cr[t]; exp_i = ci[t];
      end else if (tdet >= 0 && t <= tdet + MAXC_WIN && amag(cr[t], ci[t]) > best) begin
        best = amag(cr[t], ci[t]); exp_r = cr[t]; exp_i = ci[t];
      end
    end
    // stimulus and comparison
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    pmax = 0;
    for (int t = 0; t < NS; t++) begin
      in_valid = 1;
      in.re = DW'(sre[t]);
      in.im = DW'(sim[t]);
      @(negedge clk);
      // sums of sample t are now registered
      checks++;
      if (longint'(c_mag) != amag(cr[t], ci[t]) || longint'(p_max) != pmax) begin
        failures++;
        if (failures < 10) $display("t=%0d |C| %0d exp %0d  maxP %0d exp %0d", t, c_mag, amag(cr[t], ci[t]), p_max, pmax);
      end
      if (pw[t] > pmax) pmax = pw[t];
      if (det) begin
        dets++;
        checks++;
        if (t != tdet + 1) begin failures++; $display("det at %0d, model %0d", t - 1, tdet); end
      end
      if (maxc_valid) begin
        checks++;
        tmax = t;
        if (t != tdet + MAXC_WIN + 1 || longint'(max_c_re) != exp_r || longint'(max_c_im) != exp_i) begin
          failures++;
          $display("max_c %0d %0d at %0d, model %0d %0d at %0d", max_c_re, max_c_im, t, exp_r, exp_i, tdet + MAXC_WIN + 1);
        end
        ang = $atan2(real'(max_c_im), real'(max_c_re));
        exp_ang = -2.0 * PI * eps * real'(d) / real'(nfft);
        err = ang - exp_ang;
        checks++;
        if (err > 0.05 || err < -0.05) begin
          failures++;
          $display("angle %f exp %f", ang, exp_ang);
        end
      end
    end
    in_valid = 0;
    checks++;
    if (tdet < 150 || tmax < 0) begin
      failures++;
      $display("mode %0d: no detection in the preamble (model %0d, maxc at %0d)", m, tdet, tmax);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(MODE_WLAN, 1.3, 64);
    run(MODE_WMAN, 0.3, 256);
    run(MODE_WMAN, -1.6, 256);
    if (dets != 3) begin failures++; $display("dets=%0d", dets); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
