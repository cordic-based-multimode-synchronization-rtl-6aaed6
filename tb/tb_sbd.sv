// tb_sbd: self-checking test of symbol boundary detection in both modes.
// A random complex sequence of D samples (128 for 802.16d, 64 for
// 802.11a/g) stands in for the long-preamble half; it is sent as cyclic
// prefix + two copies, between random data, with noise and random input
// gaps. The reference is the sign of its first 64 samples. Forty trials
// with random mode, start position and sample numbering use one of three
// channels: one path; a weaker first path (0.75) and a stronger second path
// (1.0) 1 to 8 samples later; or a strong first path (1.0) and a weaker
// second one (0.6). The boundary must be the first sample of the first
// copy on the first path. Only in the weak-first case does the MM peak sit
// on the later path, so only there must the earlier-path search move it
// (moved = 1). done must come two cycles after the sample that completes
// the window. Each trial checks boundary, moved flag and timing.
module tb_sbd;
  // (locals in the procedural blocks below are assigned, not initialised,
  //  because they are static)
  import sync_pkg::*;
  localparam int N = 64, WIN = 512;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, ref_we = 0;
  mode_e mode = MODE_WMAN, ref_mode = MODE_WMAN;
  cplx_t in = '0;
  logic [31:0] in_idx = '0, boundary_idx, ref_idx;
  logic [5:0] ref_addr = '0;
  csign_t ref_data = '0;
  logic busy, done, moved;
  real lr [2][128], li [2][128];
  int checks = 0, failures = 0, n_moved = 0;

  sbd #(.N(N), .WIN(WIN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real nrand();
    return (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0;
  endfunction

  initial begin
    for (int m = 0; m < 2; m++)
      for (int k = 0; k < 128; k++) begin
        lr[m][k] = 700.0 * nrand();
        li[m][k] = 700.0 * nrand();
      end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 2; m++)
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        ref_we = 1;
        ref_mode = mode_e'(m);
        ref_addr = 6'(k);
        ref_data.re = lr[m][k] < 0.0;
        ref_data.im = li[m][k] < 0.0;
      end
    @(negedge clk);
    ref_we = 0;
    for (int trial = 0; trial < 40; trial++) begin
      int  d, cp, pre, total, fed, cyc, lastcyc, exp_b, kind, dly, base;
      real a0, a1;
      real sr [1200], si [1200];
      mode = trial < 4 ? mode_e'(trial / 2) : mode_e'($urandom_range(0, 1));
      kind = trial < 4 ? (trial % 2) : $urandom_range(0, 2);
      dly  = trial < 4 ? 4 : $urandom_range(1, 8);
      a0   = (kind == 1) ? 0.75 : 1.0;
      a1   = (kind == 0) ? 0.0 : (kind == 1) ? 1.0 : 0.6;
      d    = (mode == MODE_WMAN) ? 128 : 64;
      cp   = (mode == MODE_WMAN) ? 64 : 32;
      pre  = trial < 4 ? 90 + 7 * trial : $urandom_range(40, 200);
      base = trial < 4 ? 1000 : $urandom_range(0, 1000000);
      total = 1200;
      // transmitted signal
      for (int n = 0; n < total; n++) begin
        int k, q;
        k = n - pre - cp;
        if (n >= pre && n < pre + cp + 2 * d) begin
          q = (k < 0) ? k + d : k % d;
          sr[n] = lr[mode][q];
          si[n] = li[mode][q];
        end else begin
          sr[n] = 700.0 * nrand();
          si[n] = 700.0 * nrand();
        end
      end
      exp_b = base + pre + cp;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      fed = 0; cyc = 0; lastcyc = 0;
      while (!done && cyc < 3000) begin
        real yr, yi;
        yr = a0 * sr[fed] + ((fed >= dly) ? a1 * sr[fed - dly] : 0.0);
        yi = a0 * si[fed] + ((fed >= dly) ? a1 * si[fed - dly] : 0.0);
        in_valid = busy && fed < total && ($urandom_range(0, 5) != 0);
        in.re  = DW'($rtoi(yr + 40.0 * nrand()));
        in.im  = DW'($rtoi(yi + 40.0 * nrand()));
        in_idx = 32'(base + fed);
        if (in_valid) begin
          fed++;
          if (fed == N - 1 + WIN) lastcyc = cyc;
        end
        @(negedge clk);
        cyc++;
      end
      in_valid = 0;
      checks += 3;
      if (!done || int'(boundary_idx) != exp_b) failures++;
      if (!done || moved != (kind == 1)) failures++;
      if (cyc != lastcyc + 2) failures++;
      if (!done || int'(boundary_idx) != exp_b || moved != (kind == 1) || cyc != lastcyc + 2)
        $display("trial %0d mode %0d kind %0d delay %0d: boundary %0d exp %0d ref %0d moved %0d done %0d cyc %0d last %0d",
                 trial, mode, kind, dly, boundary_idx, exp_b, ref_idx, moved, done, cyc, lastcyc);
      if (moved) n_moved++;
      repeat (3) @(negedge clk);
    end
    if (n_moved == 0) begin failures++; $display("earlier-path search never moved the boundary"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
