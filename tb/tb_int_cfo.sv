// tb_int_cfo: self-checking test of the integral CFO estimator.
// A 64-periodic complex sequence stands in for the first 802.16d preamble
// symbol. The seven references are its signs after an integral CFO of
// 4*(j-3) subcarriers (of 256). The stream is the sequence with a true
// integral CFO, a random start phase, a small leftover fractional CFO and
// noise; every hypothesis -12..12 is tried twice and the estimate must
// match. done must come three cycles after the WIN-th sample is taken.
module tb_int_cfo;
  import sync_pkg::*;
  localparam int N = 64, NF = 7, WIN = 192;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, ref_we = 0;
  cplx_t in = '0;
  logic [2:0] ref_sel = '0;
  logic [5:0] ref_addr = '0;
  csign_t ref_data = '0;
  logic done, busy;
  logic signed [5:0] eps;
  logic [2:0] best;
  real xr [N], xi [N];
  int checks = 0, failures = 0;

  int_cfo #(.N(N), .NF(NF), .WIN(WIN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real nrand();
    return (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0;
  endfunction

  initial begin
    for (int k = 0; k < N; k++) begin
      real a;
      a = real'($urandom_range(0, 3)) * PI / 2.0 + PI / 4.0 + 0.3 * nrand();
      xr[k] = 900.0 * $cos(a);
      xi[k] = 900.0 * $sin(a);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load the seven references
    for (int j = 0; j < NF; j++)
      for (int k = 0; k < N; k++) begin
        real w;
        w = 2.0 * PI * real'(4 * (j - 3)) * real'(k) / 256.0;
        @(negedge clk);
        ref_we   = 1;
        ref_sel  = 3'(j);
        ref_addr = 6'(k);
        ref_data.re = (xr[k] * $cos(w) - xi[k] * $sin(w)) < 0.0;
        ref_data.im = (xr[k] * $sin(w) + xi[k] * $cos(w)) < 0.0;
      end
    @(negedge clk);
    ref_we = 0;
    for (int trial = 0; trial < 14; trial++) begin
      int   e_true, fed, lastcyc, cyc;
      real  ph0, frac;
      e_true = 4 * ((trial % NF) - 3);
      ph0 = 2.0 * PI * nrand();
      frac = 0.05 * nrand();
      fed = 0; lastcyc = 0; cyc = 0;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) begin
        if (fed < WIN + 10) begin
          int n;
          real w, sr, si;
          n = fed + trial * 37;
          w = 2.0 * PI * (real'(e_true) + frac) * real'(n) / 256.0 + ph0;
          sr = xr[n % N] * $cos(w) - xi[n % N] * $sin(w) + 150.0 * nrand();
          si = xr[n % N] * $sin(w) + xi[n % N] * $cos(w) + 150.0 * nrand();
          in_valid = ($urandom_range(0, 4) != 0);
          in.re = DW'($rtoi(sr));
          in.im = DW'($rtoi(si));
          if (in_valid) begin
            fed++;
            if (fed == WIN) lastcyc = cyc;
          end
        end else in_valid = 0;
        @(negedge clk);
        cyc++;
        if (cyc > 2000) break;
      end
      in_valid = 0;
      checks++;
      if (!done || int'(eps) != e_true || cyc != lastcyc + 3) begin
        failures++;
        $display("trial %0d: eps %0d exp %0d (done=%0d, cycle %0d, last sample %0d)",
                 trial, eps, e_true, done, cyc, lastcyc);
      end
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
