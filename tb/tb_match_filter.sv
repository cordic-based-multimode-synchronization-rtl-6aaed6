// tb_match_filter: self-checking test of the 64-tap sign matched filter.
// Random reference and random sign stream with gaps in in_valid; each output
// (one cycle after its input) is compared with the correlation
// sum_k d(k) * conj(p(k)) / 2 computed with +-1 integers over a model window.
// A stream equal to the reference must give the full peak 64 + 0j.
module tb_match_filter;
  import sync_pkg::*;
  localparam int N = 64;
  localparam int MW = $clog2(N) + 2;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  csign_t in_sign = '0;
  csign_t [N-1:0] ref_sign;
  logic out_valid, full;
  logic signed [MW-1:0] m_re, m_im;
  csign_t win [$];
  int checks = 0, failures = 0, peaks = 0;
  bit last_valid = 0;

  match_filter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model(output int re, output int im);
    re = 0; im = 0;
    for (int k = 0; k < N; k++) begin
      int dr, di, pr, pi;
      dr = win[k].re ? -1 : 1; di = win[k].im ? -1 : 1;
      pr = ref_sign[k].re ? -1 : 1; pi = ref_sign[k].im ? -1 : 1;
      re += (dr * pr + di * pi) / 2;
      im += (di * pr - dr * pi) / 2;
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) ref_sign[k] = csign_t'($urandom_range(0, 3));
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      // check the output of the previous cycle's input
      if (last_valid != out_valid) begin
        failures++; checks++;
        $display("out_valid timing wrong at %0d", n);
      end
      if (out_valid && win.size() == N) begin
        int re, im;
        model(re, im);
        checks++;
        if (!full || int'(m_re) != re || int'(m_im) != im) begin
          failures++;
          $display("n=%0d got %0d %0d exp %0d %0d full=%0d", n, m_re, m_im, re, im, full);
        end
        if (re == N) peaks++;
      end
      in_valid = ($urandom_range(0, 3) != 0);
      // every 300 samples send the reference itself
      in_sign = ((n % 300) >= 200 && (n % 300) < 200 + N) ? ref_sign[(n % 300) - 200]
                                                          : csign_t'($urandom_range(0, 3));
      if (!in_valid && (n % 300) >= 200 && (n % 300) < 200 + N) in_valid = 1;
      last_valid = in_valid;
      if (in_valid) begin
        win.push_back(in_sign);
        if (win.size() > N) void'(win.pop_front());
      end
    end
    if (peaks == 0) begin failures++; $display("no full peak seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
