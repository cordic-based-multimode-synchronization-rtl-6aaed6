// tb_fft_position: checks the forwarding of corrected samples from the
// symbol boundary on.
// Each trial clears the block and writes a stream whose value is a known
// function of its index, with random gaps (about 30 % idle cycles). After a
// random number of samples, start pulses, sometimes on a cycle that also
// writes, with a boundary a random distance back. A boundary still held
// (fewer than DEPTH samples back, and written since clear) must be forwarded
// from exactly that index: out_first on the first sample, indices
// contiguous, every value equal to the written one, and after the stream
// stops every sample from the boundary to the newest must have come out. An
// older boundary must raise late and forward nothing.
module tb_fft_position;
  import sync_pkg::*;
  localparam int DEPTH = 300;

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, start = 0;
  cplx_t in = '0, out;
  logic [31:0] in_idx = '0, boundary_idx = '0, out_idx;
  logic out_valid, out_first, late;

  fft_position #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  int n_fwd = 0, n_late = 0;
  int got, expect_next;
  bit first_seen;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cplx_t val(input logic [31:0] idx);
    cplx_t v;
    v.re = DW'(idx * 37 + 5);
    v.im = DW'((idx * 91) ^ 32'h5a);
    return v;
  endfunction

  // output monitor
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (out != val(out_idx) || out_idx != 32'(expect_next) ||
        out_first != !first_seen) begin
      failures++;
      $display("out idx %0d exp %0d first %0d data %h exp %h",
               out_idx, expect_next, out_first, out, val(out_idx));
    end
    first_seen  = 1'b1;
    expect_next = expect_next + 1;
    got++;
  end

  task automatic trial(input int pre, input int back, input bit same_cycle);
    logic [31:0] base, nxt, b;
    int post;
    bit fits;
    base = $urandom_range(0, 100000);
    nxt = base;
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    got = 0; first_seen = 0;
    // stream before the boundary is known
    while (nxt - base < 32'(pre)) begin
      in_valid = ($urandom_range(0, 9) < 7);
      in_idx = nxt; in = val(nxt);
      @(negedge clk);
      if (in_valid) nxt++;
    end
    b = nxt - 32'(back);
    fits = (back < DEPTH) && (back <= pre);
    expect_next = int'(b);
    boundary_idx = b;
    start = 1;
    in_valid = same_cycle;
    in_idx = nxt; in = val(nxt);
    @(negedge clk);
    if (in_valid) nxt++;
    start = 0;
    // stream after
    post = $urandom_range(50, 400);
    for (int i = 0; i < post; i++) begin
      in_valid = ($urandom_range(0, 9) < 7);
      in_idx = nxt; in = val(nxt);
      @(negedge clk);
      if (in_valid) nxt++;
    end
    in_valid = 0;
    repeat (DEPTH + 10) @(negedge clk);
    checks++;
    if (fits) begin
      if (late || got != int'(nxt - b)) begin
        failures++;
        $display("pre %0d back %0d: forwarded %0d of %0d, late %0d", pre, back, got, nxt - b, late);
      end else n_fwd++;
    end else begin
      if (!late || got != 0) begin
        failures++;
        $display("pre %0d back %0d: late %0d, forwarded %0d", pre, back, late, got);
      end else n_late++;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    trial(100, 0, 1);
    trial(100, 100, 0);      // boundary is the first sample after clear
    trial(100, 101, 1);      // one before anything stored: late
    trial(600, DEPTH - 1, 1);
    trial(600, DEPTH - 1, 0);
    trial(600, DEPTH, 0);    // just overwritten: late
    for (int t = 0; t < 60; t++) begin
      int pre, back;
      pre = $urandom_range(20, 700);
      back = $urandom_range(0, 340);
      trial(pre, back, 1'($urandom_range(0, 1)));
    end
    $display("forwarded %0d, late %0d", n_fwd, n_late);
    checks++;
    if (n_fwd == 0 || n_late == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
