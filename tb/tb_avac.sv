// tb_avac: self-checking test of the a + b/4 magnitude approximation.
// Random and corner inputs; the expected value is computed with integers
// from the definition a = max(|I|,|Q|), b = min(|I|,|Q|), a + floor(b/4).
module tb_avac;
  localparam int W = 16;
  logic signed [W-1:0] i_in, q_in;
  logic        [W-1:0] mag;
  int checks = 0, failures = 0;

  avac #(.W(W)) dut (.i_in, .q_in, .mag);

  task automatic check(input int i, input int q);
    int a, b, exp_v;
    i_in = W'(i);
    q_in = W'(q);
    #1;
    a = (i < 0 ? -i : i);
    b = (q < 0 ? -q : q);
    if (b > a) begin int t = a; a = b; b = t; end
    exp_v = a + b / 4;
    checks++;
    if (int'(mag) != exp_v) begin
      failures++;
      $display("avac mismatch I=%0d Q=%0d got %0d exp %0d", i, q, mag, exp_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0);
    check(-32768, -32768);
    check(32767, -32768);
    check(100, 3);
    check(-7, 400);
    for (int n = 0; n < 2000; n++)
      check($signed(16'($urandom)), $signed(16'($urandom)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
