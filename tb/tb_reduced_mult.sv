// tb_reduced_mult: exhaustive test of the sign-only complex multiplier.
// For all 16 sign combinations d * conj(p) is computed with +-1 integers and
// must equal 2 * j^sel.
module tb_reduced_mult;
  import sync_pkg::*;
  csign_t d, p;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  reduced_mult dut (.d, .p, .sel);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 16; n++) begin
      int dr, di, pr, pi, re, im, exp_sel;
      d = csign_t'(n[3:2]);
      p = csign_t'(n[1:0]);
      #1;
      dr = d.re ? -1 : 1;  di = d.im ? -1 : 1;
      pr = p.re ? -1 : 1;  pi = p.im ? -1 : 1;
      re = dr * pr + di * pi;
      im = di * pr - dr * pi;
      exp_sel = (re == 2) ? 0 : (im == 2) ? 1 : (re == -2) ? 2 : 3;
      checks++;
      if (int'(sel) != exp_sel) begin
        failures++;
        $display("d=%b p=%b sel=%0d exp %0d", d, p, sel, exp_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
