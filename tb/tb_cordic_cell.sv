// tb_cordic_cell: self-checking test of one modified CORDIC cell.
// Two cells are tested, one with a right shift (i = 2 estimation / i = 5
// compensation) and one with the left-shifting i = -3 compensation stage.
// Expected outputs follow the micro-rotation equations computed with
// integers in the testbench.
module tb_cordic_cell;
  import sync_pkg::*;
  localparam int XW = 22;
  logic comp;
  logic signed [XW-1:0] x, y, xa, ya, xb, yb;
  logic signed [ZW-1:0] z, za, zb;
  int checks = 0, failures = 0;

  cordic_cell #(.XW(XW), .SHIFT_EST(2), .SHIFT_COMP(5)) dut_a (
    .comp, .x_in(x), .y_in(y), .z_in(z), .x_out(xa), .y_out(ya), .z_out(za));
  cordic_cell #(.XW(XW), .SHIFT_EST(0), .SHIFT_COMP(-3)) dut_b (
    .comp, .x_in(x), .y_in(y), .z_in(z), .x_out(xb), .y_out(yb), .z_out(zb));

  function automatic int shf(int v, int s);
    return (s < 0) ? v * (1 << (-s)) : (v >>> s);
  endfunction

  task automatic expect_cell(input int s, input int at, input int ox, input int oy, input int oz);
    int sig, ex, ey, ez, steer;
    steer = comp ? int'(z) : int'(y);
    sig   = (steer < 0) ? 1 : -1;
    ex = int'(x) - sig * shf(int'(y), s);
    ey = int'(y) + sig * shf(int'(x), s);
    ez = comp ? int'(z) + sig * at : int'(z) - sig * at;
    ez = int'(16'(ez)); ez = (ez > 32767) ? ez - 65536 : ez;
    checks++;
    if (ox != ex || oy != ey || oz != ez) begin
      failures++;
      $display("cell s=%0d comp=%0d x=%0d y=%0d z=%0d got %0d %0d %0d exp %0d %0d %0d",
               s, comp, x, y, z, ox, oy, oz, ex, ey, ez);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      comp = n[0];
      x = XW'($signed(18'($urandom)));
      y = XW'($signed(18'($urandom)));
      z = $signed(16'($urandom));
      #1;
      expect_cell(comp ? 5 : 2, comp ? 326 : 2555, int'(xa), int'(ya), int'(za));
      expect_cell(comp ? -3 : 0, comp ? 15087 : 8192, int'(xb), int'(yb), int'(zb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
