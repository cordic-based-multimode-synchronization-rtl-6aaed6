// tb_cordic_unit: self-checking test of the shared ten-stage CORDIC.
// A stream of mixed estimation and compensation operations, one per cycle,
// is compared with floating-point references: estimation must return
// atan2(y, x) (binary angle, any quadrant, so the mirror step is exercised),
// compensation must return the input rotated by -z and scaled by the fixed
// gain 13.2766. Every result must appear exactly three cycles after its
// operation, in order (checked with the tag).
module tb_cordic_unit;
  import sync_pkg::*;
  localparam int XW = 22, TAGW = 32, NOPS = 3000;
  localparam real PI = 3.14159265358979;
  localparam real KCOMP = 13.276571886566952;

  logic clk = 0, rst_n = 0, in_valid = 0, comp = 0;
  logic signed [XW-1:0] x_in = '0, y_in = '0, x_out, y_out;
  logic signed [ZW-1:0] z_in = '0, z_out;
  logic [TAGW-1:0] tag_in = '0, tag_out;
  logic out_valid, out_comp, out_mirror;
  int checks = 0, failures = 0, mirrors = 0, n_est = 0, n_comp = 0;

  // operation log indexed by tag
  int  op_x [NOPS], op_y [NOPS], op_z [NOPS], op_t [NOPS];
  bit  op_c [NOPS];
  int  cyc = 0;

  cordic_unit #(.XW(XW), .TAGW(TAGW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (NOPS + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NOPS; n++) begin
      real a, r;
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      comp     = $urandom_range(0, 1);
      a = (real'($urandom_range(0, 65535)) / 65536.0 - 0.5) * 2.0 * PI;
      if (comp) r = 2000.0 + real'($urandom_range(0, 28000));
      else      r = 1500.0 + real'($urandom_range(0, 6000));
      x_in   = XW'($rtoi(r * $cos(a)));
      y_in   = XW'($rtoi(r * $sin(a)));
      z_in   = comp ? $signed(16'($urandom)) : '0;
      tag_in = n;
      op_x[n] = int'(x_in); op_y[n] = int'(y_in); op_z[n] = int'(z_in);
      op_c[n] = comp; op_t[n] = cyc + 1;
      if (!in_valid) op_t[n] = -1;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(posedge clk);
    if (mirrors == 0) begin failures++; $display("mirror step never used"); end
    $display("est=%0d comp=%0d mirrors=%0d", n_est, n_comp, mirrors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) if (rst_n && out_valid) begin
    int t;
    t = int'(tag_out);
    checks++;
    if (op_t[t] < 0 || cyc != op_t[t] + 2 || out_comp != op_c[t]) begin
      failures++;
      $display("tag %0d: latency/order wrong (cycle %0d, issued %0d)", t, cyc, op_t[t]);
    end else if (!out_comp) begin
      real ang, err;
      n_est++;
      if (op_x[t] < 0) mirrors++;
      ang = $atan2(real'(op_y[t]), real'(op_x[t])) / (2.0 * PI) * 65536.0;
      err = real'(int'(z_out)) - ang;
      if (err > 32768.0) err -= 65536.0;
      if (err < -32768.0) err += 65536.0;
      if (err > 40.0 || err < -40.0) begin
        failures++;
        $display("est tag %0d: angle %0d exp %f", t, z_out, ang);
      end
    end else begin
      real ang, ex, ey, tol;
      n_comp++;
      ang = -real'(op_z[t]) / 65536.0 * 2.0 * PI;
      ex = KCOMP * (real'(op_x[t]) * $cos(ang) - real'(op_y[t]) * $sin(ang));
      ey = KCOMP * (real'(op_x[t]) * $sin(ang) + real'(op_y[t]) * $cos(ang));
      tol = 0.006 * KCOMP * $sqrt(real'(op_x[t]) ** 2 + real'(op_y[t]) ** 2) + 16.0;
      if ((real'(x_out) - ex) ** 2 > tol ** 2 || (real'(y_out) - ey) ** 2 > tol ** 2) begin
        failures++;
        $display("comp tag %0d: got %0d %0d exp %f %f", t, x_out, y_out, ex, ey);
      end
    end
  end
endmodule
