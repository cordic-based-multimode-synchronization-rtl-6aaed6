// tb_frac_cfo: self-checking test of fractional CFO estimation and
// compensation in both modes.
// For a CFO of w rad/sample the block gets Max_c = R * exp(-j*w*D) and then
// the tone A * exp(j*w*n). Checks: theta equals -w*D (binary angle) and
// arrives four cycles after maxc_valid; the phase step is -theta/D; every
// output leaves three cycles after its input with the same index; the
// outputs no longer rotate and keep the input amplitude A. Halfway an
// integral CFO of +4 subcarriers is announced while the tone also gains
// that offset, and the output must stay still.
module tb_frac_cfo;
  import sync_pkg::*;
  localparam int CW = 32, PW = 24;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, clear = 0, maxc_valid = 0, in_valid = 0, icfo_valid = 0;
  mode_e mode = MODE_WLAN;
  logic signed [CW-1:0] max_c_re = '0, max_c_im = '0;
  logic theta_valid, theta_mirror, run, out_valid;
  logic signed [ZW-1:0] theta;
  cplx_t in = '0, out;
  logic [31:0] in_idx = '0, out_idx;
  logic signed [5:0] icfo_eps = '0;
  logic signed [PW-1:0] phase_inc;
  int checks = 0, failures = 0, mirrors = 0, cyc = 0;
  int issue_cyc [1024];
  real prev_r, prev_i;
  bit  have_prev;

  frac_cfo #(.CW(CW), .PW(PW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker: latency, amplitude and stillness
  real amp;
  int  settle;
  always @(posedge clk) if (rst_n && out_valid) begin
    real r, i, m, dr;
    r = real'(out.re); i = real'(out.im);
    m = $sqrt(r * r + i * i);
    checks++;
    if (cyc != issue_cyc[out_idx % 1024] + 3) begin
      failures++;
      $display("sample %0d: latency %0d", out_idx, cyc - issue_cyc[out_idx % 1024]);
    end
    if ((m - amp) ** 2 > (0.02 * amp + 4.0) ** 2) begin
      failures++;
      $display("sample %0d: magnitude %f exp %f", out_idx, m, amp);
    end
    if (have_prev && settle == 0) begin
      dr = $sqrt((r - prev_r) ** 2 + (i - prev_i) ** 2);
      if (dr > 0.03 * amp + 4.0) begin
        failures++;
        $display("sample %0d: output still rotates (step %f)", out_idx, dr);
      end
    end
    if (settle > 0) settle--;
    prev_r = r; prev_i = i; have_prev = 1;
  end

  task automatic run_case(input mode_e m, input real w);
    int d, t0, n1;
    real ph, z_exp, err;
    mode = m;
    d = (m == MODE_WMAN) ? 64 : 16;
    amp = 1500.0;
    have_prev = 0; settle = 0;
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    max_c_re = CW'($rtoi(3.0e7 * $cos(-w * real'(d))));
    max_c_im = CW'($rtoi(3.0e7 * $sin(-w * real'(d))));
    maxc_valid = 1;
    t0 = cyc;
    @(negedge clk);
    maxc_valid = 0;
    while (!theta_valid) @(negedge clk);
    checks++;
    z_exp = -w * real'(d);
    while (z_exp > PI) z_exp -= 2.0 * PI;
    while (z_exp < -PI) z_exp += 2.0 * PI;
    err = real'(theta) / 32768.0 * PI - z_exp;
    if (cyc != t0 + 4 || err > 0.004 || err < -0.004) begin
      failures++;
      $display("theta %0d (%f rad) exp %f, after %0d cycles", theta, real'(theta) / 32768.0 * PI, z_exp, cyc - t0);
    end
    if (theta_mirror) mirrors++;
    @(negedge clk);
    checks++;
    if (phase_inc != -((PW'(theta) <<< 8) >>> $clog2(d))) begin
      failures++;
      $display("phase_inc %0d", phase_inc);
    end
    // stream the tone
    n1 = 200;
    for (int n = 0; n < 400; n++) begin
      ph = w * real'(n) + ((n >= n1) ? 2.0 * PI * 4.0 * real'(n - n1) / 256.0 : 0.0);
      in_valid = 1;
      in.re = DW'($rtoi(amp * $cos(ph)));
      in.im = DW'($rtoi(amp * $sin(ph)));
      in_idx = 32'(n);
      issue_cyc[n] = cyc;
      icfo_valid = (n == n1 - 1);
      icfo_eps = 6'sd4;
      if (n == n1) settle = 6;
      @(negedge clk);
    end
    in_valid = 0;
    icfo_valid = 0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_case(MODE_WLAN, 2.0 * PI * 0.2 / 64.0);
    run_case(MODE_WLAN, -2.0 * PI * 1.4 / 64.0);   // angle beyond pi/2: mirror step
    run_case(MODE_WMAN, 2.0 * PI * 0.3 / 256.0);
    run_case(MODE_WMAN, 2.0 * PI * 1.7 / 256.0);   // mirror step
    if (mirrors != 2) begin failures++; $display("mirror cases %0d", mirrors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
