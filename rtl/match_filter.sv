// match_filter: N-tap sign matched filter for integral CFO estimation.
//
// Keeps the signs of the last N received samples and correlates them with an
// N-entry reference sign sequence:
//   M(t) = (1/2) * sum_k sign(r(t-N+1+k)) * conj(p(k))
// Every tap is a reduced multiplier whose product is j^sel (the common factor
// 2 is dropped), so the sum is a pair of population counts:
//   Re M = #(sel = 0) - #(sel = 2),  Im M = #(sel = 1) - #(sel = 3).
// The oldest sample in the window meets p(0). The output is registered: m_re,
// m_im and out_valid follow in_valid by one cycle; full says the window
// holds N samples since the last clear. The population-count adder form is
// this design's choice.
module match_filter
  import sync_pkg::*;
#(
  parameter int N = 64,
  localparam int MW = $clog2(N) + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 in_valid,
  input  csign_t               in_sign,
  input  csign_t [N-1:0]       ref_sign,
  output logic                 out_valid,
  output logic                 full,
  output logic signed [MW-1:0] m_re,
  output logic signed [MW-1:0] m_im
);
  csign_t [N-1:0]       win;       // win[N-1] is the newest sample
  csign_t [N-1:0]       win_nx;
  logic   [1:0]         sel [N];
  logic   [$clog2(N):0] cnt;
  logic signed [MW-1:0] acc_re, acc_im;

  always_comb win_nx = {in_sign, win[N-1:1]};

  for (genvar k = 0; k < N; k++) begin : g_tap
    reduced_mult u_rm (.d(win_nx[k]), .p(ref_sign[k]), .sel(sel[k]));
  end

  always_comb begin
    acc_re = '0;
    acc_im = '0;
    for (int k = 0; k < N; k++) begin
      case (sel[k])
        2'd0:    acc_re = acc_re + 1'b1;
        2'd1:    acc_im = acc_im + 1'b1;
        2'd2:    acc_re = acc_re - 1'b1;
        default: acc_im = acc_im - 1'b1;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win       <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      m_re      <= '0;
      m_im      <= '0;
    end else if (clear) begin
      win       <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        win  <= win_nx;
        m_re <= acc_re;
        m_im <= acc_im;
        if (cnt != ($clog2(N)+1)'(N)) cnt <= cnt + 1'b1;
      end
    end
  end

  assign full = (cnt == ($clog2(N)+1)'(N));
endmodule
