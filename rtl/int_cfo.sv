// int_cfo: integral CFO estimator for 802.16d (time-domain matched filters).
//
// After fractional CFO compensation the residual offset of the 802.16d
// preamble is a whole multiple of four subcarriers, limited here to
// -12..12 (seven hypotheses). Seven sign matched filters correlate the
// received signs with the first 64 samples of the preamble as they would
// look with integral CFO -12, -8, -4, 0, 4, 8, 12 subcarriers (filter j
// holds hypothesis 4*(j-3)). Each filter output's magnitude is taken with
// the a + b/4 approximation, and the largest magnitude seen by each filter
// during a window of WIN samples is kept. The filter with the largest peak
// gives the estimate eps = 4*(j-3); ties go to the lower index.
//
// The seven reference sign sequences are written through ref_we/ref_sel/
// ref_addr/ref_data (1 = negative sign), so any preamble can be loaded.
// start clears the filters and opens the window; done pulses once, three
// cycles after the clock edge that takes the WIN-th sample, with eps and best. Window length and the
// loadable reference store are this design's choices.
module int_cfo
  import sync_pkg::*;
#(
  parameter int N    = 64,    // matched filter length
  parameter int NF   = 7,     // number of hypotheses
  parameter int STEP = 4,     // subcarriers between hypotheses
  parameter int WIN  = 192    // samples searched
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  in_valid,
  input  cplx_t                 in,
  input  logic                  ref_we,
  input  logic [2:0]            ref_sel,
  input  logic [$clog2(N)-1:0]  ref_addr,
  input  csign_t                ref_data,
  output logic                  done,
  output logic signed [5:0]     eps,
  output logic [2:0]            best,
  output logic                  busy
);
  localparam int MW = $clog2(N) + 2;

  csign_t [N-1:0]        refs [NF];
  logic                  mf_valid [NF];
  logic                  mf_full  [NF];
  logic signed [MW-1:0]  mf_re [NF];
  logic signed [MW-1:0]  mf_im [NF];
  logic        [MW-1:0]  mf_mag [NF];
  logic        [MW-1:0]  peak [NF];
  logic [$clog2(WIN+1)-1:0] ocnt;
  logic                  decide;

  always_ff @(posedge clk) begin
    if (ref_we && 32'(ref_sel) < NF) refs[ref_sel][ref_addr] <= ref_data;
  end

  csign_t in_sign;
  assign in_sign = '{re: in.re[DW-1], im: in.im[DW-1]};

  for (genvar j = 0; j < NF; j++) begin : g_mf
    match_filter #(.N(N)) u_mf (
      .clk, .rst_n, .clear(start),
      .in_valid(in_valid && busy), .in_sign, .ref_sign(refs[j]),
      .out_valid(mf_valid[j]), .full(mf_full[j]), .m_re(mf_re[j]), .m_im(mf_im[j])
    );
    avac #(.W(MW)) u_mag (.i_in(mf_re[j]), .q_in(mf_im[j]), .mag(mf_mag[j]));
  end

  // arg max over the peaks
  logic [2:0]    bsel;
  logic [MW-1:0] bval;
  always_comb begin
    bsel = '0;
    bval = peak[0];
    for (int j = 1; j < NF; j++)
      if (peak[j] > bval) begin
        bval = peak[j];
        bsel = 3'(j);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      ocnt   <= '0;
      decide <= 1'b0;
      done   <= 1'b0;
      eps    <= '0;
      best   <= '0;
      for (int j = 0; j < NF; j++) peak[j] <= '0;
    end else begin
      done   <= 1'b0;
      decide <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        ocnt <= '0;
        for (int j = 0; j < NF; j++) peak[j] <= '0;
      end else if (busy && mf_valid[0]) begin
        for (int j = 0; j < NF; j++)
          if (mf_full[j] && mf_mag[j] > peak[j]) peak[j] <= mf_mag[j];
        ocnt <= ocnt + 1'b1;
        if (ocnt == ($clog2(WIN+1))'(WIN - 1)) begin
          busy   <= 1'b0;
          decide <= 1'b1;
        end
      end
      if (decide) begin
        done <= 1'b1;
        best <= bsel;
        eps  <= 6'(STEP * (int'(bsel) - (NF - 1) / 2));
      end
    end
  end
endmodule
