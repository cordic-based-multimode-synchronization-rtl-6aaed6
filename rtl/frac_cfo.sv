// frac_cfo: fractional CFO estimation and compensation on one CORDIC unit.
//
// Estimation: when frame detection hands over Max_c, the vector is first
// scaled down (block-floating) to NW bits per rail and sent once through the
// CORDIC in estimation mode with a zero start angle. The resulting angle
// theta = angle(Max_c) = -(CFO phase advance over D samples), so the phase
// increment per sample is -theta / D, a plain arithmetic shift by 6
// (802.16d, D = 64) or 4 (802.11a/g, D = 16): this is the control that
// differs between the standards.
// Compensation: the buffered received samples are then read back and sent
// through the same CORDIC in compensation mode, each rotated by minus the
// accumulated phase. When the integral CFO estimate arrives (802.16d), its
// step 2*pi*eps/256 is added to the increment, so from then on the same
// rotation removes both parts.
//
// Interface: run is high while samples may be fed (in_valid, in, in_idx);
// every fed sample leaves, rotated and gain-corrected, three cycles later on
// out_valid/out/out_idx. theta_valid pulses when the estimate is known,
// four cycles after maxc_valid. The NW-bit pre-scaling, 4 fraction bits of
// headroom, the 24-bit phase and the constant-multiplier gain correction
// (1/13.2766) are this design's choices.
module frac_cfo
  import sync_pkg::*;
#(
  parameter int CW      = 32,   // width of Max_c per rail
  parameter int D_WMAN  = 64,
  parameter int D_WLAN  = 16,
  parameter int N_WMAN  = 256,  // FFT size that defines a subcarrier step
  parameter int XW      = 22,
  parameter int PW      = 24,
  parameter int NW      = 14,   // width Max_c is scaled to
  parameter int FRAC    = 4,    // extra fraction bits of samples in the CORDIC
  parameter int IDXW    = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  mode_e                 mode,
  input  logic                  maxc_valid,
  input  logic signed [CW-1:0]  max_c_re,
  input  logic signed [CW-1:0]  max_c_im,
  output logic                  theta_valid,
  output logic signed [ZW-1:0]  theta,
  output logic                  theta_mirror,
  output logic                  run,
  input  logic                  in_valid,
  input  cplx_t                 in,
  input  logic [IDXW-1:0]       in_idx,
  input  logic                  icfo_valid,
  input  logic signed [5:0]     icfo_eps,   // integral CFO in subcarriers
  output logic                  out_valid,
  output cplx_t                 out,
  output logic [IDXW-1:0]       out_idx,
  output logic signed [PW-1:0]  phase_inc   // per-sample phase step in use
);
  localparam int GAIN    = 4936;                 // round(2^16 / 13.2766)
  localparam int GSH     = 16 + FRAC;
  localparam int SH_WMAN = $clog2(D_WMAN);
  localparam int SH_WLAN = $clog2(D_WLAN);
  localparam int SH_N    = $clog2(N_WMAN);

  typedef enum logic [1:0] {S_IDLE, S_EST, S_RUN} state_e;
  state_e state;

  // ---- block-floating scaling of Max_c
  logic signed [CW-1:0] nre, nim;
  function automatic logic fits(input logic signed [CW-1:0] v, input int k);
    logic signed [CW-1:0] s;
    s = v >>> k;
    return (s >= -(CW'(1) <<< (NW-1))) && (s < (CW'(1) <<< (NW-1)));
  endfunction
  always_comb begin
    nre = max_c_re;
    nim = max_c_im;
    for (int k = CW - NW; k >= 0; k--)
      if (fits(max_c_re, k) && fits(max_c_im, k)) begin
        nre = max_c_re >>> k;
        nim = max_c_im >>> k;
      end
  end

  // ---- phase accumulator
  logic                 pa_load, pa_add, pa_step;
  logic signed [PW-1:0] pa_load_val, pa_add_val, pa_phase;
  phase_acc #(.PW(PW)) u_pa (
    .clk, .rst_n, .clear,
    .load_inc(pa_load), .load_val(pa_load_val),
    .add_inc(pa_add), .add_val(pa_add_val),
    .step(pa_step), .inc(phase_inc), .phase(pa_phase)
  );

  // ---- CORDIC
  logic                 c_in_valid, c_comp;
  logic signed [XW-1:0] c_x, c_y;
  logic signed [ZW-1:0] c_z;
  logic                 co_valid, co_comp, co_mirror;
  logic signed [XW-1:0] co_x, co_y;
  logic signed [ZW-1:0] co_z;
  logic [IDXW-1:0]      co_tag;

  always_comb begin
    c_in_valid = 1'b0;
    c_comp     = 1'b0;
    c_x        = XW'(nre);
    c_y        = XW'(nim);
    c_z        = '0;
    if (state == S_IDLE && maxc_valid) begin
      c_in_valid = 1'b1;
    end else if (state == S_RUN && in_valid) begin
      c_in_valid = 1'b1;
      c_comp     = 1'b1;
      c_x        = XW'(in.re) <<< FRAC;
      c_y        = XW'(in.im) <<< FRAC;
      c_z        = pa_phase[PW-1 -: ZW];
    end
  end

  cordic_unit #(.XW(XW), .TAGW(IDXW)) u_cordic (
    .clk, .rst_n,
    .in_valid(c_in_valid), .comp(c_comp), .x_in(c_x), .y_in(c_y), .z_in(c_z), .tag_in(in_idx),
    .out_valid(co_valid), .out_comp(co_comp), .out_mirror(co_mirror),
    .x_out(co_x), .y_out(co_y), .z_out(co_z), .tag_out(co_tag)
  );

  // ---- control
  logic signed [PW-1:0] theta_w;
  assign theta_w     = PW'(co_z) <<< (PW - ZW);
  assign pa_load     = (state == S_EST) && co_valid && !co_comp;
  assign pa_load_val = (mode == MODE_WMAN) ? -(theta_w >>> SH_WMAN) : -(theta_w >>> SH_WLAN);
  assign pa_add      = icfo_valid && (state == S_RUN);
  assign pa_add_val  = PW'(icfo_eps) <<< (PW - SH_N);
  assign pa_step     = (state == S_RUN) && in_valid;
  assign run         = (state == S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      theta_valid  <= 1'b0;
      theta        <= '0;
      theta_mirror <= 1'b0;
    end else if (clear) begin
      state        <= S_IDLE;
      theta_valid  <= 1'b0;
    end else begin
      theta_valid <= 1'b0;
      case (state)
        S_IDLE: if (maxc_valid) state <= S_EST;
        S_EST: if (co_valid && !co_comp) begin
          theta        <= co_z;
          theta_mirror <= co_mirror;
          theta_valid  <= 1'b1;
          state        <= S_RUN;
        end
        default: ;
      endcase
    end
  end

  // ---- gain correction and saturation of the rotated samples
  function automatic logic signed [DW-1:0] scale(input logic signed [XW-1:0] v);
    logic signed [XW+16:0] p;
    p = (XW+17)'(v) * (XW+17)'(GAIN) + ((XW+17)'(1) <<< (GSH - 1));
    p = p >>> GSH;
    if (p > (XW+17)'((1 << (DW-1)) - 1))     return DW'((1 << (DW-1)) - 1);
    else if (p < -(XW+17)'(1 << (DW-1)))     return DW'(-(1 << (DW-1)));
    else                                     return DW'(p);
  endfunction

  assign out_valid = co_valid && co_comp;
  assign out.re    = scale(co_x);
  assign out.im    = scale(co_y);
  assign out_idx   = co_tag;
endmodule
