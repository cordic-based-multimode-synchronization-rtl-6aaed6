// cordic_cell: one micro-rotation of the modified (dual-use) CORDIC.
//
// The same cell serves fractional CFO estimation (vectoring: drive y to zero
// and collect the angle in z) and CFO compensation (rotation: drive z to zero
// and rotate the vector by -z). With sigma_i = +1 when the steering value is
// negative and -1 otherwise (steering value: y in estimation, z in
// compensation), the cell computes
//   x' = x - sigma_i * y * 2^-i
//   y' = y + sigma_i * x * 2^-i
//   z' = z - sigma_i * sigma * atan(2^-i),  sigma = +1 estimate, -1 compensate
// The shift index i may differ between the two modes (SHIFT_EST, SHIFT_COMP);
// a negative index is a left shift, which the compensation sequence uses for
// its first stage (i = -3, a 1.4464 rad step). Combinational; no gain
// correction (the unit scales the result).
module cordic_cell
  import sync_pkg::*;
#(
  parameter int XW         = 22,
  parameter int SHIFT_EST  = 0,
  parameter int SHIFT_COMP = 0
) (
  input  logic                 comp,     // 1 = compensation (rotation) mode
  input  logic signed [XW-1:0] x_in,
  input  logic signed [XW-1:0] y_in,
  input  logic signed [ZW-1:0] z_in,
  output logic signed [XW-1:0] x_out,
  output logic signed [XW-1:0] y_out,
  output logic signed [ZW-1:0] z_out
);
  localparam logic signed [ZW-1:0] ATAN_EST  = atan_bam(SHIFT_EST);
  localparam logic signed [ZW-1:0] ATAN_COMP = atan_bam(SHIFT_COMP);

  logic                 neg;       // steering value negative: sigma_i = +1
  logic signed [XW-1:0] xs, ys;    // x * 2^-i, y * 2^-i
  logic signed [ZW-1:0] at;

  function automatic logic signed [XW-1:0] shf(input logic signed [XW-1:0] v, input int s);
    return (s < 0) ? (v <<< (-s)) : (v >>> s);
  endfunction

  always_comb begin
    neg = comp ? z_in[ZW-1] : y_in[XW-1];
    xs  = comp ? shf(x_in, SHIFT_COMP) : shf(x_in, SHIFT_EST);
    ys  = comp ? shf(y_in, SHIFT_COMP) : shf(y_in, SHIFT_EST);
    at  = comp ? ATAN_COMP : ATAN_EST;
    if (neg) begin
      x_out = x_in - ys;
      y_out = y_in + xs;
      z_out = comp ? z_in + at : z_in - at;
    end else begin
      x_out = x_in + ys;
      y_out = y_in - xs;
      z_out = comp ? z_in - at : z_in + at;
    end
  end
endmodule
