// cordic_unit: ten cascaded modified CORDIC cells in three pipeline stages.
//
// One unit does both jobs of the fractional CFO block. In estimation
// (comp = 0) the cells use the shift sequence i = 0..9, covering +-1.7413
// rad; a mirror step first maps a vector with x < 0 to (-x, -y) and adds pi
// to the result, so any angle in (-pi, pi] is measured. z_in should be 0 and
// z_out is then the vector's angle. In compensation (comp = 1) the cells use
// the sequence i = -3, 0, 1, ..., 8, covering +-3.1858 rad, and rotate
// (x_in, y_in) by -z_in. The magnitude grows by about 1.6468 in estimation
// and 13.2766 in compensation; callers correct the gain if they need it.
//
// Pipeline registers sit after cells 3, 6 and 9 (cells 0-3, 4-6, 7-9), so
// the latency is three cycles at one operation per cycle. A TAGW-bit tag
// travels with each operation. Register placement and widths are this
// design's choice.
module cordic_unit
  import sync_pkg::*;
#(
  parameter int XW   = 22,
  parameter int TAGW = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 comp,
  input  logic signed [XW-1:0] x_in,
  input  logic signed [XW-1:0] y_in,
  input  logic signed [ZW-1:0] z_in,
  input  logic [TAGW-1:0]      tag_in,
  output logic                 out_valid,
  output logic                 out_comp,
  output logic                 out_mirror, // estimation used the mirror step
  output logic signed [XW-1:0] x_out,
  output logic signed [XW-1:0] y_out,
  output logic signed [ZW-1:0] z_out,
  output logic [TAGW-1:0]      tag_out
);
  localparam int NC = 10;

  typedef struct packed {
    logic                 valid;
    logic                 comp;
    logic                 mirror;
    logic signed [XW-1:0] x;
    logic signed [XW-1:0] y;
    logic signed [ZW-1:0] z;
    logic [TAGW-1:0]      tag;
  } op_t;

  // cell chain: node k is the input of cell k, node NC the output of cell 9
  logic signed [XW-1:0] xn [NC+1];
  logic signed [XW-1:0] yn [NC+1];
  logic signed [ZW-1:0] zn [NC+1];
  op_t                  r1, r2, r3;

  // stage 1 input with mirror step
  logic mir;
  always_comb begin
    mir   = !comp && x_in[XW-1];
    xn[0] = mir ? -x_in : x_in;
    yn[0] = mir ? -y_in : y_in;
    zn[0] = z_in;
  end

  for (genvar k = 0; k < NC; k++) begin : g_cell
    logic c;
    logic signed [XW-1:0] xi, yi;
    logic signed [ZW-1:0] zi;
    // cells 4-6 read register r1, cells 7-9 read register r2
    always_comb begin
      if (k == 4) begin
        c = r1.comp; xi = r1.x; yi = r1.y; zi = r1.z;
      end else if (k == 7) begin
        c = r2.comp; xi = r2.x; yi = r2.y; zi = r2.z;
      end else begin
        c = (k < 4) ? comp : (k < 7) ? r1.comp : r2.comp;
        xi = xn[k]; yi = yn[k]; zi = zn[k];
      end
    end
    cordic_cell #(
      .XW(XW), .SHIFT_EST(cordic_shift_est(k)), .SHIFT_COMP(cordic_shift_comp(k))
    ) u_cell (
      .comp(c), .x_in(xi), .y_in(yi), .z_in(zi),
      .x_out(xn[k+1]), .y_out(yn[k+1]), .z_out(zn[k+1])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= '0;
      r2 <= '0;
      r3 <= '0;
    end else begin
      r1 <= '{valid: in_valid, comp: comp, mirror: mir,
              x: xn[4], y: yn[4], z: zn[4], tag: tag_in};
      r2 <= '{valid: r1.valid, comp: r1.comp, mirror: r1.mirror,
              x: xn[7], y: yn[7], z: zn[7], tag: r1.tag};
      r3 <= '{valid: r2.valid, comp: r2.comp, mirror: r2.mirror,
              x: xn[10], y: yn[10],
              z: r2.mirror ? zn[10] + {1'b1, {(ZW-1){1'b0}}} : zn[10],
              tag: r2.tag};
    end
  end

  assign out_valid = r3.valid;
  assign out_comp  = r3.comp;
  assign out_mirror = r3.mirror;
  assign x_out     = r3.x;
  assign y_out     = r3.y;
  assign z_out     = r3.z;
  assign tag_out   = r3.tag;
endmodule
