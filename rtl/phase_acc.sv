// phase_acc: phase accumulator that feeds the compensation angle.
//
// Holds a per-sample phase increment and an accumulated phase, both PW bits
// of binary angle (a full turn is 2**PW). load_inc sets the increment (the
// fractional CFO step), add_inc adds to it (the integral CFO step, applied
// later with the same CORDIC), and step advances the phase by the increment
// in effect. phase is the registered value to use for the current sample,
// so the first sample after clear is rotated by zero. The top ZW bits of the
// phase drive the CORDIC. Increment and phase width are this design's
// choice; only the accumulator's role is given by the architecture.
module phase_acc #(
  parameter int PW = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 load_inc,
  input  logic signed [PW-1:0] load_val,
  input  logic                 add_inc,
  input  logic signed [PW-1:0] add_val,
  input  logic                 step,
  output logic signed [PW-1:0] inc,
  output logic signed [PW-1:0] phase
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inc   <= '0;
      phase <= '0;
    end else if (clear) begin
      inc   <= '0;
      phase <= '0;
    end else begin
      if (load_inc)     inc <= load_val;
      else if (add_inc) inc <= inc + add_val;
      if (step) phase <= phase + inc;
    end
  end
endmodule
