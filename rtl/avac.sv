// avac: absolute value approximation circuit.
//
// Approximates |I + jQ| as a + b/4 with a = max(|I|,|Q|) and b = min(|I|,|Q|).
// The divisor 4 is the one chosen for both standards (it beats a + b/2 by a
// factor of 2 to 3 in mean error for the b/a statistics of both preambles).
// The result never exceeds 1.25 * 2**(W-1), so it fits in W unsigned bits.
// Purely combinational; the b/4 is a truncating shift (this design's choice).
module avac #(
  parameter int W = 16                  // input width per rail
) (
  input  logic signed [W-1:0] i_in,
  input  logic signed [W-1:0] q_in,
  output logic        [W-1:0] mag
);
  logic [W-1:0] ai, aq, a, b;

  always_comb begin
    ai  = i_in[W-1] ? W'(-i_in) : W'(i_in);
    aq  = q_in[W-1] ? W'(-q_in) : W'(q_in);
    a   = (ai >= aq) ? ai : aq;
    b   = (ai >= aq) ? aq : ai;
    mag = a + (b >> 2);
  end
endmodule
