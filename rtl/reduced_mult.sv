// reduced_mult: sign-only complex multiplier of the integral CFO matched filter.
//
// Both the received sample and the reference are reduced to their signs, so
// each is one of (+-1 +-j). The product d * conj(p) is then always one of
// 2, 2j, -2, -2j, i.e. 2 * j^sel, and the "multiplier" only has to decide
// sel from the four sign bits by gate-level comparison:
//   sel 0: d = p            (Re_d = Re_p,  Im_d = Im_p)
//   sel 1: d = j * p        (Re_d = ~Im_p, Im_d = Re_p)
//   sel 2: d = -p           (Re_d = ~Re_p, Im_d = ~Im_p)
//   sel 3: d = -j * p       (Re_d = Im_p,  Im_d = ~Re_p)
// Sign bits are 1 for negative. Combinational.
module reduced_mult
  import sync_pkg::*;
(
  input  csign_t     d,
  input  csign_t     p,
  output logic [1:0] sel
);
  always_comb begin
    if (d.re == p.re && d.im == p.im)        sel = 2'd0;
    else if (d.re != p.im && d.im == p.re)   sel = 2'd1;
    else if (d.re != p.re && d.im != p.im)   sel = 2'd2;
    else                                     sel = 2'd3;
  end
endmodule
