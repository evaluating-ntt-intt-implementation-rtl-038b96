// gs_btf: Gentleman-Sande butterfly of the inverse-only (INTT) architecture.
//
//   x = (u + t) mod Q          y = w*(u - t) mod Q
//
// The sum goes straight to a Barrett reducer. The difference is first made
// non-negative (u - t, plus Q when negative, so it stays a 12-bit residue), then multiplied by the twiddle
// factor and reduced by a second Barrett reducer. One adder, one subtractor,
// one multiplier and two reducers, as in the design; the sign correction of
// the difference is this implementation's own.
//
// Interface: u, t, w are 12-bit residues (< Q); x, y are 12-bit residues.
// Purely combinational.
module gs_btf
  import ntt_pkg::*;
(
  input  coef_t u,
  input  coef_t t,
  input  coef_t w,
  output coef_t x,
  output coef_t y
);
  wide_t sum, prod;
  coef_t dif;

  always_comb begin
    sum  = wide_t'(u) + wide_t'(t);
    dif  = (u >= t) ? u - t : coef_t'(u + coef_t'(Q) - t);   // in [0, Q)
    prod = wide_t'(dif) * wide_t'(w);
  end

  barrett_modq u_red_x (.x(sum),  .r(x));
  barrett_modq u_red_y (.x(prod), .r(y));
endmodule
