// ct_btf: Cooley-Tukey butterfly of the forward-only (FNTT) architecture.
//
//   x = (u + t*w) mod Q        y = (u - t*w) mod Q
//
// The twiddle product t*w is formed once by a plain multiplier and feeds
// both an adder and a subtractor; each sum goes to its own Barrett reducer,
// so the butterfly has one multiplier, one adder, one subtractor and two
// reducers, as in the design. The product is not reduced before the
// add/subtract. The subtractor keeps its result non-negative by adding Q or
// Q*Q (see ntt_pkg::modq_sub); that correction is this implementation's own.
//
// Interface: u, t, w are 12-bit residues (< Q); x, y are 12-bit residues.
// Purely combinational: one butterfly per clock in the surrounding datapath.
module ct_btf
  import ntt_pkg::*;
(
  input  coef_t u,
  input  coef_t t,
  input  coef_t w,
  output coef_t x,
  output coef_t y
);
  wide_t tw, sum, dif;

  always_comb begin
    tw  = wide_t'(t) * wide_t'(w);
    sum = wide_t'(u) + tw;          // < Q + (Q-1)**2 < 2**24
    dif = modq_sub(u, tw);          // < Q*Q
  end

  barrett_modq u_red_x (.x(sum), .r(x));
  barrett_modq u_red_y (.x(dif), .r(y));
endmodule
