// unified_btf: one butterfly that computes either the Cooley-Tukey (forward)
// or the Gentleman-Sande (inverse) butterfly.
//
//   inv = 0:  x = (u + t*w) mod Q      y = (u - t*w) mod Q
//   inv = 1:  x = (u + t)   mod Q      y = w*(u - t) mod Q
//
// It has a single adder, a single multiplier, a single subtractor and two
// Barrett reducers, steered by four 2:1 multiplexers that share one select:
//   mA  adder operand       : t*w (forward)  | t     (inverse)
//   mB  multiplier operand  : t   (forward)  | u - t (inverse)
//   mC  subtractor operand  : t*w (forward)  | t     (inverse)
//   mD  second reducer input: u - t*w (fwd)  | w*(u - t) (inverse)
// In the first level mB starts a forward butterfly (the product comes
// first) and mA/mC start an inverse one (the sum and difference come first).
// The second level holds the operators and mD, the third the reducers.
//
// Circuit note: because the multiplier output feeds the subtractor through
// mC and the subtractor output feeds the multiplier through mB, the netlist
// contains a combinational loop subtractor -> mB -> multiplier -> mC ->
// subtractor. It is never sensitised: for either value of inv one of the
// two muxes blocks it. This feedback through the routing muxes is a feature
// of the unified style itself (and the cause of its longer critical path);
// lint and synthesis tools report it as a loop, and timing analysis must
// treat it as a false path.
//
// Interface: inv (mode), u, t, w (12-bit residues < Q); x, y (12-bit
// residues). Purely combinational. Mux names and levels follow the design;
// the sign correction of the subtractor is this implementation's own.
module unified_btf
  import ntt_pkg::*;
(
  input  logic  inv,
  input  coef_t u,
  input  coef_t t,
  input  coef_t w,
  output coef_t x,
  output coef_t y
);
  // level L1: routing multiplexers mA, mB, mC
  wide_t mA, mC;
  coef_t mB;
  // level L2: shared operators and mux mD
  wide_t prod, sum, dif, mD;

  assign mA   = inv ? wide_t'(t) : prod;
  assign mB   = inv ? dif[W-1:0] : t;
  assign mC   = inv ? wide_t'(t) : prod;
  assign prod = wide_t'(mB) * wide_t'(w);
  assign sum  = wide_t'(u) + mA;
  assign dif  = modq_sub(u, mC);
  assign mD   = inv ? prod : dif;

  // level L3: modular reduction
  barrett_modq u_red_x (.x(sum), .r(x));
  barrett_modq u_red_y (.x(mD),  .r(y));
endmodule
