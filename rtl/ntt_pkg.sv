// ntt_pkg: constants, types and small arithmetic helpers shared by the
// forward (FNTT), inverse (INTT) and unified (UNTT) NTT architectures.
//
// The architectures target the CRYSTALS-Kyber ring: polynomials of N = 256
// coefficients, each a 12-bit residue modulo Q = 3329. These three numbers
// are the design's published parameters. The enumerations, the phase
// encoding and the subtraction helper are this implementation's own choices.
//
// Note on modq_sub: in the unified butterfly its operand is chosen by a mux
// whose other input is fed, through the multiplier, by modq_sub's own result.
// Lint and synthesis tools therefore report a combinational loop through this
// function; the loop is never sensitised (see unified_btf).
package ntt_pkg;

  // Ring parameters (Kyber): modulus, polynomial length, coefficient width.
  parameter int unsigned Q    = 3329;
  parameter int unsigned N    = 256;
  parameter int unsigned W    = 12;
  // Width of an unreduced product of two coefficients (Q*Q < 2**PW).
  parameter int unsigned PW   = 2 * W;

  typedef logic [W-1:0]  coef_t;
  typedef logic [PW-1:0] wide_t;

  // Which of the three architectures a controller serves.
  typedef enum logic [1:0] {
    STYLE_FNTT = 2'd0,  // forward only, Cooley-Tukey butterfly
    STYLE_INTT = 2'd1,  // inverse only, Gentleman-Sande butterfly
    STYLE_UNTT = 2'd2   // both, unified butterfly with routing muxes
  } ntt_style_e;

  // Controller phases (Fig. 2 of the timing breakdown: load, process, store).
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,
    PH_LOAD  = 3'd1,  // N cycles: coefficients and twiddles into the banks
    PH_PINIT = 3'd2,  // 1 cycle: enter processing
    PH_PROC  = 3'd3,  // (log2(N)-1) * N/2 cycles: one butterfly per cycle
    PH_PEND  = 3'd4,  // 1 cycle: leave processing
    PH_STORE = 3'd5   // N cycles: results out of the banks
  } phase_e;

  // Subtractor of the butterflies: returns a non-negative value congruent to
  // (u - v) mod Q. v may be an unreduced product (v <= (Q-1)**2). When v < Q
  // the result is fully reduced (< Q), so it can feed the multiplier as a
  // 12-bit operand; otherwise it is below Q*Q and goes to a Barrett reducer.
  function automatic wide_t modq_sub(input coef_t u, input wide_t v);
    logic signed [PW+1:0] d;
    d = $signed({2'b00, {W{1'b0}}, u}) - $signed({2'b00, v});
    if (d >= 0)
      return wide_t'(d);
    else if (d >= -$signed((PW+2)'(Q)))
      return wide_t'(d + $signed((PW+2)'(Q)));
    else
      return wide_t'(d + $signed((PW+2)'(Q * Q)));
  endfunction

endpackage
