// barrett_modq: combinational Barrett reduction, r = x mod Q.
//
// Each "mod q" box of the butterflies is one of these. The reduction
// estimates the quotient as floor(x * M / 2**IW) with M = floor(2**IW / Q),
// subtracts that multiple of Q, and applies one conditional subtraction of Q.
// For Q = 3329 and IW = 24 the remainder before the final step is below 2Q
// for every 24-bit input, so a single correction is enough (checked
// exhaustively for the default parameters; other moduli must be re-checked).
//
// Interface: x (IW bits, any value) -> r (OW bits, 0 <= r < Q). No clock.
// The use of Barrett reduction follows the design; the constant choice
// (IW = 24, one correction step) is this implementation's own.
module barrett_modq #(
  parameter int unsigned Q  = ntt_pkg::Q,
  parameter int unsigned IW = ntt_pkg::PW,
  parameter int unsigned OW = ntt_pkg::W
) (
  input  logic [IW-1:0] x,
  output logic [OW-1:0] r
);
  localparam longint unsigned M  = (longint'(1) << IW) / longint'(Q);
  localparam int unsigned     MW = $clog2(M + 1);

  logic [IW+MW-1:0] prod;
  logic [IW-1:0]    qhat;
  logic [IW-1:0]    rem;

  always_comb begin
    prod = IW'(x) * (IW+MW)'(M);
    qhat = IW'(prod >> IW);
    rem  = x - IW'(qhat * IW'(Q));
    if (rem >= IW'(Q)) rem = rem - IW'(Q);
    r    = OW'(rem);
  end
endmodule
