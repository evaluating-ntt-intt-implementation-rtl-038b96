// ntt_styles_top: the three NTT implementation styles side by side.
//
// The forward-only (FNTT), inverse-only (INTT) and unified (UNTT)
// architectures are independent accelerators for the Kyber number theoretic
// transform (N = 256, Q = 3329). They share only clock and reset here; each
// has its own register banks, butterfly and controller and its own ports,
// prefixed f_, i_ and u_. A system that needs both directions either uses
// the FNTT and INTT cores together, or the UNTT core alone with u_inv_req
// choosing the direction per operation.
//
// Per core: pulse start, then stream 256 coefficients and 256 twiddle-table
// entries (one pair per cycle while in_ready is high), wait 898 processing
// cycles, then collect 256 results while out_valid is high: 1410 cycles per
// transform. See fntt_core, intt_core and untt_core for the table contents.
// Grouping the three cores in one top is this implementation's choice.
//
// The unified butterfly contains a combinational loop through its routing
// multiplexers that is never sensitised; tools report it in this module too.
// See unified_btf for why it stands.
module ntt_styles_top
  import ntt_pkg::*;
#(
  parameter int unsigned NN = N,
  localparam int unsigned AW = $clog2(NN)
) (
  input  logic          clk,
  input  logic          rst_n,
  // forward-only architecture
  input  logic          f_start,
  input  coef_t         f_in_coef,
  input  coef_t         f_in_tw,
  output logic          f_in_ready,
  output logic          f_out_valid,
  output coef_t         f_out_coef,
  output logic [AW-1:0] f_out_idx,
  output logic          f_busy,
  output logic          f_done,
  // inverse-only architecture
  input  logic          i_start,
  input  coef_t         i_in_coef,
  input  coef_t         i_in_tw,
  output logic          i_in_ready,
  output logic          i_out_valid,
  output coef_t         i_out_coef,
  output logic [AW-1:0] i_out_idx,
  output logic          i_busy,
  output logic          i_done,
  // unified architecture
  input  logic          u_start,
  input  logic          u_inv_req,
  input  coef_t         u_in_coef,
  input  coef_t         u_in_tw,
  output logic          u_in_ready,
  output logic          u_out_valid,
  output coef_t         u_out_coef,
  output logic [AW-1:0] u_out_idx,
  output logic          u_busy,
  output logic          u_done
);
  fntt_core #(.NN(NN)) u_fntt (
    .clk, .rst_n, .start(f_start), .in_coef(f_in_coef), .in_tw(f_in_tw),
    .in_ready(f_in_ready), .out_valid(f_out_valid), .out_coef(f_out_coef),
    .out_idx(f_out_idx), .busy(f_busy), .done(f_done));

  intt_core #(.NN(NN)) u_intt (
    .clk, .rst_n, .start(i_start), .in_coef(i_in_coef), .in_tw(i_in_tw),
    .in_ready(i_in_ready), .out_valid(i_out_valid), .out_coef(i_out_coef),
    .out_idx(i_out_idx), .busy(i_busy), .done(i_done));

  untt_core #(.NN(NN)) u_untt (
    .clk, .rst_n, .start(u_start), .inv_req(u_inv_req), .in_coef(u_in_coef),
    .in_tw(u_in_tw), .in_ready(u_in_ready), .out_valid(u_out_valid),
    .out_coef(u_out_coef), .out_idx(u_out_idx), .busy(u_busy), .done(u_done));
endmodule
