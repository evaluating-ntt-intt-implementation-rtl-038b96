// fntt_core: forward-only NTT architecture (FNTT) for Kyber polynomials.
//
// Computes the Kyber forward NTT (7 Cooley-Tukey layers, the 128 pairs of
// the incomplete negacyclic transform) of a 256-coefficient polynomial
// with the Cooley-Tukey butterfly ct_btf. Twiddle entry k (k = 1..127) must
// hold zeta**bitrev7(k) mod Q with zeta = 17; the other entries are loaded
// but not used.
//
// Datapath: three 256 x 12-bit register banks and one butterfly, sequenced
// by a dedicated FSM controller (ntt_ctrl). RegBank1 receives the input
// polynomial and RegBank3 the twiddle table during the 256 load cycles.
// The 7 butterfly layers then ping-pong between RegBank1 and RegBank2, one
// butterfly per clock: the butterfly reads u = r[lo] and t = r[hi] of the
// source bank and w from RegBank3, and writes x to r[lo] and y to r[hi] of
// the other bank. The result lands in RegBank2 and is streamed out in the
// 256 store cycles. There is no pipelining: the clock period covers bank
// read mux, butterfly and bank write.
//
// Timing: 1410 cycles per operation = 256 load + 898 processing + 256 store.
// Interface: pulse start while busy is low. For the next 256 cycles
// (in_ready high) present coefficient i on in_coef and twiddle-table entry i
// on in_tw in cycle i. When out_valid is high, out_coef carries result
// coefficient out_idx (0..255 in order); done marks the last one.
// All values are 12-bit residues below Q = 3329.
//
// Follows the design: register banks, one butterfly, dedicated controller,
// cycle budget. This implementation's own choices: the load/store handshake,
// the ping-pong assignment of layers to banks and the twiddle addressing.
module fntt_core
  import ntt_pkg::*;
#(
  parameter int unsigned NN = N,
  localparam int unsigned AW = $clog2(NN)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  coef_t         in_coef,    // input coefficient, index 0..N-1 in order
  input  coef_t         in_tw,      // twiddle factor for table index 0..N-1
  output logic          in_ready,
  output logic          out_valid,
  output coef_t         out_coef,
  output logic [AW-1:0] out_idx,
  output logic          busy,
  output logic          done
);
  logic [AW-1:0]   idx, lo_addr, hi_addr, tw_addr;
  logic            bf_we, rd_bank2, inv;
  coef_t           u, t, w, bx, by;
  logic [1:0][W-1:0]  rb1_rd, rb2_rd;
  logic [0:0][W-1:0]  rb3_rd;
  logic [1:0]         rb1_we, rb2_we;
  logic [1:0][AW-1:0] rb1_wa, rb2_wa, rd_a;
  logic [1:0][W-1:0]  rb1_wd, rb2_wd;

  ntt_ctrl #(.STYLE(STYLE_FNTT), .NN(NN)) u_ctrl (
    .clk, .rst_n, .start, .inv_req(1'b0), .busy, .in_ready, .out_valid,
    .done, .idx, .bf_we, .rd_bank2, .lo_addr, .hi_addr, .tw_addr, .inv
  );

  // Read ports 0/1 of RegBank1 and RegBank2: butterfly pair, or the store index.
  assign rd_a[0] = out_valid ? idx : lo_addr;
  assign rd_a[1] = hi_addr;

  // RegBank1: loaded with the input polynomial, written by odd layers.
  always_comb begin
    rb1_we = {bf_we && rd_bank2, (bf_we && rd_bank2) || in_ready};
    rb1_wa = {hi_addr, in_ready ? idx : lo_addr};
    rb1_wd = {by, in_ready ? in_coef : bx};
    rb2_we = {2{bf_we && !rd_bank2}};
    rb2_wa = {hi_addr, lo_addr};
    rb2_wd = {by, bx};
  end

  regbank #(.DEPTH(NN), .WIDTH(W), .NRD(2), .NWR(2)) u_regbank1 (
    .clk, .we(rb1_we), .waddr(rb1_wa), .wdata(rb1_wd), .raddr(rd_a), .rdata(rb1_rd));
  regbank #(.DEPTH(NN), .WIDTH(W), .NRD(2), .NWR(2)) u_regbank2 (
    .clk, .we(rb2_we), .waddr(rb2_wa), .wdata(rb2_wd), .raddr(rd_a), .rdata(rb2_rd));
  // RegBank3: twiddle factors, written once per operation.
  regbank #(.DEPTH(NN), .WIDTH(W), .NRD(1), .NWR(1)) u_regbank3 (
    .clk, .we(in_ready), .waddr(idx), .wdata(in_tw), .raddr(tw_addr), .rdata(rb3_rd));

  assign u = rd_bank2 ? rb2_rd[0] : rb1_rd[0];
  assign t = rd_bank2 ? rb2_rd[1] : rb1_rd[1];
  assign w = rb3_rd[0];

  ct_btf u_btf (.u, .t, .w, .x(bx), .y(by));
  logic unused_inv;
  assign unused_inv = inv;

  assign out_coef = u;
  assign out_idx  = idx;
endmodule
