// ntt_ctrl: dedicated FSM controller of one NTT architecture.
//
// One operation takes 1410 cycles for N = 256, split as in the design's
// timing breakdown:
//   LOAD   N cycles            one coefficient into RegBank1 and one twiddle
//                              factor into RegBank3 per cycle (address idx)
//   PINIT  1 cycle  \
//   PROC   L*N/2     > 898     one butterfly per cycle, L = log2(N)-1 = 7
//   PEND   1 cycle  /          layers of N/2 = 128 butterflies
//   STORE  N cycles            one result coefficient out per cycle
// The split of the 898 processing cycles into 896 butterfly cycles plus one
// entry and one exit cycle is this implementation's reading of the total.
//
// Layers ping-pong between RegBank1 and RegBank2: even layers read bank 1
// and write bank 2, odd layers the reverse, so with 7 layers the result ends
// in bank 2. Butterfly b of layer l works on the pair (lo, lo + len) where
//   forward (CT): len = N/2 >> l,  group g = b / len, twiddle index 2**l + g
//   inverse (GS): len = 2 << l,    group g = b / len, twiddle index
//                                  2*G - 1 - g with G = N/(2*len) groups
// and lo = 2*len*g + (b mod len). This is the Kyber ordering: the forward
// transform walks the twiddle table upwards from index 1, the inverse
// transform downwards from index 127. The final multiplication by 1/128
// after the inverse transform is not part of the operation.
//
// STYLE selects the architecture served: FNTT always forward, INTT always
// inverse, UNTT takes the direction from inv_req at start and drives the
// select of the unified butterfly's multiplexers (inv).
//
// For N = 256 the twiddle index never exceeds 127, so tw_addr[7] is always
// zero, and in the FNTT and INTT styles the mode output inv is a constant;
// synthesis reports these as constant outputs.
//
// Interface: start is accepted in IDLE only. in_ready is high during the N
// load cycles, out_valid during the N store cycles; done pulses with the
// last out_valid cycle; busy covers all 1410 cycles.
module ntt_ctrl
  import ntt_pkg::*;
#(
  parameter ntt_style_e  STYLE = STYLE_FNTT,
  parameter int unsigned NN    = N,
  localparam int unsigned AW   = $clog2(NN),
  localparam int unsigned LAYERS = AW - 1,
  localparam int unsigned BW   = AW - 1,           // butterfly counter width
  localparam int unsigned LW   = $clog2(LAYERS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          inv_req,     // direction request (UNTT only)
  output logic          busy,
  output logic          in_ready,    // load phase: write idx
  output logic          out_valid,   // store phase: read idx
  output logic          done,
  output logic [AW-1:0] idx,         // load/store address
  output logic          bf_we,       // butterfly results are written
  output logic          rd_bank2,    // read RegBank2 (else RegBank1)
  output logic [AW-1:0] lo_addr,
  output logic [AW-1:0] hi_addr,
  output logic [AW-1:0] tw_addr,
  output logic          inv          // butterfly mode: 0 CT, 1 GS
);
  phase_e          ph_q;
  logic [AW-1:0]   cnt_q;            // load/store counter
  logic [BW-1:0]   bf_q;             // butterfly within layer
  logic [LW-1:0]   layer_q;
  logic            inv_q;

  logic last_cnt, last_bf, last_layer;
  assign last_cnt   = (cnt_q == AW'(NN - 1));
  assign last_bf    = (bf_q == {BW{1'b1}});
  assign last_layer = (layer_q == LW'(LAYERS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_q    <= PH_IDLE;
      cnt_q   <= '0;
      bf_q    <= '0;
      layer_q <= '0;
      inv_q   <= (STYLE == STYLE_INTT);
    end else begin
      unique case (ph_q)
        PH_IDLE: if (start) begin
          ph_q  <= PH_LOAD;
          cnt_q <= '0;
          inv_q <= (STYLE == STYLE_UNTT) ? inv_req : (STYLE == STYLE_INTT);
        end
        PH_LOAD: begin
          cnt_q <= cnt_q + 1'b1;
          if (last_cnt) ph_q <= PH_PINIT;
        end
        PH_PINIT: begin
          bf_q    <= '0;
          layer_q <= '0;
          ph_q    <= PH_PROC;
        end
        PH_PROC: begin
          bf_q <= bf_q + 1'b1;
          if (last_bf) begin
            layer_q <= layer_q + 1'b1;
            if (last_layer) ph_q <= PH_PEND;
          end
        end
        PH_PEND: begin
          cnt_q <= '0;
          ph_q  <= PH_STORE;
        end
        PH_STORE: begin
          cnt_q <= cnt_q + 1'b1;
          if (last_cnt) ph_q <= PH_IDLE;
        end
        default: ph_q <= PH_IDLE;
      endcase
    end
  end

  // Butterfly address generation.
  logic [LW-1:0]   log_len;          // log2 of the butterfly span
  logic [BW-1:0]   grp, jj;
  logic [AW-1:0]   lo_full;
  logic [AW-1:0]   len;
  always_comb begin
    log_len = inv_q ? LW'(layer_q + 1'b1) : LW'(LAYERS - layer_q);
    len     = AW'(1) << log_len;
    grp     = bf_q >> log_len;
    jj      = bf_q & BW'(len - 1'b1);
    lo_full = (AW'(grp) << (log_len + 1'b1)) | AW'(jj);
    lo_addr = lo_full;
    hi_addr = lo_full | len;
    if (inv_q)
      tw_addr = AW'((1 << (int'(AW) - int'(log_len))) - 1 - int'(grp));
    else
      tw_addr = (AW'(1) << layer_q) + AW'(grp);
  end

  assign busy      = (ph_q != PH_IDLE);
  assign in_ready  = (ph_q == PH_LOAD);
  assign out_valid = (ph_q == PH_STORE);
  assign done      = out_valid && last_cnt;
  assign idx       = cnt_q;
  assign bf_we     = (ph_q == PH_PROC);
  assign rd_bank2  = (ph_q == PH_STORE) ? (LAYERS % 2 == 1) : layer_q[0];
  assign inv       = inv_q;

  a_load_then_process : assert property (@(posedge clk) disable iff (!rst_n)
    (ph_q == PH_LOAD && last_cnt) |=> (ph_q == PH_PINIT));
  if (STYLE != STYLE_UNTT) begin : g_fixed_mode
    a_fixed_mode : assert property (@(posedge clk) disable iff (!rst_n) inv_q == (STYLE == STYLE_INTT));
  end
endmodule
