// regbank: a register bank of DEPTH words of WIDTH bits built from flip-flops.
//
// The NTT architectures keep the polynomial (RegBank1, RegBank2) and the
// twiddle factors (RegBank3) in banks of 256 x 12-bit registers instead of
// block RAM or compiled SRAM, which keeps them platform independent. Being
// registers, a bank offers any number of combinational read ports and
// several write ports in the same cycle; a butterfly reads two words and
// writes two words each clock.
//
// Interface: NWR write ports (we/waddr/wdata, written at the rising edge of
// clk) and NRD asynchronous read ports (raddr -> rdata in the same cycle).
// Two write ports must not target the same address in one cycle (asserted);
// if they do, the higher-numbered port wins. There is no reset: every word is
// written during the load phase before it is read.
// Size and register-bank style follow the design; port counts are this
// implementation's choice.
module regbank #(
  parameter int unsigned DEPTH = ntt_pkg::N,
  parameter int unsigned WIDTH = ntt_pkg::W,
  parameter int unsigned NRD   = 2,
  parameter int unsigned NWR   = 2,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic [NWR-1:0]          we,
  input  logic [NWR-1:0][AW-1:0]  waddr,
  input  logic [NWR-1:0][WIDTH-1:0] wdata,
  input  logic [NRD-1:0][AW-1:0]  raddr,
  output logic [NRD-1:0][WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NWR; p++)
      if (we[p]) mem[waddr[p]] <= wdata[p];
  end

  always_comb begin
    for (int p = 0; p < NRD; p++) rdata[p] = mem[raddr[p]];
  end

  // A butterfly writes its two results to two different addresses.
  for (genvar a = 0; a < NWR; a++) begin : g_wchk_a
    for (genvar b = a + 1; b < NWR; b++) begin : g_wchk_b
      a_no_write_clash : assert property (@(posedge clk)
        !(we[a] && we[b] && waddr[a] == waddr[b]));
    end
  end
endmodule
