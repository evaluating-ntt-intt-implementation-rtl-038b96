// tb_unified_btf: exhaustive corner values and random residues through the unified_btf
// butterfly, compared with the butterfly equations evaluated with '%'.
// Both modes, alternating every vector so that the muxes switch constantly.
module tb_unified_btf;
  import ntt_ref_pkg::*;
  logic clk = 1'b0;
  logic        inv;
  logic [11:0] u, t, w, x, y;
  int checks = 0, failures = 0;
  int modes_seen [2] = '{0, 0};

  unified_btf dut (.inv, .u, .t, .w, .x, .y);

  always #5 clk = ~clk;

  task automatic check(input int uu, input int tt, input int ww, input logic m);
    int ex, ey;
    u = 12'(uu); t = 12'(tt); w = 12'(ww); inv = m;
    #1;
    if (!m) begin
      ex = modq(longint'(uu) + longint'(tt) * ww);
      ey = modq(longint'(uu) - longint'(tt) * ww);
    end else begin
      ex = modq(uu + tt);
      ey = modq(longint'(ww) * (uu - tt));
    end
    modes_seen[m]++;
    checks += 2;
    if (int'(x) != ex || int'(y) != ey) begin
      failures++;
      if (failures < 10)
        $display("FAIL inv=%0d u=%0d t=%0d w=%0d: x=%0d y=%0d expected %0d %0d",
                 m, uu, tt, ww, x, y, ex, ey);
    end
  endtask

  initial begin
    int corner [6] = '{0, 1, 2, Q/2, Q-2, Q-1};
    foreach (corner[a]) foreach (corner[b]) foreach (corner[c])
      for (int m = 0; m < 2; m++) check(corner[a], corner[b], corner[c], 1'(m));
    for (int i = 0; i < 50000; i++)
      for (int m = 0; m < 2; m++)
        check(int'($urandom % Q), int'($urandom % Q), int'($urandom % Q), 1'(m));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
