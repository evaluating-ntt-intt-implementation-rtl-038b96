// tb_ntt_ctrl: checks the controller of each architecture style cycle by
// cycle. Three instances (FNTT, INTT, UNTT) run one operation each, the
// UNTT one twice (forward, then inverse). For every processing cycle the
// butterfly pair (lo, hi), the twiddle index and the bank being read are
// compared with the Kyber loop nests written out in the testbench; the
// phase lengths (256 load, 898 processing, 256 store, 1410 in total), the
// load/store index order, the done pulse and the butterfly mode are checked
// as well.
module tb_ntt_ctrl;
  import ntt_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] start = '0;
  logic inv_req = 1'b0;
  logic [2:0] busy, in_ready, out_valid, done, bf_we, rd_bank2, inv;
  logic [2:0][7:0] idx, lo_addr, hi_addr, tw_addr;
  int checks = 0, failures = 0;

  ntt_ctrl #(.STYLE(STYLE_FNTT)) u_f (.clk, .rst_n, .start(start[0]), .inv_req,
    .busy(busy[0]), .in_ready(in_ready[0]), .out_valid(out_valid[0]), .done(done[0]),
    .idx(idx[0]), .bf_we(bf_we[0]), .rd_bank2(rd_bank2[0]), .lo_addr(lo_addr[0]),
    .hi_addr(hi_addr[0]), .tw_addr(tw_addr[0]), .inv(inv[0]));
  ntt_ctrl #(.STYLE(STYLE_INTT)) u_i (.clk, .rst_n, .start(start[1]), .inv_req,
    .busy(busy[1]), .in_ready(in_ready[1]), .out_valid(out_valid[1]), .done(done[1]),
    .idx(idx[1]), .bf_we(bf_we[1]), .rd_bank2(rd_bank2[1]), .lo_addr(lo_addr[1]),
    .hi_addr(hi_addr[1]), .tw_addr(tw_addr[1]), .inv(inv[1]));
  ntt_ctrl #(.STYLE(STYLE_UNTT)) u_u (.clk, .rst_n, .start(start[2]), .inv_req,
    .busy(busy[2]), .in_ready(in_ready[2]), .out_valid(out_valid[2]), .done(done[2]),
    .idx(idx[2]), .bf_we(bf_we[2]), .rd_bank2(rd_bank2[2]), .lo_addr(lo_addr[2]),
    .hi_addr(hi_addr[2]), .tw_addr(tw_addr[2]), .inv(inv[2]));

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Expected butterfly schedule, built from the Kyber loop nests.
  int exp_lo [896], exp_hi [896], exp_tw [896], exp_layer [896];
  function automatic void schedule(input bit inverse);
    int n = 0, k, layer = 0;
    k = inverse ? 127 : 1;
    if (!inverse) begin
      for (int len = 128; len >= 2; len /= 2) begin
        for (int s = 0; s < 256; s += 2 * len) begin
          for (int j = s; j < s + len; j++) begin
            exp_lo[n] = j; exp_hi[n] = j + len; exp_tw[n] = k; exp_layer[n] = layer; n++;
          end
          k++;
        end
        layer++;
      end
    end else begin
      for (int len = 2; len <= 128; len *= 2) begin
        for (int s = 0; s < 256; s += 2 * len) begin
          for (int j = s; j < s + len; j++) begin
            exp_lo[n] = j; exp_hi[n] = j + len; exp_tw[n] = k; exp_layer[n] = layer; n++;
          end
          k--;
        end
        layer++;
      end
    end
  endfunction

  task automatic run(input int c, input bit inverse);
    int n_load = 0, n_bf = 0, n_other = 0, n_store = 0, n_busy = 0, n_done = 0;
    schedule(inverse);
    @(negedge clk);
    start[c] = 1'b1; inv_req = inverse;
    @(negedge clk);
    start[c] = 1'b0; inv_req = ~inverse;
    expect_eq("mode", int'(inv[c]), int'(inverse));
    while (busy[c]) begin
      n_busy++;
      if (in_ready[c]) begin
        expect_eq("load idx", int'(idx[c]), n_load);
        n_load++;
      end else if (bf_we[c]) begin
        expect_eq("lo", int'(lo_addr[c]), exp_lo[n_bf]);
        expect_eq("hi", int'(hi_addr[c]), exp_hi[n_bf]);
        expect_eq("tw", int'(tw_addr[c]), exp_tw[n_bf]);
        expect_eq("bank", int'(rd_bank2[c]), exp_layer[n_bf] % 2);
        n_bf++;
      end else if (out_valid[c]) begin
        expect_eq("store idx", int'(idx[c]), n_store);
        expect_eq("result bank", int'(rd_bank2[c]), 1);
        if (done[c]) begin
          n_done++;
          expect_eq("done on last", n_store, 255);
        end
        n_store++;
      end else n_other++;
      @(negedge clk);
    end
    expect_eq("load cycles", n_load, 256);
    expect_eq("butterfly cycles", n_bf, 896);
    expect_eq("processing cycles", n_bf + n_other, 898);
    expect_eq("store cycles", n_store, 256);
    expect_eq("total cycles", n_busy, 1410);
    expect_eq("done pulses", n_done, 1);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(0, 1'b0);
    run(1, 1'b1);
    run(2, 1'b0);
    run(2, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
