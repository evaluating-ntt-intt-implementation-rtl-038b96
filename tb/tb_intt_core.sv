// tb_intt_core: full-size operations on the intt_core architecture.
// Inverse transforms of random polynomials, plus a round trip: the
// reference forward NTT of a polynomial, run through the core, must give
// back 128 times the polynomial (mod Q).
// Every operation streams a polynomial and a twiddle table in, collects the
// 256 results, and compares them with the reference model of ntt_ref_pkg.
// It also checks the cycle budget of one operation: 256 load cycles,
// 898 processing cycles, 256 store cycles, 1410 in total, and that the
// results come out in index order with done on the last one.
module tb_intt_core;
  import ntt_ref_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0, inv_req = 1'b0;
  logic [11:0] in_coef = '0, in_tw = '0, out_coef;
  logic        in_ready, out_valid, busy, done;
  logic [7:0]  out_idx;
  int checks = 0, failures = 0;

  intt_core dut (.clk, .rst_n, .start, .in_coef, .in_tw, .in_ready, .out_valid,
          .out_coef, .out_idx, .busy, .done);

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // One operation: returns the 256 results in out.
  task automatic run(input poly_t a, input poly_t tw, input logic inverse, output poly_t out);
    int n_load = 0, n_proc = 0, n_store = 0, n_busy = 0, n_done = 0;
    @(negedge clk);
    start = 1'b1; inv_req = inverse;
    @(negedge clk);
    start = 1'b0; inv_req = $urandom;   // must have been sampled with start
    while (busy) begin
      n_busy++;
      if (in_ready) begin
        in_coef = 12'(a[n_load]); in_tw = 12'(tw[n_load]);
        n_load++;
      end else if (out_valid) begin
        expect_eq("out_idx", int'(out_idx), n_store);
        out[n_store] = int'(out_coef);
        if (done) n_done++;
        if (done) expect_eq("done on last", n_store, 255);
        n_store++;
      end else n_proc++;
      @(negedge clk);
    end
    expect_eq("load cycles", n_load, 256);
    expect_eq("processing cycles", n_proc, 898);
    expect_eq("store cycles", n_store, 256);
    expect_eq("total cycles", n_busy, 1410);
    expect_eq("done pulses", n_done, 1);
  endtask

  task automatic compare(input string what, input poly_t got, input poly_t exp);
    for (int i = 0; i < 256; i++) expect_eq(what, got[i], exp[i]);
  endtask

  function automatic poly_t rand_poly();
    poly_t p;
    for (int i = 0; i < 256; i++) p[i] = int'($urandom % Q);
    return p;
  endfunction

  initial begin
    poly_t a, b, c, tf, ti;
    tf = fwd_table();
    ti = inv_table();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3; i++) begin
      a = rand_poly();
      run(a, ti, 1'b1, b);
      compare("random inverse", b, ref_intt(a, ti));
    end
    a = rand_poly();
    run(ref_ntt(a, tf), ti, 1'b1, b);
    for (int i = 0; i < 256; i++) c[i] = modq(128 * a[i]);
    compare("round trip", b, c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
