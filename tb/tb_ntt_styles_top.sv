// tb_ntt_styles_top: end-to-end test of the three architectures at full
// size (N = 256, Q = 3329, default parameters), running concurrently.
//
//   round 1  FNTT and UNTT (forward) transform the same random polynomial,
//            INTT inverts an unrelated one; all three compared with the
//            reference model.
//   round 2  the FNTT result is fed to the INTT and the UNTT result back to
//            the UNTT in inverse mode: both must return 128 * input.
//            Start pulses issued while the cores are busy must be ignored.
//   round 3  the UNTT switches back to forward mode.
// Counted mechanisms (each must occur): forward and inverse butterfly
// operations on each core, UNTT mode switches in both directions, start
// requests ignored while busy, three cores busy at once, and the ping-pong
// use of RegBank1/RegBank2 (layers written into each bank). Every operation
// is also checked for the 256 + 898 + 256 = 1410 cycle budget.
module tb_ntt_styles_top;
  import ntt_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic f_start = 0, i_start = 0, u_start = 0, u_inv_req = 0;
  logic [11:0] f_in_coef = 0, f_in_tw = 0, i_in_coef = 0, i_in_tw = 0;
  logic [11:0] u_in_coef = 0, u_in_tw = 0;
  logic f_in_ready, f_out_valid, f_busy, f_done;
  logic i_in_ready, i_out_valid, i_busy, i_done;
  logic u_in_ready, u_out_valid, u_busy, u_done;
  logic [11:0] f_out_coef, i_out_coef, u_out_coef;
  logic [7:0]  f_out_idx, i_out_idx, u_out_idx;
  int checks = 0, failures = 0;
  int n_fwd_ops = 0, n_inv_ops = 0, n_u_fwd = 0, n_u_inv = 0;
  int n_switch_fi = 0, n_switch_if = 0, n_ignored = 0, n_all_busy = 0;
  int n_bank1_layers = 0, n_bank2_layers = 0;
  int n_done_f = 0, n_done_i = 0, n_done_u = 0;
  logic u_last_mode = 1'b0;
  bit   u_has_run = 0;

  ntt_styles_top dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (f_done) n_done_f++;
    if (i_done) n_done_i++;
    if (u_done) n_done_u++;
    if (f_busy && i_busy && u_busy) n_all_busy++;
  end

  // Ping-pong: the first butterfly cycle of each layer writes bank 2
  // (layers read from bank 1) or bank 1 (layers read from bank 2).
  logic f_bf_q = 0;
  logic f_rb2_q = 0;
  always @(posedge clk) begin
    f_bf_q  <= dut.u_fntt.bf_we;
    f_rb2_q <= dut.u_fntt.rd_bank2;
    if (dut.u_fntt.bf_we && (!f_bf_q || f_rb2_q != dut.u_fntt.rd_bank2)) begin
      if (dut.u_fntt.rd_bank2) n_bank1_layers++;
      else n_bank2_layers++;
    end
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic compare(input string what, input poly_t got, input poly_t exp);
    for (int i = 0; i < 256; i++) expect_eq(what, got[i], exp[i]);
  endtask

  function automatic poly_t rand_poly();
    poly_t p;
    for (int i = 0; i < 256; i++) p[i] = int'($urandom % Q);
    return p;
  endfunction

  // The three drivers differ only in the ports they use.
  task automatic run_f(input poly_t a, input poly_t tw, output poly_t out, input bit poke);
    int n_busy = 0, n_ld = 0, n_st = 0;
    @(negedge clk); f_start = 1;
    @(negedge clk); f_start = 0;
    while (f_busy) begin
      n_busy++;
      if (poke && n_busy == 500) begin f_start = 1; n_ignored++; end
      else f_start = 0;
      if (f_in_ready) begin f_in_coef = 12'(a[n_ld]); f_in_tw = 12'(tw[n_ld]); n_ld++; end
      if (f_out_valid) begin expect_eq("f idx", int'(f_out_idx), n_st); out[n_st] = int'(f_out_coef); n_st++; end
      @(negedge clk);
    end
    f_start = 0;
    expect_eq("f cycles", n_busy, 1410);
    n_fwd_ops++;
  endtask

  task automatic run_i(input poly_t a, input poly_t tw, output poly_t out, input bit poke);
    int n_busy = 0, n_ld = 0, n_st = 0;
    @(negedge clk); i_start = 1;
    @(negedge clk); i_start = 0;
    while (i_busy) begin
      n_busy++;
      if (poke && n_busy == 700) begin i_start = 1; n_ignored++; end
      else i_start = 0;
      if (i_in_ready) begin i_in_coef = 12'(a[n_ld]); i_in_tw = 12'(tw[n_ld]); n_ld++; end
      if (i_out_valid) begin expect_eq("i idx", int'(i_out_idx), n_st); out[n_st] = int'(i_out_coef); n_st++; end
      @(negedge clk);
    end
    i_start = 0;
    expect_eq("i cycles", n_busy, 1410);
    n_inv_ops++;
  endtask

  task automatic run_u(input poly_t a, input poly_t tw, input bit inverse, output poly_t out, input bit poke);
    int n_busy = 0, n_ld = 0, n_st = 0;
    if (u_has_run && u_last_mode != inverse) begin
      if (inverse) n_switch_fi++; else n_switch_if++;
    end
    u_has_run = 1; u_last_mode = inverse;
    @(negedge clk); u_start = 1; u_inv_req = inverse;
    @(negedge clk); u_start = 0; u_inv_req = ~inverse;
    while (u_busy) begin
      n_busy++;
      if (poke && n_busy == 900) begin u_start = 1; n_ignored++; end
      else u_start = 0;
      if (u_in_ready) begin u_in_coef = 12'(a[n_ld]); u_in_tw = 12'(tw[n_ld]); n_ld++; end
      if (u_out_valid) begin expect_eq("u idx", int'(u_out_idx), n_st); out[n_st] = int'(u_out_coef); n_st++; end
      @(negedge clk);
    end
    u_start = 0;
    expect_eq("u cycles", n_busy, 1410);
    if (inverse) n_u_inv++; else n_u_fwd++;
  endtask

  initial begin
    poly_t a, b, fa, ua, ib, f2, u2, u3, exp128, tf, ti;
    tf = fwd_table();
    ti = inv_table();
    a = rand_poly();
    b = rand_poly();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // round 1
    fork
      run_f(a, tf, fa, 0);
      run_i(b, ti, ib, 0);
      run_u(a, tf, 1'b0, ua, 0);
    join
    compare("FNTT forward", fa, ref_ntt(a, tf));
    compare("INTT inverse", ib, ref_intt(b, ti));
    compare("UNTT forward", ua, ref_ntt(a, tf));
    // round 2: round trips, with start pulses while busy
    fork
      run_i(fa, ti, f2, 1);
      run_u(ua, ti, 1'b1, u2, 1);
    join
    for (int i = 0; i < 256; i++) exp128[i] = modq(128 * a[i]);
    compare("FNTT->INTT round trip", f2, exp128);
    compare("UNTT round trip", u2, exp128);
    // round 3: back to forward on the unified core
    run_u(b, tf, 1'b0, u3, 0);
    compare("UNTT forward again", u3, ref_ntt(b, tf));
    repeat (3) @(negedge clk);

    expect_eq("done pulses FNTT", n_done_f, n_fwd_ops);
    expect_eq("done pulses INTT", n_done_i, n_inv_ops);
    expect_eq("done pulses UNTT", n_done_u, n_u_fwd + n_u_inv);
    $display("mechanisms: FNTT ops %0d, INTT ops %0d, UNTT fwd %0d, UNTT inv %0d,",
             n_fwd_ops, n_inv_ops, n_u_fwd, n_u_inv);
    $display("  UNTT switches fwd->inv %0d inv->fwd %0d, ignored starts %0d,",
             n_switch_fi, n_switch_if, n_ignored);
    $display("  cycles with all cores busy %0d, layers into bank2 %0d, into bank1 %0d",
             n_all_busy, n_bank2_layers, n_bank1_layers);
    if (n_fwd_ops == 0 || n_inv_ops == 0 || n_u_fwd == 0 || n_u_inv == 0 ||
        n_switch_fi == 0 || n_switch_if == 0 || n_ignored == 0 || n_all_busy == 0 ||
        n_bank1_layers == 0 || n_bank2_layers == 0) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    checks++;
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
