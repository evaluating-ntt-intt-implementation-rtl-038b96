// ntt_ref_pkg: reference arithmetic for the NTT testbenches, written
// independently of the RTL with plain integer '%' arithmetic.
//
// zeta(k)        17**bitrev7(k) mod 3329, the Kyber twiddle table
// fwd_table / inv_table   twiddle tables in the layout the cores expect
//                (entry k = zeta(k), or 3329 - zeta(k), for k = 0..255;
//                entries 128..255 are filler and are never used)
// ref_ntt        Kyber forward NTT (7 Cooley-Tukey layers, len 128 .. 2)
// ref_intt       Kyber inverse NTT layers without the final 1/128 scaling
package ntt_ref_pkg;
  localparam int Q = 3329;

  typedef int poly_t [256];

  function automatic int modq(input longint v);
    longint r = v % Q;
    if (r < 0) r += Q;
    return int'(r);
  endfunction

  function automatic int bitrev7(input int k);
    int r = 0;
    for (int i = 0; i < 7; i++) if (k & (1 << i)) r |= 1 << (6 - i);
    return r;
  endfunction

  function automatic int zeta(input int k);
    longint p = 1;
    for (int i = 0; i < bitrev7(k & 127); i++) p = (p * 17) % Q;
    return int'(p);
  endfunction

  function automatic poly_t fwd_table();
    poly_t t;
    for (int k = 0; k < 256; k++) t[k] = (k < 128) ? zeta(k) : (k * 7) % Q;
    return t;
  endfunction

  function automatic poly_t inv_table();
    poly_t t;
    for (int k = 0; k < 256; k++) t[k] = (k < 128) ? modq(Q - zeta(k)) : (k * 11) % Q;
    return t;
  endfunction

  function automatic poly_t ref_ntt(input poly_t a, input poly_t tw);
    poly_t r = a;
    int k = 1;
    for (int len = 128; len >= 2; len /= 2)
      for (int start = 0; start < 256; start += 2 * len) begin
        int z = tw[k++];
        for (int j = start; j < start + len; j++) begin
          longint p = longint'(z) * r[j + len];
          r[j + len] = modq(r[j] - p);
          r[j]       = modq(r[j] + p);
        end
      end
    return r;
  endfunction

  // Butterfly as in the INTT datapath: lo = lo + hi, hi = w * (lo - hi).
  function automatic poly_t ref_intt(input poly_t a, input poly_t tw);
    poly_t r = a;
    int k = 127;
    for (int len = 2; len <= 128; len *= 2)
      for (int start = 0; start < 256; start += 2 * len) begin
        int z = tw[k--];
        for (int j = start; j < start + len; j++) begin
          int u = r[j];
          r[j]       = modq(u + r[j + len]);
          r[j + len] = modq(longint'(z) * (u - r[j + len]));
        end
      end
    return r;
  endfunction
endpackage
