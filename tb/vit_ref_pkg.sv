// vit_ref_pkg: behavioural reference for the testbenches: the rate-1/2, K=3
// encoder (V1 = u^D0^D1, V2 = u^D1, state {D1,D0}), the soft branch metric and
// a textbook Viterbi decoder that keeps a full survivor path per state and
// updates it at every step (plain register exchange), written independently of
// the RTL. Ties go to the lower-numbered predecessor state, and the final
// state is the one with the smallest metric (lowest index on a tie), as in the
// RTL.
package vit_ref_pkg;

  localparam int MAXN = 64;

  typedef int int_arr_t [MAXN];

  function automatic int ref_bm(input int i0, input int i1, input bit v1, input bit v2);
    return (v1 ? -i0 : i0) + (v2 ? -i1 : i1);
  endfunction

  // Code bits of one step from state (d1,d0) with input u.
  function automatic void ref_step(input bit u, input bit d0, input bit d1,
                                   output bit v1, output bit v2);
    v1 = u ^ d0 ^ d1;
    v2 = u ^ d1;
  endfunction

  // Encode n bits starting in state 0.
  function automatic void ref_encode(input int_arr_t bits, input int n,
                                     output int_arr_t v1, output int_arr_t v2);
    bit d0, d1, a, b;
    d0 = 0; d1 = 0;
    for (int t = 0; t < n; t++) begin
      ref_step(bit'(bits[t]), d0, d1, a, b);
      v1[t] = int'(a); v2[t] = int'(b);
      d1 = d0; d0 = bit'(bits[t]);
    end
  endfunction

  // Viterbi decode n soft pairs, start state 0; returns the bits in out[0..n-1].
  function automatic void ref_decode(input int_arr_t i0, input int_arr_t i1, input int n,
                                     output int_arr_t out);
    int     pm [4], npm [4];
    bit     ok [4], nok [4];
    int_arr_t path [4], npath [4];
    int     best;
    for (int s = 0; s < 4; s++) begin pm[s] = 0; ok[s] = (s == 0); end
    for (int t = 0; t < n; t++) begin
      for (int s = 0; s < 4; s++) nok[s] = 0;
      for (int ps = 0; ps < 4; ps++) begin
        if (!ok[ps]) continue;
        for (int u = 0; u < 2; u++) begin
          bit d0, d1, a, b;
          int ns, m;
          d0 = bit'(ps & 1); d1 = bit'(ps >> 1);
          ref_step(bit'(u), d0, d1, a, b);
          ns = (int'(d0) << 1) | u;
          m  = pm[ps] + ref_bm(i0[t], i1[t], a, b);
          if (!nok[ns] || m < npm[ns]) begin
            nok[ns] = 1; npm[ns] = m;
            npath[ns] = path[ps]; npath[ns][t] = u;
          end
        end
      end
      for (int s = 0; s < 4; s++) begin pm[s] = npm[s]; ok[s] = nok[s]; path[s] = npath[s]; end
    end
    best = -1;
    for (int s = 0; s < 4; s++)
      if (ok[s] && (best < 0 || pm[s] < pm[best])) best = s;
    out = path[best];
  endfunction

endpackage
