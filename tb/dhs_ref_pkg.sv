// dhs_ref_pkg: reference model of the DHS number sources for the testbenches.
//
// Gives the counter states of Halton1 and Halton2 at cycle t after a restart
// in closed form, independent of the RTL counters:
//   counter1(t)          = t mod 2^N
//   prime length   c2(t) = t mod (2^N - 1)
//   rotation       c2(t) = (t - floor(t / 2^N)) mod 2^N   (held once per pass)
//   clock division c2(t) = floor(t / 2^N) mod 2^N
// and the base-2 Halton value as the bit reversal of a state.
package dhs_ref_pkg;

  function automatic int unsigned bitrev(int unsigned v, int unsigned n);
    int unsigned r = 0;
    for (int unsigned i = 0; i < n; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

  function automatic int unsigned ref_c1(longint unsigned t, int unsigned n);
    return int'(t % (64'd1 << n));
  endfunction

  // approach: 0 prime length, 1 rotation, 2 clock division
  function automatic int unsigned ref_c2(int unsigned approach, longint unsigned t, int unsigned n);
    longint unsigned p = 64'd1 << n;
    case (approach)
      0:       return int'(t % (p - 1));
      1:       return int'((t - t / p) % p);
      default: return int'((t / p) % p);
    endcase
  endfunction

  function automatic int unsigned ref_h0(longint unsigned t, int unsigned n);
    return bitrev(ref_c1(t, n), n);
  endfunction

  function automatic int unsigned ref_h1(int unsigned approach, longint unsigned t, int unsigned n);
    return bitrev(ref_c2(approach, t, n), n);
  endfunction

endpackage
