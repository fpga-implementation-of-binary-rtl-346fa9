// bpc_ref_pkg: reference model for the testbenches. Computes the sidelobe
// energy of a binary sequence straight from its bit pattern, without the
// element codes, multiplexers or multipliers of the design: for lag k the
// products s[i] s[i+k] are +1 where bits i and i+k agree, so
//   A(k) = (N - k) - 2 * popcount((s ^ (s >> k)) & mask(N - k))
// and E = sum_{k=1}^{N-1} A(k)^2.
package bpc_ref_pkg;

  function automatic int ref_acf(input longint unsigned s, input int n, input int k);
    longint unsigned d;
    d = (s ^ (s >> k)) & ((64'd1 << (n - k)) - 1);
    return (n - k) - 2 * $countones(d);
  endfunction

  function automatic int ref_energy(input longint unsigned s, input int n);
    int e = 0;
    for (int k = 1; k < n; k++) begin
      int a;
      a = ref_acf(s, n, k);
      e += a * a;
    end
    return e;
  endfunction

endpackage
