// bpc_pkg: types and width functions shared by the binary pulse compression
// sequence search engine.
//
// A sequence element is carried as a 2-bit two's-complement number, the
// encoding the sign conversion unit produces: 2'b01 = +1, 2'b11 = -1 and
// 2'b00 = 0. A binary sequence only ever uses +1 and -1; the zero code is
// what the multiplexers put out past the end of a shifted sequence.
//
// The width functions size the datapath for a sequence of length n:
//   acf_w(n)    signed width of an aperiodic autocorrelation value A(k),
//               |A(k)| <= n - 1 for k >= 1
//   sq_w(n)     width of A(k)^2 <= (n - 1)^2
//   energy_w(n) width of the sidelobe energy E = sum_{k=1}^{n-1} A(k)^2,
//               bounded by sum_{k=1}^{n-1} (n - k)^2 = (n-1) n (2n-1) / 6
//   lag_w(n)    width of a lag index 0 .. n-1
package bpc_pkg;

  typedef logic signed [1:0] elem_t;

  localparam elem_t ELEM_ZERO = 2'sb00;
  localparam elem_t ELEM_POS  = 2'sb01;
  localparam elem_t ELEM_NEG  = 2'sb11;

  function automatic int unsigned clog2u(input longint unsigned v);
    int unsigned r = 0;
    longint unsigned x = 1;
    while (x < v) begin
      x = x << 1;
      r++;
    end
    return r;
  endfunction

  function automatic int unsigned acf_w(input int unsigned n);
    return clog2u(longint'(n)) + 1;
  endfunction

  function automatic int unsigned sq_w(input int unsigned n);
    return 2 * clog2u(longint'(n));
  endfunction

  function automatic longint unsigned energy_max(input int unsigned n);
    return (longint'(n) - 1) * longint'(n) * (2 * longint'(n) - 1) / 6;
  endfunction

  function automatic int unsigned energy_w(input int unsigned n);
    return clog2u(energy_max(n) + 1);
  endfunction

  function automatic int unsigned lag_w(input int unsigned n);
    return (n > 1) ? clog2u(longint'(n)) : 1;
  endfunction

endpackage
