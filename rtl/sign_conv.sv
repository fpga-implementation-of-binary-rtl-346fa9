// sign_conv: sign conversion unit. Turns the N counter bits of a candidate
// sequence into N signed 2-bit elements: bit value 1 becomes +1 (code 2'b01)
// and bit value 0 becomes -1 (code 2'b11), the element encoding of bpc_pkg.
// Purely combinational.
//
// The 2-bit codes come from the original architecture; mapping a 0 bit to -1 (rather than to the
// zero code) is this design's reading for binary sequences, whose elements
// are only +1 and -1.
module sign_conv
  import bpc_pkg::*;
#(
  parameter int unsigned N = 23
) (
  input  logic [N-1:0] bits,
  output elem_t        elems [N]
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      elems[i] = bits[i] ? ELEM_POS : ELEM_NEG;
    end
  end

endmodule
