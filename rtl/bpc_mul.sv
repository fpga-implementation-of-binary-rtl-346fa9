// bpc_mul: multiplier for two sequence elements in the 2-bit code of bpc_pkg
// (+1, -1 or 0). The product is zero when either operand is zero, otherwise
// +1 when the signs agree and -1 when they differ, so it needs no arithmetic
// multiplier: one XOR of the sign bits and a zero test. Combinational.
module bpc_mul
  import bpc_pkg::*;
(
  input  elem_t a,
  input  elem_t b,
  output elem_t p
);

  always_comb begin
    if (a == ELEM_ZERO || b == ELEM_ZERO) p = ELEM_ZERO;
    else if (a[1] ^ b[1])                 p = ELEM_NEG;
    else                                  p = ELEM_POS;
  end

endmodule
