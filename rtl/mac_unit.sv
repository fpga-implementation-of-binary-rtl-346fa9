// mac_unit: one stage of the multiplier and adder unit. It multiplies the
// sequence element by element with its shifted copy (from a mux_unit stage)
// in N bpc_mul multipliers and adds the N products, giving the aperiodic
// autocorrelation of the sequence at that stage's lag:
//   acf = sum_{i=0}^{N-1} a[i] * b[i],  and with b[i] = a[i+k] (0 past the end)
//   acf = A(k) = sum_{i=0}^{N-1-k} a[i] a[i+k].
// Purely combinational; the sum is a plain adder chain that synthesis is free
// to rebalance. The result is signed, acf_w(N) bits wide.
module mac_unit
  import bpc_pkg::*;
#(
  parameter int unsigned N = 23
) (
  input  elem_t                       a [N],
  input  elem_t                       b [N],
  output logic signed [acf_w(N)-1:0]  acf
);

  elem_t prod [N];

  for (genvar i = 0; i < N; i++) begin : g_mul
    bpc_mul u_mul (.a(a[i]), .b(b[i]), .p(prod[i]));
  end

  always_comb begin
    acf = '0;
    for (int i = 0; i < N; i++) begin
      acf = acf + (acf_w(N))'(prod[i]);
    end
  end

endmodule
