// energy_adder: the adder unit at the bottom of the correlator. Adds the N-1
// squared sidelobes A(k)^2, k = 1 .. N-1, into the sidelobe energy
//   E = sum_{k=1}^{N-1} A(k)^2,
// the quantity the search minimises. Input element k of `sq` is A(k)^2;
// element 0 (the mainlobe lag) is not used. Combinational.
module energy_adder
  import bpc_pkg::*;
#(
  parameter int unsigned N = 23
) (
  input  logic [sq_w(N)-1:0]      sq [N],
  output logic [energy_w(N)-1:0]  energy
);

  always_comb begin
    energy = '0;
    for (int k = 1; k < N; k++) begin
      energy = energy + (energy_w(N))'(sq[k]);
    end
  end

endmodule
