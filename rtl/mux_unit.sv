// mux_unit: one stage of the multiplexer unit, N multiplexers of N:1.
//
// Output i is input element i + sel, or the zero code where i + sel runs past
// the end of the sequence. Fed with the sequence and a lag k on `sel`, the
// outputs are the sequence shifted by k positions with zero fill, which is
// what the multiplier and adder unit needs to form the aperiodic
// autocorrelation A(k). Purely combinational. In the search engine each stage
// gets a constant lag, so synthesis reduces the multiplexers to wiring.
//
// The original architecture names N:1 multiplexers with select lines; using the select lines
// as the lag index is this design's reading.
module mux_unit
  import bpc_pkg::*;
#(
  parameter int unsigned N = 23
) (
  input  elem_t                 elems [N],
  input  logic [lag_w(N)-1:0]   sel,
  output elem_t                 shifted [N]
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      shifted[i] = ELEM_ZERO;
      for (int j = 0; j < N; j++) begin
        if (j >= i && int'(sel) == j - i) shifted[i] = elems[j];
      end
    end
  end

endmodule
