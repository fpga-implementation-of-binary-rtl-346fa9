// square_unit: one stage of the squaring unit. Squares a signed
// autocorrelation value: sq = acf * acf, an unsigned result of twice the
// magnitude width. Combinational.
module square_unit #(
  parameter int unsigned W = 6
) (
  input  logic signed [W-1:0]     acf,
  output logic [2*(W-1)-1:0]      sq
);

  logic [W-1:0] mag;

  always_comb begin
    mag = acf[W-1] ? W'(-acf) : W'(acf);
    sq  = (2*(W-1))'(mag * mag);
  end

endmodule
