// tb_square_unit: exhaustive test of the squaring unit at the width used for
// 23-element sequences (6-bit signed input): every value -31 .. 31 is squared
// and compared with integer multiplication.
module tb_square_unit;
  localparam int W = 6;
  logic signed [W-1:0]   acf;
  logic [2*(W-1)-1:0]    sq;
  int checks = 0, failures = 0;

  square_unit #(.W(W)) dut (.acf(acf), .sq(sq));

  initial begin
    for (int v = -(2**(W-1)) + 1; v < 2**(W-1); v++) begin
      acf = W'(v);
      #1;
      checks++;
      if (int'(sq) != v * v) begin
        failures++;
        $display("FAIL %0d^2 gave %0d", v, sq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
