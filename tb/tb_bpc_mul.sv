// tb_bpc_mul: exhaustive test of the element multiplier. All nine pairs of
// {-1, 0, +1} are applied and the product compared with integer
// multiplication of the operand values.
module tb_bpc_mul;
  import bpc_pkg::*;

  elem_t a, b, p;
  int checks = 0, failures = 0;

  bpc_mul dut (.a(a), .b(b), .p(p));

  initial begin
    for (int x = -1; x <= 1; x++) begin
      for (int y = -1; y <= 1; y++) begin
        a = elem_t'(x);
        b = elem_t'(y);
        #1;
        checks++;
        if (int'(p) != x * y) begin
          failures++;
          $display("FAIL %0d * %0d gave %0d", x, y, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
