// tb_mac_unit: applies random pairs of element vectors (values -1, 0, +1,
// including the extremes all +1 and opposite signs) to one multiplier and
// adder stage and compares its output with the integer dot product.
module tb_mac_unit;
  import bpc_pkg::*;

  localparam int N = 23;
  elem_t                        a [N];
  elem_t                        b [N];
  logic signed [acf_w(N)-1:0]   acf;
  int checks = 0, failures = 0;

  mac_unit #(.N(N)) dut (.a(a), .b(b), .acf(acf));

  initial begin
    for (int t = 0; t < 500; t++) begin
      int expv;
      expv = 0;
      for (int i = 0; i < N; i++) begin
        int x, y;
        if (t == 0)      begin x = 1; y = 1;  end
        else if (t == 1) begin x = 1; y = -1; end
        else begin
          x = int'($urandom_range(2)) - 1;
          y = int'($urandom_range(2)) - 1;
        end
        a[i] = elem_t'(x);
        b[i] = elem_t'(y);
        expv += x * y;
      end
      #1;
      checks++;
      if (int'(acf) != expv) begin
        failures++;
        $display("FAIL test %0d acf=%0d expected %0d", t, acf, expv);
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
