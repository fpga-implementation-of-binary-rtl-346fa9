// tb_mux_unit: applies random element vectors (values -1, 0, +1) and every
// select value 0 .. N-1 to one multiplexer stage, and checks that output i is
// input i + sel, or zero past the end of the sequence.
module tb_mux_unit;
  import bpc_pkg::*;

  localparam int N = 23;
  elem_t                elems   [N];
  elem_t                shifted [N];
  logic [lag_w(N)-1:0]  sel;
  int vals [N];
  int checks = 0, failures = 0;

  mux_unit #(.N(N)) dut (.elems(elems), .sel(sel), .shifted(shifted));

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < N; i++) begin
        vals[i]  = int'($urandom_range(2)) - 1;
        elems[i] = elem_t'(vals[i]);
      end
      for (int s = 0; s < N; s++) begin
        sel = lag_w(N)'(s);
        #1;
        for (int i = 0; i < N; i++) begin
          int expv;
          expv = (i + s < N) ? vals[i + s] : 0;
          checks++;
          if (int'(shifted[i]) != expv) begin
            failures++;
            $display("FAIL sel=%0d out[%0d]=%0d expected %0d", s, i, shifted[i], expv);
          end
        end
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
