// tb_energy_adder: drives random squared sidelobes A(k)^2, each with
// |A(k)| <= N-k as in a real sequence, plus the largest possible set,
// (N-k)^2 for every lag, and compares the adder unit's output with the sum
// over lags 1 .. N-1. Element 0, the mainlobe slot, is driven too and must
// be ignored.
module tb_energy_adder;
  import bpc_pkg::*;

  localparam int N = 23;
  logic [sq_w(N)-1:0]     sq [N];
  logic [energy_w(N)-1:0] energy;
  int checks = 0, failures = 0;

  energy_adder #(.N(N)) dut (.sq(sq), .energy(energy));

  initial begin
    for (int t = 0; t < 300; t++) begin
      int expv;
      expv = 0;
      for (int k = 0; k < N; k++) begin
        int v;
        if (t == 0) v = (N - k) * (N - k);
        else begin
          int a;
          a = int'($urandom_range(N - k));
          v = a * a;
        end
        sq[k] = sq_w(N)'(v);
        if (k > 0) expv += v;
      end
      #1;
      checks++;
      if (int'(energy) != expv) begin
        failures++;
        $display("FAIL test %0d energy=%0d expected %0d", t, energy, expv);
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
