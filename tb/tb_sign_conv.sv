// tb_sign_conv: drives random 23-bit patterns (plus all zeros and all ones)
// into the sign conversion unit and checks that every element is +1 where
// the bit is 1 and -1 where it is 0.
module tb_sign_conv;
  import bpc_pkg::*;

  localparam int N = 23;
  logic [N-1:0] bits;
  elem_t        elems [N];
  int checks = 0, failures = 0;

  sign_conv #(.N(N)) dut (.bits(bits), .elems(elems));

  initial begin
    for (int t = 0; t < 200; t++) begin
      if (t == 0) bits = '0;
      else if (t == 1) bits = '1;
      else bits = N'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(elems[i]) != (bits[i] ? 1 : -1)) begin
          failures++;
          $display("FAIL bits=%h element %0d = %0d", bits, i, elems[i]);
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
