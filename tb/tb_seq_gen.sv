// tb_seq_gen: checks the sequence generator in partial-search form (N = 10,
// K = 6, upper four elements fixed) and in full form (N = K = 7). For each it
// holds preset for several cycles (nothing may be valid), then expects every
// counter value 0 .. 2^K-1 in order, one per clock, with the fixed upper bits
// copied, `last` on the final one only, and no valid output afterwards.
module tb_seq_gen;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // partial search: N = 10, K = 6
  localparam int NA = 10, KA = 6;
  logic            preset_a;
  logic [NA-1:0]   fixed_a, seq_a;
  logic            valid_a, last_a;
  seq_gen #(.N(NA), .K(KA)) dut_a (
    .clk(clk), .preset(preset_a), .fixed_seq(fixed_a),
    .seq(seq_a), .seq_valid(valid_a), .last(last_a));

  // exhaustive: N = K = 7
  localparam int NB = 7;
  logic            preset_b;
  logic [NB-1:0]   fixed_b, seq_b;
  logic            valid_b, last_b;
  seq_gen #(.N(NB)) dut_b (
    .clk(clk), .preset(preset_b), .fixed_seq(fixed_b),
    .seq(seq_b), .seq_valid(valid_b), .last(last_b));

  initial begin
    preset_a = 1'b1;
    preset_b = 1'b1;
    fixed_a  = 10'b1011_110101;   // low K bits must be ignored
    fixed_b  = 7'b1010101;        // all ignored when K = N
    repeat (4) begin
      @(posedge clk); #1;
      check(!valid_a && !valid_b, "valid during preset");
    end
    preset_a = 1'b0;
    preset_b = 1'b0;
    for (int c = 0; c < (1 << KA) + 5; c++) begin
      #1;
      if (c < (1 << KA)) begin
        check(valid_a, $sformatf("A not valid at step %0d", c));
        check(seq_a == {4'b1011, 6'(c)}, $sformatf("A seq %b at step %0d", seq_a, c));
        check(last_a == (c == (1 << KA) - 1), $sformatf("A last at step %0d", c));
      end else begin
        check(!valid_a && !last_a, $sformatf("A valid after end at step %0d", c));
      end
      if (c < (1 << NB)) begin
        check(valid_b, $sformatf("B not valid at step %0d", c));
        check(seq_b == 7'(c), $sformatf("B seq %b at step %0d", seq_b, c));
        check(last_b == (c == (1 << NB) - 1), $sformatf("B last at step %0d", c));
      end else begin
        check(!valid_b, $sformatf("B valid after end at step %0d", c));
      end
      @(posedge clk);
    end
    // a second preset restarts the count
    #1 preset_a = 1'b1;
    @(posedge clk); #1 preset_a = 1'b0;
    #1;
    check(valid_a && seq_a[KA-1:0] == '0, "A did not restart after preset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
