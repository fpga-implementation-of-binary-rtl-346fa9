// tb_bpcs_search_n31: the 31-element configuration, run as a partial search.
// An exhaustive search over 2^31 sequences is too long to simulate, so the
// upper 11 elements are fixed to the best 11-element sequence (energy 5,
// found by exhaustive search) and the lower K = 20 elements are searched:
// 2^20 candidates. The testbench repeats the same search with the bit-level
// reference model of bpc_ref_pkg and checks the minimum energy, the best
// sequence, that the fixed elements are kept, and that `done` rises
// 2^20 + 1 clocks after preset is released.
module tb_bpcs_search_n31;
  import bpc_pkg::*;
  import bpc_ref_pkg::*;

  localparam int N = 31, K = 20;
  localparam logic [10:0] BEST11 = 11'b00011101101;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                   preset = 1'b1;
  logic [N-1:0]           fixed_seq = {BEST11, 20'h0};
  logic [energy_w(N)-1:0] min_energy;
  logic [N-1:0]           best_seq;
  logic                   new_best, found, done;

  bpcs_search #(.N(N), .K(K)) dut (
    .clk(clk), .preset(preset), .fixed_seq(fixed_seq), .min_energy(min_energy),
    .best_seq(best_seq), .new_best(new_best), .found(found), .done(done));

  int checks = 0, failures = 0;
  int loads = 0;
  int cycles = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (new_best) loads++;

  initial begin
    int ref_e;
    longint unsigned ref_s;
    check(ref_energy(longint'(BEST11), 11) == 5, "fixed part is not an optimal 11-element sequence");
    ref_e = -1;
    for (longint unsigned c = 0; c < (64'd1 << K); c++) begin
      longint unsigned s;
      int e;
      s = (longint'(BEST11) << K) | c;
      e = ref_energy(s, N);
      if (ref_e < 0 || e < ref_e) begin
        ref_e = e;
        ref_s = s;
      end
    end
    repeat (2) @(negedge clk);
    preset = 1'b0;
    forever begin
      @(posedge clk);
      cycles++;
      #1;
      if (done) break;
    end
    check(cycles == (1 << K) + 1, $sformatf("done after %0d cycles, expected %0d", cycles, (1 << K) + 1));
    check(int'(min_energy) == ref_e, $sformatf("energy %0d expected %0d", min_energy, ref_e));
    check(longint'(best_seq) == ref_s, $sformatf("seq %b expected %b", best_seq, N'(ref_s)));
    check(best_seq[N-1:K] == BEST11, "fixed elements not kept");
    check(loads > 0, "comparator never loaded");
    $display("N=%0d K=%0d: min energy %0d, best %b, merit factor %0.4f",
             N, K, min_energy, best_seq, real'(N * N) / (2.0 * real'(min_energy)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((1 << K) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
