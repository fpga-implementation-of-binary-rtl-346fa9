// tb_bpcs_search_full: one complete exhaustive search at the default size,
// N = 23 (2^23 = 8,388,608 candidate sequences, one per clock). The
// testbench runs its own exhaustive search with the bit-level reference
// model of bpc_ref_pkg and checks the minimum sidelobe energy, the best
// sequence (the first one in counter order that reaches the minimum), and
// that `done` rises exactly 2^23 + 1 clocks after preset is released. The
// number of comparator loads is counted and must be non-zero.
module tb_bpcs_search_full;
  import bpc_pkg::*;
  import bpc_ref_pkg::*;

  localparam int N = 23;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                   preset = 1'b1;
  logic [N-1:0]           fixed_seq = '0;
  logic [energy_w(N)-1:0] min_energy;
  logic [N-1:0]           best_seq;
  logic                   new_best, found, done;

  bpcs_search dut (
    .clk(clk), .preset(preset), .fixed_seq(fixed_seq), .min_energy(min_energy),
    .best_seq(best_seq), .new_best(new_best), .found(found), .done(done));

  int checks = 0, failures = 0;
  int loads = 0;
  longint cycles = 0;

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
    ref_e = -1;
    for (longint unsigned c = 0; c < (64'd1 << N); c++) begin
      int e;
      e = ref_energy(c, N);
      if (ref_e < 0 || e < ref_e) begin
        ref_e = e;
        ref_s = c;
      end
    end
    $display("reference: min energy %0d, first best %b", ref_e, N'(ref_s));

    repeat (2) @(negedge clk);
    preset = 1'b0;
    forever begin
      @(posedge clk);
      cycles++;
      #1;
      if (done) break;
    end
    check(cycles == (64'd1 << N) + 1,
          $sformatf("done after %0d cycles, expected %0d", cycles, (64'd1 << N) + 1));
    check(int'(min_energy) == ref_e, $sformatf("energy %0d expected %0d", min_energy, ref_e));
    check(longint'(best_seq) == ref_s, $sformatf("seq %b expected %b", best_seq, N'(ref_s)));
    check(found, "found low");
    check(loads > 0, "comparator never loaded");
    $display("N=%0d: min energy %0d, best %b, merit factor %0.4f, loads %0d",
             N, min_energy, best_seq, real'(N * N) / (2.0 * real'(min_energy)), loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((1 << N) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
