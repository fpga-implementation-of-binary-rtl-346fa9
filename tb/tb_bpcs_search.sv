// tb_bpcs_search: end-to-end test of the search engine at reduced lengths.
//
// Three searches run side by side, each checked against an exhaustive search
// done in the testbench with the bit-level reference model of bpc_ref_pkg:
//   A: N = 13, exhaustive (K = N). The optimum is a Barker-13 sequence,
//      sidelobe energy 6, merit factor 14.08.
//   B: N = 16, K = 10: the upper six elements are fixed to a given pattern
//      and the last ten are searched.
//   C: N = 11, exhaustive, run twice to show that a second preset restarts
//      the search and clears the old result.
// For each run it checks the minimum energy, that the best sequence is the
// first one (in counter order) reaching it, that the result has that energy,
// and that `done` rises exactly 2^K + 1 clocks after preset is released.
// Mechanisms counted, each of which must happen at least once: preset start,
// comparator load (new best), ties that must not load, partial search with
// fixed elements, restart by a second preset, done.
module tb_bpcs_search;
  import bpc_pkg::*;
  import bpc_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_presets = 0, n_loads = 0, n_ties = 0, n_partial = 0, n_restarts = 0, n_done = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // reference search: first sequence (in counter order) with minimum energy
  task automatic ref_search(input int n, input int k, input longint unsigned fixed,
                            output int best_e, output longint unsigned best_s,
                            output int n_min_ties);
    longint unsigned hi;
    hi = (k < n) ? ((fixed >> k) << k) : 0;
    best_e = -1;
    n_min_ties = 0;
    for (longint unsigned c = 0; c < (64'd1 << k); c++) begin
      longint unsigned s;
      int e;
      s = hi | c;
      e = ref_energy(s, n);
      if (best_e < 0 || e < best_e) begin
        best_e = e;
        best_s = s;
        n_min_ties = 0;
      end else if (e == best_e) begin
        n_min_ties++;
      end
    end
  endtask

  // ---------------- instance A: N = 13 exhaustive
  localparam int NA = 13;
  logic                    preset_a = 1'b1;
  logic [NA-1:0]           fixed_a = '0;
  logic [energy_w(NA)-1:0] emin_a;
  logic [NA-1:0]           best_a;
  logic                    nb_a, found_a, done_a;
  bpcs_search #(.N(NA)) dut_a (
    .clk(clk), .preset(preset_a), .fixed_seq(fixed_a), .min_energy(emin_a),
    .best_seq(best_a), .new_best(nb_a), .found(found_a), .done(done_a));

  // ---------------- instance B: N = 16, K = 10 (partial search)
  localparam int NB = 16, KB = 10;
  logic                    preset_b = 1'b1;
  logic [NB-1:0]           fixed_b = 16'b110101_1111100000;
  logic [energy_w(NB)-1:0] emin_b;
  logic [NB-1:0]           best_b;
  logic                    nb_b, found_b, done_b;
  bpcs_search #(.N(NB), .K(KB)) dut_b (
    .clk(clk), .preset(preset_b), .fixed_seq(fixed_b), .min_energy(emin_b),
    .best_seq(best_b), .new_best(nb_b), .found(found_b), .done(done_b));

  // ---------------- instance C: N = 11 exhaustive, run twice
  localparam int NC = 11;
  logic                    preset_c = 1'b1;
  logic [NC-1:0]           fixed_c = '0;
  logic [energy_w(NC)-1:0] emin_c;
  logic [NC-1:0]           best_c;
  logic                    nb_c, found_c, done_c;
  bpcs_search #(.N(NC)) dut_c (
    .clk(clk), .preset(preset_c), .fixed_seq(fixed_c), .min_energy(emin_c),
    .best_seq(best_c), .new_best(nb_c), .found(found_c), .done(done_c));

  always @(posedge clk) begin
    if (nb_a) n_loads++;
    if (nb_b) n_loads++;
    if (nb_c) n_loads++;
  end

  // Runs one search on one instance and checks it. which: 0 = A, 1 = B, 2 = C
  task automatic run_and_check(input int which, input int n, input int k,
                               input longint unsigned fixed);
    int cycles, ref_e, ties;
    longint unsigned ref_s;
    ref_search(n, k, fixed, ref_e, ref_s, ties);
    n_ties += ties;
    @(negedge clk);
    case (which)
      0: preset_a = 1'b1;
      1: preset_b = 1'b1;
      default: preset_c = 1'b1;
    endcase
    @(negedge clk);
    @(negedge clk);
    case (which)
      0: check(!done_a && !found_a, "A status not cleared by preset");
      1: check(!done_b && !found_b, "B status not cleared by preset");
      default: check(!done_c && !found_c, "C status not cleared by preset");
    endcase
    case (which)
      0: preset_a = 1'b0;
      1: preset_b = 1'b0;
      default: preset_c = 1'b0;
    endcase
    n_presets++;
    cycles = 0;
    forever begin
      @(posedge clk);
      cycles++;
      #1;
      if ((which == 0 && done_a) || (which == 1 && done_b) || (which == 2 && done_c)) break;
      if (cycles > (1 << k) + 100) break;
    end
    n_done++;
    check(cycles == (1 << k) + 1,
          $sformatf("run %0d: done after %0d cycles, expected %0d", which, cycles, (1 << k) + 1));
    case (which)
      0: begin
        check(int'(emin_a) == ref_e, $sformatf("A energy %0d expected %0d", emin_a, ref_e));
        check(longint'(best_a) == ref_s, $sformatf("A seq %b expected %b", best_a, NA'(ref_s)));
        check(ref_energy(longint'(best_a), n) == int'(emin_a), "A result energy mismatch");
        check(found_a, "A found low");
        $display("N=%0d: min energy %0d, best %b, merit factor %0.4f",
                 n, emin_a, best_a, real'(n * n) / (2.0 * real'(emin_a)));
      end
      1: begin
        check(int'(emin_b) == ref_e, $sformatf("B energy %0d expected %0d", emin_b, ref_e));
        check(longint'(best_b) == ref_s, $sformatf("B seq %b expected %b", best_b, NB'(ref_s)));
        check(best_b[NB-1:KB] == fixed_b[NB-1:KB], "B fixed elements not kept");
        check(ref_energy(longint'(best_b), n) == int'(emin_b), "B result energy mismatch");
        n_partial++;
        $display("N=%0d K=%0d: min energy %0d, best %b", n, k, emin_b, best_b);
      end
      default: begin
        check(int'(emin_c) == ref_e, $sformatf("C energy %0d expected %0d", emin_c, ref_e));
        check(longint'(best_c) == ref_s, $sformatf("C seq %b expected %b", best_c, NC'(ref_s)));
        $display("N=%0d: min energy %0d, best %b", n, emin_c, best_c);
      end
    endcase
  endtask

  initial begin
    repeat (3) @(posedge clk);
    fork
      run_and_check(0, NA, NA, 0);
      run_and_check(1, NB, KB, longint'(fixed_b));
      begin
        run_and_check(2, NC, NC, 0);
        n_restarts++;
        run_and_check(2, NC, NC, 0);
      end
    join
    // Barker 13 is the optimum: energy 6
    check(int'(emin_a) == 6, "A energy is not the Barker-13 value 6");
    $display("mechanisms: presets=%0d loads=%0d ties=%0d partial=%0d restarts=%0d done=%0d",
             n_presets, n_loads, n_ties, n_partial, n_restarts, n_done);
    check(n_presets > 0, "preset never exercised");
    check(n_loads > 0, "comparator load never happened");
    check(n_ties > 0, "no tie with the minimum happened");
    check(n_partial > 0, "partial search never exercised");
    check(n_restarts > 0, "restart never exercised");
    check(n_done > 0, "done never reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
