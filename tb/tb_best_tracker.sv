// tb_best_tracker: feeds the comparator and registers a stream of random
// energies (from a small range, so that ties occur) with random gaps in
// `in_valid`, and checks every cycle against a model: the minimum and its
// sequence appear two clocks after the input, ties keep the earlier
// sequence, `load` fires exactly when the model's minimum improves, and
// `done` rises two clocks after the input marked last. Counts how many loads
// and ties were seen and fails if either never happened.
module tb_best_tracker;

  localparam int N = 9, EW = 6;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          preset, in_valid, in_last;
  logic [EW-1:0] in_energy;
  logic [N-1:0]  in_seq;
  logic [EW-1:0] min_energy;
  logic [N-1:0]  best_seq;
  logic          load, found, done;

  best_tracker #(.N(N), .EW(EW)) dut (
    .clk(clk), .preset(preset), .in_valid(in_valid), .in_last(in_last),
    .in_energy(in_energy), .in_seq(in_seq), .min_energy(min_energy),
    .best_seq(best_seq), .load(load), .found(found), .done(done));

  int checks = 0, failures = 0;
  int loads = 0, ties = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // model state: history of the inputs, indexed by cycle
  int  m_min, m_seq;
  bit  m_found;
  bit  h_valid [$];
  int  h_energy [$], h_seq [$];

  initial begin
    preset = 1'b1;
    in_valid = 1'b0; in_last = 1'b0; in_energy = '0; in_seq = '0;
    repeat (3) @(posedge clk);
    #1 preset = 1'b0;
    m_found = 0;
    for (int c = 0; c < 400; c++) begin
      in_valid  = ($urandom_range(3) != 0) && c < 300;
      in_last   = (c == 299);
      in_energy = EW'(20 + $urandom_range(40 - c / 10 > 0 ? 40 - c / 10 : 1));
      in_seq    = N'($urandom);
      h_valid.push_back(in_valid || in_last);
      h_energy.push_back(int'(in_energy));
      h_seq.push_back(int'(in_seq));
      if (in_last) h_valid[c] = 1'b1;
      in_valid = h_valid[c];
      // the input of cycle c-1 is in the first registers now: model the load
      if (c >= 1) begin
        bit exp_load;
        exp_load = h_valid[c-1] && (!m_found || h_energy[c-1] < m_min);
        #1;
        check(load == exp_load, $sformatf("load=%0b expected %0b at cycle %0d", load, exp_load, c));
        if (h_valid[c-1] && m_found && h_energy[c-1] == m_min) ties++;
        if (exp_load) begin
          loads++;
          m_found = 1;
          m_min = h_energy[c-1];
          m_seq = h_seq[c-1];
        end
      end
      @(posedge clk);
      #1;
      if (m_found) begin
        check(found, $sformatf("found low at cycle %0d", c));
        check(int'(min_energy) == m_min, $sformatf("min %0d expected %0d at cycle %0d", min_energy, m_min, c));
        check(int'(best_seq) == m_seq, $sformatf("seq %0h expected %0h at cycle %0d", best_seq, m_seq, c));
      end
      check(done == (c >= 300), $sformatf("done=%0b at cycle %0d", done, c));
    end
    check(loads > 1, "no load seen");
    check(ties > 0, "no tie seen");
    $display("loads=%0d ties=%0d", loads, ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
