// best_tracker: the comparator and the four temp registers at the bottom of
// the search engine.
//
// The first pair of registers captures the energy of the sequence now leaving
// the adder unit, and that sequence itself. The comparator compares the
// captured energy with the minimum held in the second energy register; when
// it is strictly smaller, or when no sequence has been captured yet since
// preset, its load signal copies the energy and the sequence into the second
// pair of registers, which therefore always hold the minimum sidelobe energy
// seen so far and the first sequence that reached it.
//
// Interface: `in_valid`, `in_energy`, `in_seq` and `in_last` come from the
// adder unit and the sequence pipeline. `min_energy` / `best_seq` are the
// outputs of the second registers, `load` is the comparator's load pulse,
// `found` says the second registers hold a result and `done` rises one cycle
// after the load decision on the last sequence and stays high until preset.
// Timing: a sequence presented in cycle t is in the first registers at t+1
// and, if it is the new minimum, in the second registers at t+2.
//
// The register pairs, the comparator and its load signal follow the original architecture
// (its Fig. 1). The strict comparison (the first of several equal-energy
// sequences is kept), the empty flag and `done` are this design's choices.
module best_tracker #(
  parameter int unsigned N  = 23,
  parameter int unsigned EW = 12
) (
  input  logic          clk,
  input  logic          preset,
  input  logic          in_valid,
  input  logic          in_last,
  input  logic [EW-1:0] in_energy,
  input  logic [N-1:0]  in_seq,
  output logic [EW-1:0] min_energy,
  output logic [N-1:0]  best_seq,
  output logic          load,
  output logic          found,
  output logic          done
);

  // first temp registers
  logic          t_valid;
  logic          t_last;
  logic [EW-1:0] t_energy;
  logic [N-1:0]  t_seq;

  always_ff @(posedge clk) begin
    if (preset) begin
      t_valid <= 1'b0;
      t_last  <= 1'b0;
    end else begin
      t_valid <= in_valid;
      t_last  <= in_valid && in_last;
    end
    t_energy <= in_energy;
    t_seq    <= in_seq;
  end

  // comparator
  assign load = t_valid && (!found || t_energy < min_energy);

  // second temp registers
  always_ff @(posedge clk) begin
    if (preset) begin
      found      <= 1'b0;
      done       <= 1'b0;
      min_energy <= '0;
      best_seq   <= '0;
    end else begin
      if (load) begin
        found      <= 1'b1;
        min_energy <= t_energy;
        best_seq   <= t_seq;
      end
      if (t_last) done <= 1'b1;
    end
  end

endmodule
