// bpcs_search: search engine for the binary pulse compression sequence of
// length N with the lowest autocorrelation sidelobe energy, i.e. the highest
// merit factor F = N^2 / (2 E).
//
// Structure, top to bottom:
//   seq_gen       counter that presents one candidate sequence per clock
//   sign_conv     counter bits -> +1 / -1 elements
//   mux_unit      stages k = 1 .. N-1: the sequence shifted by lag k
//   mac_unit      stages k = 1 .. N-1: A(k) = sum_i s[i] s[i+k]
//   square_unit   stages k = 1 .. N-1: A(k)^2
//   energy_adder  E = sum_k A(k)^2
//   best_tracker  temp registers + comparator: keeps min E and its sequence
// Every lag is computed in parallel, so the engine evaluates one sequence
// per clock. The correlator is combinational between the counter register
// and the first temp registers of best_tracker.
//
// Interface: pulse `preset` high for at least one clock to start a search;
// the run begins on the first clock with `preset` low. `fixed_seq[N-1:K]`
// supplies the fixed upper elements when K < N (ignored when K = N). At the
// end `done` is high and `min_energy` / `best_seq` hold the result (bit i of
// `best_seq` is element i, 1 = +1, 0 = -1). `new_best` pulses whenever the
// comparator loads a new minimum.
// Timing: the sequence with counter value c enters the first temp registers
// 1 + c clocks after preset falls, and `done` rises 2^K + 1 clocks after it
// (the clock edge that ends the first run cycle counting as 1).
//
// Following the original architecture: the block chain, the preset-driven counter, the
// parallel lag stages, the comparator-controlled register pairs and the
// option of fixing N-K elements. This design's own choices: bit-to-element
// mapping 1 -> +1, 0 -> -1, one sequence per clock with no extra pipeline
// stage, strict minimum, and the done/found/new_best status outputs.
module bpcs_search
  import bpc_pkg::*;
#(
  parameter int unsigned N = 23,
  parameter int unsigned K = N
) (
  input  logic                     clk,
  input  logic                     preset,
  input  logic [N-1:0]             fixed_seq,
  output logic [energy_w(N)-1:0]   min_energy,
  output logic [N-1:0]             best_seq,
  output logic                     new_best,
  output logic                     found,
  output logic                     done
);

  localparam int unsigned AW = acf_w(N);
  localparam int unsigned SW = sq_w(N);
  localparam int unsigned EW = energy_w(N);

  logic [N-1:0]          seq;
  logic                  seq_valid;
  logic                  seq_last;
  elem_t                 elems   [N];
  elem_t                 shifted [N][N];
  logic signed [AW-1:0]  acf     [N];
  logic [SW-1:0]         sq      [N];
  logic [EW-1:0]         energy;

  seq_gen #(.N(N), .K(K)) u_gen (
    .clk       (clk),
    .preset    (preset),
    .fixed_seq (fixed_seq),
    .seq       (seq),
    .seq_valid (seq_valid),
    .last      (seq_last)
  );

  sign_conv #(.N(N)) u_sign (
    .bits  (seq),
    .elems (elems)
  );

  // lag 0 is the mainlobe A(0) = N and takes no part in the energy
  assign acf[0] = AW'(N);
  assign sq[0]  = '0;
  for (genvar i = 0; i < N; i++) begin : g_lag0
    assign shifted[0][i] = elems[i];
  end

  for (genvar k = 1; k < N; k++) begin : g_lag
    mux_unit #(.N(N)) u_mux (
      .elems   (elems),
      .sel     (lag_w(N)'(k)),
      .shifted (shifted[k])
    );

    mac_unit #(.N(N)) u_mac (
      .a   (elems),
      .b   (shifted[k]),
      .acf (acf[k])
    );

    square_unit #(.W(AW)) u_sq (
      .acf (acf[k]),
      .sq  (sq[k])
    );
  end

  energy_adder #(.N(N)) u_add (
    .sq     (sq),
    .energy (energy)
  );

  best_tracker #(.N(N), .EW(EW)) u_best (
    .clk        (clk),
    .preset     (preset),
    .in_valid   (seq_valid),
    .in_last    (seq_last),
    .in_energy  (energy),
    .in_seq     (seq),
    .min_energy (min_energy),
    .best_seq   (best_seq),
    .load       (new_best),
    .found      (found),
    .done       (done)
  );

endmodule
