// seq_gen: sequence generator of the search engine, a synchronous up-counter
// with a preset input.
//
// Each clock after preset has been released the generator presents one
// candidate binary sequence of length N on `seq` (bit i = element i, 1 meaning
// +1 and 0 meaning -1) with `seq_valid` high. The low K bits are the counter,
// which steps through all 2^K values starting from zero; the high N-K bits are
// copied from `fixed_seq` (its low K bits are ignored). With K = N, the
// default, this is the exhaustive search over all 2^N sequences. With K < N
// the upper N-K elements are held at an already known good sequence of length
// N-K and only the last K elements are searched, which cuts the search time
// by 2^(N-K).
//
// Timing: while `preset` is high the counter is cleared to zero and nothing is
// valid. The first sequence appears in the first cycle with `preset` low, and
// one sequence follows per clock. `last` marks the 2^K-th sequence; after it
// the counter stops and `seq_valid` stays low until the next preset.
//
// The original architecture gives the counter, the preset input and the idea of fixing N-K
// bits; the placement of the fixed bits in the high positions, the stop after
// one pass and the valid/last outputs are this design's choices.
module seq_gen #(
  parameter int unsigned N = 23,
  parameter int unsigned K = N
) (
  input  logic         clk,
  input  logic         preset,
  input  logic [N-1:0] fixed_seq,
  output logic [N-1:0] seq,
  output logic         seq_valid,
  output logic         last
);

  logic [K-1:0] count;
  logic         running;

  always_ff @(posedge clk) begin
    if (preset) begin
      count   <= '0;
      running <= 1'b1;
    end else if (running) begin
      count <= count + 1'b1;
      if (&count) running <= 1'b0;
    end
  end

  always_comb begin
    seq = fixed_seq;
    seq[K-1:0] = count;
  end

  assign seq_valid = running && !preset;
  assign last      = seq_valid && (&count);

  initial begin
    assert (K >= 1 && K <= N) else $fatal(1, "seq_gen: K must be in 1..N");
  end

endmodule
