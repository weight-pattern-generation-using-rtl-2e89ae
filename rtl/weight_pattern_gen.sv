// Accumulator-based 3-weight test pattern generator.
//
// K precomputed-carry accumulator cells form a K-bit accumulator: the A
// registers hold the state s(t) and each clock adds the input v, so
// s(t+1) = s(t) + v + cin over the bits left free. The A register outputs are
// the test pattern applied to the circuit under test. Each bit is configured
// by its own set/reset pair:
//   set_i[i]=1            pattern bit i is 1 on every pattern (weight 1);
//   reset_i[i]=1          pattern bit i is 0 on every pattern (weight 0);
//   set_i[i]=reset_i[i]=0 pattern bit i is an accumulator bit (weight 0.5).
// A forced bit keeps its A and B complementary, so it passes the carry from
// the bit below straight to the bit above; the free bits therefore form one
// accumulator whose carries skip the forced positions. With no bit forced,
// the block is the plain accumulator pattern generator.
//
// Inside each cell the sum and carry are computed for both carry-in values
// ahead of time and selected by the arriving carry, so the carry chain is a
// chain of K multiplexers.
//
// Following the source description: the cell structure and the three
// configurations. This design's own choices: the width K (no value is given),
// B clocked from v_i every cycle, and a carry-in port for bit 0.
//
// Interface: clk; set_i, reset_i (K bits, asynchronous, active high, never
// both high on one bit); v_i accumulator input; cin_i carry into bit 0;
// pattern_o the A registers; cout_o carry out of bit K-1 (combinational).
// Timing: one new pattern per clock. v_i reaches the B registers on one edge
// and is added into A on the next.
module weight_pattern_gen #(
  parameter int unsigned K = 8
) (
  input  logic         clk,
  input  logic [K-1:0] set_i,
  input  logic [K-1:0] reset_i,
  input  logic [K-1:0] v_i,
  input  logic         cin_i,
  output logic [K-1:0] pattern_o,
  output logic         cout_o
);
  logic [K:0]   carry;
  logic [K-1:0] b_unused;

  assign carry[0] = cin_i;

  for (genvar i = 0; i < K; i++) begin : g_cell
    precomp_acc_cell u_cell (
      .clk    (clk),
      .set_i  (set_i[i]),
      .reset_i(reset_i[i]),
      .v_i    (v_i[i]),
      .cin_i  (carry[i]),
      .a_o    (pattern_o[i]),
      .b_o    (b_unused[i]),
      .cout_o (carry[i+1])
    );
  end

  assign cout_o = carry[K];

  // A bit may be forced to 1 or to 0, never both.
  always_comb begin
    a_set_reset_exclusive: assert final ((set_i & reset_i) == '0);
  end
endmodule
