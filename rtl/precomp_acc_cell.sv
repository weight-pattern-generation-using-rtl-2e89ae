// One bit of the 3-weight accumulator pattern generator, with precomputed
// sum and carry.
//
// The cell holds two flip-flops with asynchronous, active-high set and reset:
//   B  - the accumulator input bit, loaded from v_i on every clock edge;
//   A  - the accumulator state bit, loaded with the selected sum; its output
//        is the pattern bit and feeds back into the adders.
// Two full adders work on (A, B) in parallel, one with carry-in 0 and one with
// carry-in 1. The real carry-in from the previous bit only drives the two
// output multiplexers that pick the final sum and carry, so the carry path
// through a cell is one multiplexer instead of a full adder.
//
// Configurations (set_i, reset_i):
//   1,0  A forced to 1 and B to 0: pattern bit is always 1 (weight 1);
//   0,1  A forced to 0 and B to 1: pattern bit is always 0 (weight 0);
//   0,0  normal accumulation, A(t+1) = A ^ B ^ cin (weight 0.5).
// In both forced configurations A = ~B, so the carry-for-0 adder gives 0 and
// the carry-for-1 adder gives 1, and cout_o equals cin_i: the carry is passed
// through to the next free bit. set_i and reset_i must not both be high.
//
// Following the source description: the adder pair with fixed carry-ins and
// the output multiplexers, the two set/reset flip-flops, the carry-transfer
// rule A = ~B. This design's own choices: B is clocked from v_i every cycle
// (the description draws no data input for it); set drives A's set and B's
// reset, reset drives A's reset and B's set; set wins over reset in a
// flip-flop if both are ever high.
//
// Interface: clk; set_i, reset_i asynchronous, active high; v_i input bit;
// cin_i carry from bit i-1. a_o pattern/state bit, b_o input register bit,
// cout_o carry to bit i+1 (combinational from a_o, b_o and cin_i).
// Timing: A and B update on the rising clock edge; set/reset act at once.
module precomp_acc_cell (
  input  logic clk,
  input  logic set_i,
  input  logic reset_i,
  input  logic v_i,
  input  logic cin_i,
  output logic a_o,
  output logic b_o,
  output logic cout_o
);
  logic s0, c0;  // sum and carry for carry-in 0
  logic s1, c1;  // sum and carry for carry-in 1
  logic s_sel;

  full_adder u_fa_c0 (.a_i(a_o), .b_i(b_o), .cin_i(1'b0), .s_o(s0), .cout_o(c0));
  full_adder u_fa_c1 (.a_i(a_o), .b_i(b_o), .cin_i(1'b1), .s_o(s1), .cout_o(c1));

  always_comb begin
    s_sel  = cin_i ? s1 : s0;
    cout_o = cin_i ? c1 : c0;
  end

  // B flip-flop: its set is driven by reset_i and its reset by set_i.
  always_ff @(posedge clk or posedge set_i or posedge reset_i) begin
    if (set_i)        b_o <= 1'b0;
    else if (reset_i) b_o <= 1'b1;
    else              b_o <= v_i;
  end

  // A flip-flop: the accumulator state and pattern bit.
  always_ff @(posedge clk or posedge set_i or posedge reset_i) begin
    if (set_i)        a_o <= 1'b1;
    else if (reset_i) a_o <= 1'b0;
    else              a_o <= s_sel;
  end
endmodule
