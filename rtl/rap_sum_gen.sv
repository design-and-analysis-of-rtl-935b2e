// rap_sum_gen: sum generator block of the carry look-ahead adder.
//
// Each sum bit is S[x] = P[x] ^ C[x], where P[x] = A[x] ^ B[x] comes from the
// propagate/generate block and C[x] is the carry into position x (C[0] is the
// adder's carry-in, C[x] for x > 0 the output of carry generator x-1). This
// is the usual three-input XOR sum, S = A ^ B ^ C, split after the
// propagate block.
//
// Interface: p and c are WIDTH-bit vectors indexed by bit position; s is the
// WIDTH-bit sum. Purely combinational, no clock.
module rap_sum_gen #(
  parameter int unsigned WIDTH = rap_cla_pkg::DEFAULT_WIDTH
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] s
);

  assign s = p ^ c;

endmodule : rap_sum_gen
