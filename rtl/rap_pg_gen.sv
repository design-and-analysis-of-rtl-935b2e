// rap_pg_gen: propagate/generate block of the carry look-ahead adder.
//
// For every bit position x it forms the generate signal G[x] = A[x] & B[x]
// (the position creates a carry on its own) and the propagate signal
// P[x] = A[x] ^ B[x] (the position passes an incoming carry on). Both
// definitions are the standard carry look-ahead ones; the XOR form of P is
// the one the sum generator also needs, so no separate half-sum is formed.
//
// Interface: a, b are the WIDTH-bit operands; p, g are WIDTH-bit vectors,
// bit x belonging to position x. Purely combinational, no clock.
module rap_pg_gen #(
  parameter int unsigned WIDTH = rap_cla_pkg::DEFAULT_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] p,
  output logic [WIDTH-1:0] g
);

  assign g = a & b;
  assign p = a ^ b;

endmodule : rap_pg_gen
