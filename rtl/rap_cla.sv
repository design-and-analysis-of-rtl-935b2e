// rap_cla: reconfigurable approximate carry look-ahead adder (RAP-CLA).
//
// A WIDTH-bit carry look-ahead adder whose carries can be computed either
// exactly or approximately, chosen at run time by one mode input and without
// any separate error-correction stage.
//
// Structure (three stages, as in a conventional CLA):
//   1. rap_pg_gen     P[x] = A[x] ^ B[x], G[x] = A[x] & B[x].
//   2. rap_carry_gen  one per carry C[x+1], x = 0..WIDTH-1, each computed
//                     directly from P, G and the carry-in (no rippling).
//                     Each generator splits its sum of products into an
//                     approximate part (the WINDOW most significant terms)
//                     and a supplementary part (the rest, carry-in
//                     included); a multiplexer on the mode input selects
//                     approximate or exact carry.
//   3. rap_sum_gen    S[x] = P[x] ^ C[x], with C[0] = cin.
// C[WIDTH] is the carry-out.
//
// In approximate mode a carry that must travel further than WINDOW bit
// positions is dropped, and the carry-in reaches only sum bit 0 (the carry-in
// term is in the supplementary part of every carry generator). In exact mode
// the result equals a + b + cin.
//
// Design choices not fixed by the source: the window size (default 2), the
// mode encoding (see rap_cla_pkg), and that the carry-in still feeds sum
// bit 0 in approximate mode. EXACT_MSBS > 0 makes the top EXACT_MSBS carry
// generators permanently exact, an option the source mentions for raising
// the accuracy of approximate mode; the default 0 is the single-mode adder
// it evaluates.
//
// SEGMENTS > 1 splits the carry generators into that many groups of
// consecutive bit positions, each with its own mode bit: carry C[x+1] uses
// mode[x * SEGMENTS / WIDTH]. This is the partitioning the source suggests
// for adjustable precision; how the carries are grouped is this design's
// choice. The default of one segment, one mode signal for the whole adder,
// is the configuration the source evaluates.
//
// Interface: a, b (WIDTH bits), cin, mode (SEGMENTS working modes, bit 0 for
// the least significant segment) in; sum (WIDTH bits), cout out.
// Purely combinational, no clock or reset; the result is valid one
// combinational delay after the inputs settle.
module rap_cla
  import rap_cla_pkg::*;
#(
  parameter int unsigned WIDTH      = rap_cla_pkg::DEFAULT_WIDTH,
  parameter int unsigned WINDOW     = rap_cla_pkg::DEFAULT_WINDOW,
  parameter int unsigned EXACT_MSBS = 0,
  parameter int unsigned SEGMENTS   = 1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  rap_mode_e [SEGMENTS-1:0] mode,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH-1:0] p, g;
  logic [WIDTH:0]   c;   // c[x] = carry into bit x, c[WIDTH] = carry-out

  rap_pg_gen #(.WIDTH(WIDTH)) u_pg (
    .a (a),
    .b (b),
    .p (p),
    .g (g)
  );

  assign c[0] = cin;

  for (genvar x = 0; x < WIDTH; x++) begin : g_carry
    rap_carry_gen #(
      .POS         (x),
      .WINDOW      (WINDOW),
      .FORCE_EXACT (x >= WIDTH - EXACT_MSBS)
    ) u_cg (
      .p     (p[x:0]),
      .g     (g[x:0]),
      .ci    (cin),
      .mode  (mode[x * SEGMENTS / WIDTH]),
      .carry (c[x+1])
    );
  end

  rap_sum_gen #(.WIDTH(WIDTH)) u_sum (
    .p (p),
    .c (c[WIDTH-1:0]),
    .s (sum)
  );

  assign cout = c[WIDTH];

  // The window must hold at least one term, no more carries than exist can
  // be forced exact, and every segment must hold at least one carry.
  initial begin
    assert (SEGMENTS >= 1 && SEGMENTS <= WIDTH)
      else $error("rap_cla: SEGMENTS must be between 1 and WIDTH");
    assert (WINDOW >= 1) else $error("rap_cla: WINDOW must be at least 1");
    assert (EXACT_MSBS <= WIDTH) else $error("rap_cla: EXACT_MSBS exceeds WIDTH");
  end

endmodule : rap_cla
