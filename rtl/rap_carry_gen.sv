// rap_carry_gen: reconfigurable carry generator for one carry of the RAP-CLA.
//
// The exact look-ahead carry out of bit position POS is the OR of POS+2
// product terms:
//
//   C[POS+1] = sum over y = 0..POS of  G[y] & P[y+1] & ... & P[POS]
//              + Ci & P[0] & ... & P[POS]
//
// The terms are split in two. The approximate part holds the WINDOW most
// significant generate terms (y = POS-WINDOW+1 .. POS; all of them when
// POS < WINDOW). The supplementary part holds the remaining, less significant
// generate terms and the carry-in term. In exact mode the carry is the OR of
// both parts, which is the full look-ahead carry; in approximate mode only
// the approximate part is used, so a carry that would have to travel more
// than WINDOW positions (or come from the carry-in) is lost. One 2:1
// multiplexer, steered by the mode signal, picks between the approximate
// carry and the exact carry; that is the only addition to a conventional
// carry generator.
//
// Each sum of products is written in NAND-NAND form (a NAND per product
// term, then a NAND over the term outputs), the gate style the source uses
// in place of AND-OR. It is logically identical to AND-OR.
//
// In silicon the supplementary part sits behind pMOS header switches that
// are turned off in approximate mode to remove its power; those switches
// have no logic function and are not modelled. The multiplexer already
// ignores the supplementary output in that mode.
//
// FORCE_EXACT = 1 builds a plain exact carry generator (no multiplexer), for
// the optional arrangement in which the most significant carries stay exact
// to bound the error of approximate mode.
//
// Interface: p, g are the propagate/generate bits of positions 0..POS, ci
// the adder's carry-in, mode the working mode; carry is C[POS+1].
// Purely combinational, no clock.
module rap_carry_gen
  import rap_cla_pkg::*;
#(
  parameter int unsigned POS         = rap_cla_pkg::DEFAULT_WIDTH - 1,
  parameter int unsigned WINDOW      = rap_cla_pkg::DEFAULT_WINDOW,
  parameter bit          FORCE_EXACT = 1'b0
) (
  input  logic [POS:0] p,
  input  logic [POS:0] g,
  input  logic         ci,
  input  rap_mode_e    mode,
  output logic         carry
);

  // Lowest generate index that belongs to the approximate part.
  localparam int unsigned APPROX_LO = (POS + 1 > WINDOW) ? POS + 1 - WINDOW : 0;

  // Active-low product terms: term_n[y] = ~(G[y] & P[y+1] & ... & P[POS]),
  // and the carry-in term ci_term_n = ~(Ci & P[0] & ... & P[POS]).
  logic [POS:0] term_n;
  logic         ci_term_n;

  always_comb begin
    for (int unsigned y = 0; y <= POS; y++) begin
      logic prod;
      prod = g[y];
      for (int unsigned k = y + 1; k <= POS; k++) prod = prod & p[k];
      term_n[y] = ~prod;
    end
    ci_term_n = ~(ci & (&p));
  end

  // Second NAND level: a NAND of active-low terms is the OR of the terms.
  logic approx_c;  // approximate part
  logic supp_c;    // supplementary part
  logic exact_c;

  assign approx_c = ~(&term_n[POS:APPROX_LO]);

  generate
    if (APPROX_LO > 0) begin : g_supp_with_g
      assign supp_c = ~((&term_n[APPROX_LO-1:0]) & ci_term_n);
    end else begin : g_supp_ci_only
      assign supp_c = ~ci_term_n;
    end
  endgenerate

  assign exact_c = approx_c | supp_c;

  generate
    if (FORCE_EXACT) begin : g_exact
      assign carry = exact_c;
    end else begin : g_mux
      assign carry = (mode == MODE_EXACT) ? exact_c : approx_c;
    end
  endgenerate

endmodule : rap_carry_gen
