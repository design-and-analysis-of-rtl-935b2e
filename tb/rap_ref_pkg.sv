// rap_ref_pkg: reference model used by the RAP-CLA testbenches.
//
// It computes the expected adder result arithmetically, not from
// propagate/generate product terms: in exact mode the carry into bit x+1 is
// bit x+1 of a[x:0] + b[x:0] + cin; in approximate mode it is the carry-out
// of the window sub-addition a[x:lo] + b[x:lo] with no carry-in, where
// lo = max(0, x - window + 1). Sum bit x is a[x] ^ b[x] ^ carry-into-x with
// carry-into-0 = cin. Bit x of exact_mask selects the exact rule for carry
// C[x+1]; callers derive it from the mode(s), segments and forced-exact
// carries. Widths up to 62 bits.
package rap_ref_pkg;

  function automatic logic [63:0] mask(int unsigned n);
    return (n >= 64) ? '1 : ((64'd1 << n) - 64'd1);
  endfunction

  // Carry into bit x+1 (x = 0..width-1).
  function automatic logic ref_carry(logic [63:0] a, logic [63:0] b, logic cin,
                                     bit exact, int unsigned x, int unsigned window);
    logic [63:0] s;
    int unsigned lo;
    if (exact) begin
      s = (a & mask(x + 1)) + (b & mask(x + 1)) + 64'(cin);
      return s[x+1];
    end
    lo = (x + 1 > window) ? x + 1 - window : 0;
    s = ((a >> lo) & mask(x + 1 - lo)) + ((b >> lo) & mask(x + 1 - lo));
    return s[x+1-lo];
  endfunction

  // Returns {cout, sum} in the low width+1 bits.
  function automatic logic [63:0] ref_add(logic [63:0] a, logic [63:0] b, logic cin,
                                          logic [63:0] exact_mask, int unsigned width,
                                          int unsigned window);
    logic [63:0] r;
    logic        cx;
    r  = '0;
    cx = cin;
    for (int unsigned x = 0; x < width; x++) begin
      r[x] = a[x] ^ b[x] ^ cx;
      cx   = ref_carry(a, b, cin, exact_mask[x], x, window);
    end
    r[width] = cx;
    return r;
  endfunction

  // Exact-carry mask for one mode bit per segment and exact_msbs forced-exact
  // most significant carries; carry C[x+1] belongs to segment
  // x * segments / width.
  function automatic logic [63:0] exact_mask_of(logic [63:0] seg_exact, int unsigned width,
                                                int unsigned segments, int unsigned exact_msbs);
    logic [63:0] m;
    m = '0;
    for (int unsigned x = 0; x < width; x++)
      m[x] = seg_exact[x * segments / width] || (x >= width - exact_msbs);
    return m;
  endfunction

endpackage : rap_ref_pkg
