// tb_rap_cla_variants: self-checking testbench for non-default RAP-CLA
// configurations, against the arithmetic reference model.
//   u_msb   4 bits, window 2, carry-out forced exact (EXACT_MSBS = 1), the
//           option of keeping the most significant carries exact;
//           exhaustive.
//   u_w1    4 bits, window 1 (each approximate carry is just the generate
//           bit of its position); exhaustive.
//   u_wide  32 bits, window 8; random operands, plus operands that make a
//           carry run the full width.
//   u_seg   8 bits, window 2, two segments with their own mode bits
//           (carries C1-C4 and C5-C8); random operands under all four mode
//           combinations.
// Each vector is checked in both modes (all mode combinations for u_seg).
// Fails if the forced-exact carry-out never differed from what the plain
// approximate adder would give, or if a mixed-mode result of u_seg never
// differed from both the all-exact and the all-approximate result.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rap_cla_variants;
  import rap_cla_pkg::*;
  import rap_ref_pkg::*;

  logic [3:0]  a4, b4, s_msb, s_w1;
  logic [31:0] a32, b32, s_wide;
  logic        cin, co_msb, co_w1, co_wide;
  rap_mode_e   mode;
  logic [7:0]  a8, b8, s_seg;
  logic        co_seg;
  rap_mode_e [1:0] mode_seg;
  int n_mixed_distinct = 0;

  int checks = 0, failures = 0, n_msb_saved = 0;
  logic [63:0] plain;  // plain approximate result, for the forced-exact comparison

  rap_cla #(.WIDTH(4), .WINDOW(2), .EXACT_MSBS(1)) u_msb
    (.a(a4), .b(b4), .cin(cin), .mode(mode), .sum(s_msb), .cout(co_msb));
  rap_cla #(.WIDTH(4), .WINDOW(1)) u_w1
    (.a(a4), .b(b4), .cin(cin), .mode(mode), .sum(s_w1), .cout(co_w1));
  rap_cla #(.WIDTH(32), .WINDOW(8)) u_wide
    (.a(a32), .b(b32), .cin(cin), .mode(mode), .sum(s_wide), .cout(co_wide));

  rap_cla #(.WIDTH(8), .WINDOW(2), .SEGMENTS(2)) u_seg
    (.a(a8), .b(b8), .cin(cin), .mode(mode_seg), .sum(s_seg), .cout(co_seg));

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s mode=%s cin=%b got=%h exp=%h", what, mode.name(), cin, got, exp);
    end
  endtask

  task automatic check_wide();
    for (int m = 0; m < 2; m++) begin
      mode = rap_mode_e'(m);
      #1;
      check(64'({co_wide, s_wide}), ref_add(64'(a32), 64'(b32), cin, {64{m == 1}}, 32, 8), "u_wide");
    end
  endtask

  initial begin
    for (int m = 0; m < 2; m++) begin
      mode = rap_mode_e'(m);
      for (int v = 0; v < 512; v++) begin
        {cin, a4, b4} = 9'(v);
        #1;
        check(64'({co_msb, s_msb}), ref_add(64'(a4), 64'(b4), cin, exact_mask_of(64'(m), 4, 1, 1), 4, 2), "u_msb");
        check(64'({co_w1, s_w1}),   ref_add(64'(a4), 64'(b4), cin, {64{m == 1}}, 4, 1), "u_w1");
        plain = ref_add(64'(a4), 64'(b4), cin, '0, 4, 2);
        if (m == 0 && co_msb != plain[4]) n_msb_saved++;
      end
    end
    for (int n = 0; n < 2000; n++) begin
      a32 = $urandom;
      b32 = $urandom;
      cin = 1'($urandom);
      check_wide();
    end
    // Carry generated at bit 0 (or carry-in) propagating through all bits.
    a32 = 32'hFFFF_FFFF; b32 = 32'h0000_0001; cin = 1'b0; check_wide();
    a32 = 32'hFFFF_FFFF; b32 = 32'h0000_0000; cin = 1'b1; check_wide();
    a32 = 32'h7FFF_FFFF; b32 = 32'h0000_0001; cin = 1'b0; check_wide();
    mode = MODE_APPROX;
    for (int n = 0; n < 1000; n++) begin
      a8  = 8'($urandom);
      b8  = 8'($urandom);
      cin = 1'($urandom);
      for (int ms = 0; ms < 4; ms++) begin
        logic [63:0] exp, all_exact, all_approx;
        mode_seg   = {rap_mode_e'(ms >> 1), rap_mode_e'(ms & 1)};
        #1;
        exp        = ref_add(64'(a8), 64'(b8), cin, exact_mask_of(64'(ms), 8, 2, 0), 8, 2);
        all_exact  = ref_add(64'(a8), 64'(b8), cin, '1, 8, 2);
        all_approx = ref_add(64'(a8), 64'(b8), cin, '0, 8, 2);
        check(64'({co_seg, s_seg}), exp, "u_seg");
        if ((ms == 1 || ms == 2) && exp[8:0] != all_exact[8:0] && exp[8:0] != all_approx[8:0])
          n_mixed_distinct++;
      end
    end
    if (n_mixed_distinct == 0) begin
      failures++;
      $display("FAIL mixed segment modes never gave a distinct result");
    end
    $display("mixed segment modes gave a distinct result %0d times", n_mixed_distinct);
    if (n_msb_saved == 0) begin
      failures++;
      $display("FAIL forced-exact carry-out never corrected an approximate carry");
    end
    $display("forced-exact carry-out corrected %0d approximate results", n_msb_saved);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_rap_cla_variants
