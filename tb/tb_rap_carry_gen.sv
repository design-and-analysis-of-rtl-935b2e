// tb_rap_carry_gen: self-checking testbench for the reconfigurable carry
// generator.
//
// The expected carry is computed with the ripple recurrence
// c = G[k] | (P[k] & c), not with the sum of products the generator uses:
// from c = Ci over k = 0..POS in exact mode, and from c = 0 over the window
// positions k = POS-W+1..POS in approximate mode. Four instances are checked
// exhaustively over all P, G, carry-in and mode values:
//   u3  POS=3, W=2   the carry-out of the default 4-bit adder
//   u0  POS=0, W=2   window wider than the position (only carry-in is
//                    supplementary)
//   u5  POS=5, W=3   a wider generator
//   ux  POS=3, W=2   forced exact, must ignore the mode
// The C4 column of the RAP-CLA truth table (inputs A3, B3, C3, lower
// generates 0) is replayed on u3 in approximate mode, where C4 = G3.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rap_carry_gen;
  import rap_cla_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0] p3, g3;
  logic [0:0] p0, g0;
  logic [5:0] p5, g5;
  logic       ci;
  rap_mode_e  mode;
  logic       c3, c0, c5, cx;

  rap_carry_gen #(.POS(3), .WINDOW(2)) u3 (.p(p3), .g(g3), .ci(ci), .mode(mode), .carry(c3));
  rap_carry_gen #(.POS(0), .WINDOW(2)) u0 (.p(p0), .g(g0), .ci(ci), .mode(mode), .carry(c0));
  rap_carry_gen #(.POS(5), .WINDOW(3)) u5 (.p(p5), .g(g5), .ci(ci), .mode(mode), .carry(c5));
  rap_carry_gen #(.POS(3), .WINDOW(2), .FORCE_EXACT(1'b1)) ux
                                         (.p(p3), .g(g3), .ci(ci), .mode(mode), .carry(cx));

  function automatic logic ripple(logic [7:0] p, logic [7:0] g, logic cin,
                                  int unsigned pos, int unsigned w, bit exact);
    int unsigned lo;
    logic c;
    lo = (exact || pos + 1 <= w) ? 0 : pos + 1 - w;
    c  = exact ? cin : 1'b0;
    for (int unsigned k = lo; k <= pos; k++) c = g[k] | (p[k] & c);
    return c;
  endfunction

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s mode=%s ci=%b got=%b exp=%b", what, mode.name(), ci, got, exp);
    end
  endtask

  // Truth-table rows {A3, B3, C3, C4}.
  localparam logic [3:0] TT [8] = '{4'b0000, 4'b0010, 4'b0100, 4'b0110,
                                    4'b1000, 4'b1010, 4'b1101, 4'b1111};

  initial begin
    for (int m = 0; m < 2; m++) begin
      mode = rap_mode_e'(m);
      for (int c = 0; c < 2; c++) begin
        ci = 1'(c);
        for (int v = 0; v < 256; v++) begin
          {p3, g3} = 8'(v);
          p0 = p3[0:0];
          g0 = g3[0:0];
          #1;
          check(c3, ripple({4'b0, p3}, {4'b0, g3}, ci, 3, 2, m == 1), "u3");
          check(c0, ripple({7'b0, p0}, {7'b0, g0}, ci, 0, 2, m == 1), "u0");
          check(cx, ripple({4'b0, p3}, {4'b0, g3}, ci, 3, 2, 1'b1), "ux");
        end
        for (int v = 0; v < 4096; v++) begin
          {p5, g5} = 12'(v);
          #1;
          check(c5, ripple({2'b0, p5}, {2'b0, g5}, ci, 5, 3, m == 1), "u5");
        end
      end
    end
    mode = MODE_APPROX;
    foreach (TT[r]) begin
      p3 = {TT[r][3] ^ TT[r][2], 3'b111};
      g3 = {TT[r][3] & TT[r][2], 3'b000};
      ci = TT[r][1];
      #1;
      check(c3, TT[r][0], "truth-table C4");
    end
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

endmodule : tb_rap_carry_gen
