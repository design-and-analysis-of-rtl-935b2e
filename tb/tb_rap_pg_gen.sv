// tb_rap_pg_gen: self-checking testbench for the propagate/generate block.
//
// Applies every pair of 4-bit operands and checks, bit by bit, that G is set
// exactly when both operand bits are 1 and P exactly when one of them is
// (the arithmetic sum of the two bits, not a copy of the RTL expressions).
// It also replays the A3/B3 -> P3/G3 columns of the RAP-CLA truth table.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rap_pg_gen;

  localparam int unsigned W = 4;

  logic [W-1:0] a, b, p, g;
  int checks = 0, failures = 0;

  rap_pg_gen #(.WIDTH(W)) dut (.a(a), .b(b), .p(p), .g(g));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s a=%b b=%b p=%b g=%b", what, a, b, p, g);
    end
  endtask

  // Truth-table rows for bit 3: {A3, B3, P3, G3}.
  localparam logic [3:0] TT [4] = '{4'b0000, 4'b0110, 4'b1010, 4'b1101};

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        a = W'(i);
        b = W'(j);
        #1;
        for (int x = 0; x < W; x++) begin
          int unsigned bitsum;
          bitsum = int'(a[x]) + int'(b[x]);
          check(g[x] == (bitsum == 2), "generate");
          check(p[x] == (bitsum == 1), "propagate");
        end
      end
    end
    foreach (TT[r]) begin
      a = {TT[r][3], 3'b000};
      b = {TT[r][2], 3'b000};
      #1;
      check(p[3] == TT[r][1], "truth-table P3");
      check(g[3] == TT[r][0], "truth-table G3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_rap_pg_gen
