// tb_rap_sum_gen: self-checking testbench for the sum generator.
//
// Applies every combination of 4-bit propagate and carry vectors and checks
// each sum bit against the parity of P[x] + C[x] computed as an integer sum.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rap_sum_gen;

  localparam int unsigned W = 4;

  logic [W-1:0] p, c, s;
  int checks = 0, failures = 0;

  rap_sum_gen #(.WIDTH(W)) dut (.p(p), .c(c), .s(s));

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        p = W'(i);
        c = W'(j);
        #1;
        for (int x = 0; x < W; x++) begin
          checks++;
          if (s[x] != 1'((int'(p[x]) + int'(c[x])) % 2)) begin
            failures++;
            $display("FAIL p=%b c=%b s=%b bit %0d", p, c, s, x);
          end
        end
      end
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

endmodule : tb_rap_sum_gen
