// tb_rap_cla_table1: replays the bit-3 truth table of the 4-bit RAP-CLA on
// the full adder at its default parameters.
//
// The table lists inputs A3, B3 and the carry into bit 3 (C3), and outputs
// P3, G3, S3 and C4. Here C3 is produced inside the adder: lower operand
// bits 000/000 give C3 = 0, and A[2:0] = 110, B[2:0] = 010 give C3 = 1 in
// both modes (generated at bit 1, propagated by bit 2) while leaving G2 = 0.
// In approximate mode (window 2) C4 = G3 + P3 & G2 = G3, which is the
// table's C4 column; in exact mode C4 = G3 + P3 & C3. P3 and G3 are read
// from the propagate/generate block inside the adder. S3 is checked against
// the sum equation S3 = A3 ^ B3 ^ C3.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rap_cla_table1;
  import rap_cla_pkg::*;

  logic [3:0] a, b, sum;
  logic       cin, cout;
  rap_mode_e  mode;

  int checks = 0, failures = 0;

  rap_cla dut (.a(a), .b(b), .cin(cin), .mode(mode), .sum(sum), .cout(cout));

  // Rows {A3, B3, C3, P3, G3, C4} of the truth table.
  localparam logic [5:0] TT [8] = '{6'b000_000, 6'b001_000, 6'b010_100, 6'b011_100,
                                    6'b100_100, 6'b101_100, 6'b110_011, 6'b111_011};

  task automatic check(logic got, logic exp, string what, int row);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL row %0d %s mode=%s got=%b exp=%b", row, what, mode.name(), got, exp);
    end
  endtask

  initial begin
    cin = 1'b0;
    foreach (TT[r]) begin
      logic a3, b3, c3, p3, g3, c4;
      {a3, b3, c3, p3, g3, c4} = TT[r];
      a = {a3, c3 ? 3'b110 : 3'b000};
      b = {b3, c3 ? 3'b010 : 3'b000};
      for (int m = 0; m < 2; m++) begin
        mode = rap_mode_e'(m);
        #1;
        check(dut.p[3], p3, "P3", r);
        check(dut.g[3], g3, "G3", r);
        check(dut.c[3], c3, "C3", r);
        check(sum[3], a3 ^ b3 ^ c3, "S3", r);
        if (mode == MODE_APPROX) check(cout, c4, "C4 (table)", r);
        else                     check(cout, g3 | (p3 & c3), "C4 (exact)", r);
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

endmodule : tb_rap_cla_table1
