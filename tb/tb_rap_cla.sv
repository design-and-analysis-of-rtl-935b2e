// tb_rap_cla: end-to-end self-checking testbench for the RAP-CLA at its
// default parameters (4 bits, window 2, no forced-exact carries).
//
// For every operand pair and carry-in it applies the operands in
// approximate mode, switches to exact mode with the operands held, and
// switches back, checking sum and carry-out after each step against the
// arithmetic reference model. The exact result must equal a + b + cin.
// It counts how often each behaviour of the adder occurred and fails if one
// never did: exact and approximate additions, mode switches in both
// directions, approximate results that differ from the exact ones, a carry
// lost because the carry-in is supplementary-only, a carry lost because it
// travels further than the window, and a carry-out in each mode. It also
// reports the error statistics of approximate mode.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rap_cla;
  import rap_cla_pkg::*;
  import rap_ref_pkg::*;

  localparam int unsigned W      = DEFAULT_WIDTH;
  localparam int unsigned WIN    = DEFAULT_WINDOW;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  rap_mode_e    mode;

  int checks = 0, failures = 0;
  int n_exact = 0, n_approx = 0, n_to_exact = 0, n_to_approx = 0;
  int n_err = 0, n_cin_lost = 0, n_window_lost = 0;
  int n_cout_exact = 0, n_cout_approx = 0;
  longint err_sum = 0;
  int err_max = 0;

  rap_cla dut (.a(a), .b(b), .cin(cin), .mode(mode), .sum(sum), .cout(cout));

  task automatic apply_and_check(rap_mode_e m);
    logic [63:0] exp;
    logic [W:0]  got;
    if (m != mode) begin
      if (m == MODE_EXACT) n_to_exact++;
      else                 n_to_approx++;
    end
    mode = m;
    #1;
    got = {cout, sum};
    exp = ref_add(64'(a), 64'(b), cin, {64{m == MODE_EXACT}}, W, WIN);
    checks++;
    if (got !== exp[W:0]) begin
      failures++;
      $display("FAIL mode=%s a=%0d b=%0d cin=%b got=%0d exp=%0d",
               m.name(), a, b, cin, got, exp[W:0]);
    end
    if (m == MODE_EXACT) begin
      n_exact++;
      checks++;
      if (got !== (W+1)'(a + b + cin)) begin
        failures++;
        $display("FAIL exact sum a=%0d b=%0d cin=%b got=%0d", a, b, cin, got);
      end
      if (cout) n_cout_exact++;
    end else begin
      int diff, adiff;
      n_approx++;
      if (cout) n_cout_approx++;
      diff = int'(a) + int'(b) + int'(cin) - int'(got);
      if (diff != 0) begin
        n_err++;
        adiff = (diff < 0) ? -diff : diff;
        err_sum += longint'(adiff);
        if (adiff > err_max) err_max = adiff;
        // Classify the lost carries.
        for (int x = 0; x < W; x++) begin
          if (ref_carry(64'(a), 64'(b), cin, 1'b1, x, WIN) &&
              !ref_carry(64'(a), 64'(b), cin, 1'b0, x, WIN)) begin
            if (ref_carry(64'(a), 64'(b), 1'b0, 1'b1, x, WIN)) n_window_lost++;
            else                                                n_cin_lost++;
          end
        end
      end
    end
  endtask

  initial begin
    mode = MODE_APPROX;
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        for (int c = 0; c < 2; c++) begin
          a   = W'(i);
          b   = W'(j);
          cin = 1'(c);
          apply_and_check(MODE_APPROX);
          apply_and_check(MODE_EXACT);
          apply_and_check(MODE_APPROX);
        end
      end
    end
    $display("exact=%0d approx=%0d to_exact=%0d to_approx=%0d", n_exact, n_approx,
             n_to_exact, n_to_approx);
    $display("approx errors=%0d of %0d, mean |error| over erroneous=%0.2f, max |error|=%0d",
             n_err, n_approx, (n_err > 0) ? real'(err_sum) / n_err : 0.0, err_max);
    $display("carries lost: from carry-in=%0d beyond window=%0d", n_cin_lost, n_window_lost);
    $display("cout set: exact=%0d approx=%0d", n_cout_exact, n_cout_approx);
    if (n_exact == 0)       begin failures++; $display("FAIL no exact-mode addition"); end
    if (n_approx == 0)      begin failures++; $display("FAIL no approximate-mode addition"); end
    if (n_to_exact == 0)    begin failures++; $display("FAIL no switch to exact mode"); end
    if (n_to_approx == 0)   begin failures++; $display("FAIL no switch to approximate mode"); end
    if (n_err == 0)         begin failures++; $display("FAIL no approximation error seen"); end
    if (n_cin_lost == 0)    begin failures++; $display("FAIL carry-in never dropped"); end
    if (n_window_lost == 0) begin failures++; $display("FAIL no carry dropped beyond window"); end
    if (n_cout_exact == 0 || n_cout_approx == 0) begin
      failures++; $display("FAIL carry-out not seen in both modes");
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

endmodule : tb_rap_cla
