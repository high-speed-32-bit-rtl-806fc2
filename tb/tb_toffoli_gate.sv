// tb_toffoli_gate: exhaustive self-check of the Toffoli gate.
// Applies all 8 input patterns, compares P, Q, R with the gate equations
// and checks that the 8 output patterns are all different (the gate is
// reversible). A watchdog ends the run if it stalls.
module tb_toffoli_gate;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;
  logic [7:0] seen;

  toffoli_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (p !== a || q !== b || r !== ((a && b) != c)) begin
        failures++;
        $display("FAIL in=%b out=%b%b%b", 3'(v), p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hff) begin
      failures++;
      $display("FAIL outputs not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
