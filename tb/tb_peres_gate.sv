// tb_peres_gate: exhaustive self-check of the Peres gate.
// Applies all 8 input patterns, compares P, Q, R with P = A, Q = A xor B,
// R = AB xor C, checks the half-adder use (C = 0: Q + 2R = A + B) and
// that the gate is reversible (8 distinct outputs).
module tb_peres_gate;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;
  logic [7:0] seen;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
      if (p !== a || q !== (a != b) || r !== ((a && b) != c)) begin
        failures++;
        $display("FAIL in=%b out=%b%b%b", 3'(v), p, q, r);
      end
      if (!c) begin
        checks++;
        if (int'(q) + 2 * int'(r) != int'(a) + int'(b)) begin
          failures++;
          $display("FAIL half adder a=%b b=%b sum=%b carry=%b", a, b, q, r);
        end
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
