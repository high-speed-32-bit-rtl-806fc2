// tb_double_peres_gate: exhaustive self-check of the double Peres gate.
// Applies all 16 input patterns, compares the four outputs with their
// equations, checks the full-adder use (D = 0: R + 2S = A + B + Cin) and
// that the 16 output patterns are distinct (reversible).
module tb_double_peres_gate;
  int checks = 0, failures = 0;
  logic a, b, cin, d, p, q, r, s;
  logic [15:0] seen;
  logic e_s;

  double_peres_gate dut (.a(a), .b(b), .cin(cin), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, cin, d} = 4'(v);
      #1;
      e_s = (((a != b) && cin) != (a && b)) != d;
      checks++;
      if (p !== a || q !== (a != b) || r !== ((a != b) != cin) || s !== e_s) begin
        failures++;
        $display("FAIL in=%b out=%b%b%b%b", 4'(v), p, q, r, s);
      end
      if (!d) begin
        checks++;
        if (int'(r) + 2 * int'(s) != int'(a) + int'(b) + int'(cin)) begin
          failures++;
          $display("FAIL full adder a=%b b=%b cin=%b sum=%b carry=%b", a, b, cin, r, s);
        end
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    checks++;
    if (seen !== 16'hffff) begin
      failures++;
      $display("FAIL outputs not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
