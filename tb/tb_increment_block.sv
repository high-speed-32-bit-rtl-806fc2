// tb_increment_block: exhaustive self-check of the 8-bit increment block
// (every word with carry 0 and 1) against (x + cin) mod 256.
module tb_increment_block;
  int checks = 0, failures = 0;
  logic [7:0] x, s;
  logic       cin;

  increment_block dut (.x(x), .cin(cin), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int c = 0; c < 2; c++) begin
        x = 8'(i); cin = c[0];
        #1;
        checks++;
        if (int'(s) != (i + c) % 256) begin
          failures++;
          $display("FAIL %0d + %0d = %0d", i, c, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
