// tb_vedic_combine: self-check of the stage that joins four half-width
// Vedic products. For operands a = {ah, al} and b = {bh, bl} the
// testbench computes the four half-width products itself, feeds them in
// and compares the output with a * b. The 4-bit default (the 4x4
// multiplier's stage) is run for all 256 operand pairs; a 32-bit
// instance gets 20000 random pairs and pairs whose crosswise products
// are near their maximum, so that both middle carries occur.
module tb_vedic_combine;
  int checks = 0, failures = 0;
  int n_k1 = 0, n_k2 = 0;

  logic [3:0]  ll4, hl4, lh4, hh4;
  logic [7:0]  q4;
  logic [31:0] ll32, hl32, lh32, hh32;
  logic [63:0] q32;

  vedic_combine             dut4  (.ll(ll4),  .hl(hl4),  .lh(lh4),  .hh(hh4),  .q(q4));
  vedic_combine #(.W(32))   dut32 (.ll(ll32), .hl(hl32), .lh(lh32), .hh(hh32), .q(q32));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(input logic [31:0] x, input logic [31:0] y);
    logic [32:0] mid;
    ll32 = 32'(x[15:0])  * 32'(y[15:0]);
    hl32 = 32'(x[31:16]) * 32'(y[15:0]);
    lh32 = 32'(x[15:0])  * 32'(y[31:16]);
    hh32 = 32'(x[31:16]) * 32'(y[31:16]);
    mid  = {1'b0, hl32} + {1'b0, lh32};
    if (mid[32]) n_k1++;
    else if (mid + 33'(ll32[31:16]) >= 33'h1_0000_0000) n_k2++;
    #1;
    checks++;
    if (q32 !== 64'(x) * 64'(y)) begin
      failures++;
      $display("FAIL 32-bit %h * %h -> %h", x, y, q32);
    end
  endtask

  initial begin
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        ll4 = 4'((x % 4) * (y % 4));
        hl4 = 4'((x / 4) * (y % 4));
        lh4 = 4'((x % 4) * (y / 4));
        hh4 = 4'((x / 4) * (y / 4));
        #1;
        checks++;
        if (int'(q4) != x * y) begin
          failures++;
          $display("FAIL 4-bit %0d * %0d -> %0d", x, y, q4);
        end
      end
    end
    for (int i = 0; i < 20000; i++) begin
      if (i % 2 == 0) check32($urandom | 32'hc000_c000, $urandom | 32'hc000_c000);
      else            check32($urandom, $urandom);
    end
    check32(32'h0000_ffff, 32'hffff_0000);
    check32(32'hffff_ffff, 32'h0002_ffff);   // carry only from the right adder
    check32(32'hffff_ffff, 32'hffff_ffff);
    checks++;
    if (n_k1 == 0 || n_k2 == 0) begin
      failures++;
      $display("FAIL middle carries not both exercised: k1=%0d k2=%0d", n_k1, n_k2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
