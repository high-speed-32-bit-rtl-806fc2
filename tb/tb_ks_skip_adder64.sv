// tb_ks_skip_adder64: self-check of the 64-bit block Kogge-Stone adder
// with carry skip logic against 65-bit integer addition.
// Besides random operands it builds operands whose carry is generated in
// one 8-bit block and must skip through a run of blocks whose sums are
// all ones, for every start block and run length, so that every AOI and
// OAI stage passes a carry both by its own carry and by skipping. Both
// the sum and the inverted carry out are checked.
module tb_ks_skip_adder64;
  int checks = 0, failures = 0;
  int skips = 0;
  logic [63:0] a, b, s;
  logic        co_n;

  ks_skip_adder64 dut (.a(a), .b(b), .s(s), .co_n(co_n));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [63:0] x, input logic [63:0] y);
    logic [64:0] e;
    a = x; b = y;
    #1;
    e = {1'b0, x} + {1'b0, y};
    checks++;
    if ({~co_n, s} !== e) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h + %h = %b_%h, expected %h", x, y, ~co_n, s, e);
    end
  endtask

  initial begin
    logic [63:0] x, y;
    check('0, '0);
    check('1, 64'h1);
    check('1, '1);
    check(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    check(64'd1440000, 64'd1440000);
    // carry generated in block g, skipping blocks g+1 .. g+len
    for (int g = 0; g < 8; g++) begin
      for (int len = 0; g + len < 8; len++) begin
        x = '0; y = '0;
        x[g*8 +: 8] = 8'h80;
        y[g*8 +: 8] = 8'h80;
        for (int k = g + 1; k <= g + len; k++) begin
          x[k*8 +: 8] = 8'($urandom);
          y[k*8 +: 8] = 8'hff - x[k*8 +: 8];
          skips++;
        end
        if (g + len + 1 < 8) x[(g+len+1)*8 +: 8] = 8'($urandom);
        check(x, y);
        check(y | 64'h1, x);
      end
    end
    for (int i = 0; i < 30000; i++) begin
      x = {$urandom, $urandom};
      y = (i % 3 == 0) ? ~x + 64'($urandom_range(0, 3)) : {$urandom, $urandom};
      check(x, y);
    end
    checks++;
    if (skips == 0) begin
      failures++;
      $display("FAIL no skip case was generated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
