// tb_kogge_stone_adder: exhaustive self-check of the 8-bit Kogge-Stone
// adder (all 65536 operand pairs) against integer addition, plus 5000
// random pairs on a 32-bit instance to exercise a deeper prefix tree.
module tb_kogge_stone_adder;
  int checks = 0, failures = 0;
  logic [7:0]  a, b, s;
  logic        co;
  logic [31:0] a32, b32, s32;
  logic        co32;
  logic [32:0] e32;

  kogge_stone_adder            dut   (.a(a),   .b(b),   .sum(s),   .cout(co));
  kogge_stone_adder #(.N(32))  dut32 (.a(a32), .b(b32), .sum(s32), .cout(co32));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (int'({co, s}) != i + j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d = %0d", i, j, int'({co, s}));
        end
      end
    end
    for (int i = 0; i < 5000; i++) begin
      a32 = (i == 0) ? 32'hffff_ffff : $urandom;
      b32 = (i == 0) ? 32'h1 : $urandom;
      #1;
      e32 = {1'b0, a32} + {1'b0, b32};
      checks++;
      if ({co32, s32} !== e32) begin
        failures++;
        $display("FAIL 32-bit %h + %h = %b_%h", a32, b32, co32, s32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
