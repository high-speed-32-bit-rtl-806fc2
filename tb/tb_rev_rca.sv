// tb_rev_rca: self-check of the reversible ripple-carry adder.
// The 4-bit default is tested exhaustively (256 operand pairs); a 32-bit
// instance, the widest the multiplier uses, gets 20000 random pairs plus
// long carry chains. Results are compared with integer addition.
module tb_rev_rca;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, s4;
  logic        c4;
  logic [31:0] a32, b32, s32;
  logic        c32;

  rev_rca                 dut4  (.a(a4),  .b(b4),  .sum(s4),  .cout(c4));
  rev_rca #(.N(32))       dut32 (.a(a32), .b(b32), .sum(s32), .cout(c32));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(input logic [31:0] x, input logic [31:0] y);
    logic [32:0] e;
    a32 = x; b32 = y;
    #1;
    e = {1'b0, x} + {1'b0, y};
    checks++;
    if ({c32, s32} !== e) begin
      failures++;
      $display("FAIL 32-bit %h + %h = %b_%h, expected %h", x, y, c32, s32, e);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if (int'({c4, s4}) != i + j) begin
          failures++;
          $display("FAIL 4-bit %0d + %0d = %0d", i, j, int'({c4, s4}));
        end
      end
    end
    check32(32'hffff_ffff, 32'h0000_0001);
    check32(32'hffff_ffff, 32'hffff_ffff);
    check32(32'h7fff_ffff, 32'h0000_0001);
    check32(32'h0000_0000, 32'h0000_0000);
    for (int i = 0; i < 20000; i++) check32($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
