// tb_vedic_mult: self-check of the recursive Vedic multiplier.
// The 4x4 and 8x8 sizes are tested exhaustively; the 32x32 default gets
// corner operands (0, 1, all ones, single bits) and 20000 random pairs,
// including pairs chosen so that both crosswise products are large.
// Results are compared with the simulator's own 64-bit multiplication.
module tb_vedic_mult;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4;
  logic [7:0]  q4;
  logic [7:0]  a8, b8;
  logic [15:0] q8;
  logic [31:0] a32, b32;
  logic [63:0] q32;

  vedic_mult #(.W(4)) dut4  (.a(a4),  .b(b4),  .q(q4));
  vedic_mult #(.W(8)) dut8  (.a(a8),  .b(b8),  .q(q8));
  vedic_mult          dut32 (.a(a32), .b(b32), .q(q32));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] e;
    a32 = x; b32 = y;
    #1;
    e = 64'(x) * 64'(y);
    checks++;
    if (q32 !== e) begin
      failures++;
      $display("FAIL 32x32 %h * %h = %h, expected %h", x, y, q32, e);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if (int'(q4) != i * j) begin
          failures++;
          $display("FAIL 4x4 %0d * %0d = %0d", i, j, q4);
        end
      end
    end
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if (int'(q8) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL 8x8 %0d * %0d = %0d", i, j, q8);
        end
      end
    end
    check32(32'd1200, 32'd1200);
    check32(32'hffff_ffff, 32'hffff_ffff);
    check32(32'hffff_ffff, 32'h0000_0001);
    check32(32'h0000_0000, 32'hdead_beef);
    for (int i = 0; i < 32; i++) check32(32'h1 << i, 32'hffff_ffff);
    for (int i = 0; i < 20000; i++) begin
      if (i % 4 == 0) check32($urandom | 32'hffff_0000, $urandom | 32'h0000_ffff);
      else            check32($urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
