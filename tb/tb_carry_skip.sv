// tb_carry_skip: exhaustive self-check of both forms of the carry skip
// gate. For every 8-bit intermediate sum, block carry and incoming carry
// the expected block carry is "block carry, or incoming carry when the
// sum is all ones". The AOI form gets true inputs and must return that
// carry inverted; the OAI form gets inverted carries and must return it
// true.
module tb_carry_skip;
  int checks = 0, failures = 0;
  logic [7:0] x;
  logic g, ci, co_aoi, co_oai, e;

  carry_skip #(.OAI(1'b0)) dut_aoi (.x(x), .g(g),  .ci(ci),  .co(co_aoi));
  carry_skip #(.OAI(1'b1)) dut_oai (.x(x), .g(~g), .ci(~ci), .co(co_oai));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int v = 0; v < 4; v++) begin
        x = 8'(i); {g, ci} = 2'(v);
        #1;
        e = g || (ci && i == 255);
        checks += 2;
        if (co_aoi !== !e) begin
          failures++;
          $display("FAIL AOI x=%h g=%b ci=%b co=%b", x, g, ci, co_aoi);
        end
        if (co_oai !== e) begin
          failures++;
          $display("FAIL OAI x=%h g=%b ci=%b co=%b", x, g, ci, co_oai);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
