// tb_accumulator: self-check of the accumulator register.
// Checks that clr loads 0 on a rising clock edge, that d is captured on
// each rising edge and held between edges, and that clear wins over d.
module tb_accumulator;
  int checks = 0, failures = 0;
  int cycles = 0;
  logic        c = 1'b0, clr;
  logic [63:0] d, y, model;

  accumulator dut (.c(c), .clr(clr), .d(d), .y(y));

  always #5 c = ~c;
  always @(posedge c) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b1; d = {$urandom, $urandom};
    @(posedge c); #1;
    checks++;
    if (y !== '0) begin failures++; $display("FAIL clear: y=%h", y); end
    model = '0;
    for (int i = 0; i < 1000; i++) begin
      clr = ($urandom_range(0, 9) == 0);
      d   = {$urandom, $urandom};
      #3;   // before the edge the old value is held
      checks++;
      if (y !== model) begin failures++; $display("FAIL hold: y=%h model=%h", y, model); end
      @(posedge c); #1;
      model = clr ? '0 : d;
      checks++;
      if (y !== model) begin failures++; $display("FAIL load: y=%h model=%h", y, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
