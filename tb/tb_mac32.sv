// tb_mac32: end-to-end self-check of the 32-bit MAC at its default size.
//
// Phase 1 replays the reference run of the design: m1 = m2 = 1200 with
// clr held high, then released; s must read 0, 1440000, 2880000,
// 4320000, 5760000 on successive rising edges (one product per clock,
// one clock from operands to s). Phase 2 runs 20000 cycles of random and
// large operands with occasional clears against a reference model
// s <= clr ? 0 : s + m1*m2 (mod 2^64).
//
// It also counts how often each mechanism of the datapath occurs and
// fails if one never does: a clear of a non-zero sum, an accumulation, a
// wrap of the 64-bit sum, a carry produced inside an 8-bit adder block
// that leaves it, and a carry that skips through a block whose
// intermediate sum is all ones.
module tb_mac32;
  int checks = 0, failures = 0;
  int cycles = 0;
  int n_clear = 0, n_acc = 0, n_wrap = 0, n_gen = 0, n_skip = 0;

  logic        c = 1'b0, clr;
  logic [31:0] m1, m2;
  logic [63:0] s, model;

  mac32 dut (.c(c), .clr(clr), .m1(m1), .m2(m2), .s(s));

  always #5 c = ~c;
  always @(posedge c) cycles++;

  initial begin
    wait (cycles == 40000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count the adder events of one accumulation: carries generated in an
  // 8-bit block (block carry) and carries skipping a block.
  task automatic count_events(input logic [63:0] v, input logic [63:0] y);
    logic [8:0]  blk;
    logic        cin;
    cin = 1'b0;
    for (int k = 0; k < 8; k++) begin
      blk = {1'b0, v[k*8 +: 8]} + {1'b0, y[k*8 +: 8]};
      if (k < 7 && blk[8]) n_gen++;
      if (k > 0 && k < 7 && cin && blk[7:0] == 8'hff) n_skip++;
      cin = blk[8] | (cin & (blk[7:0] == 8'hff));
    end
  endtask

  task automatic step(input logic [31:0] a, input logic [31:0] b, input logic cl);
    logic [63:0] p;
    logic [64:0] full;
    m1 = a; m2 = b; clr = cl;
    p = 64'(a) * 64'(b);
    @(posedge c); #1;
    if (cl) begin
      if (model != '0) n_clear++;
      model = '0;
    end else begin
      full = {1'b0, model} + {1'b0, p};
      if (full[64]) n_wrap++;
      count_events(p, model);
      n_acc++;
      model = full[63:0];
    end
    checks++;
    if (s !== model) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: s=%h expected %h", cycles, s, model);
    end
  endtask

  initial begin
    // Phase 1: reference run with 1200 x 1200
    m1 = 32'd1200; m2 = 32'd1200; clr = 1'b1;
    model = '0;
    repeat (3) @(posedge c);
    #1;
    checks++;
    if (s !== 64'd0) begin failures++; $display("FAIL s=%0d while cleared", s); end
    clr = 1'b0;
    for (int k = 1; k <= 4; k++) begin
      @(posedge c); #1;
      checks++;
      if (s !== 64'd1440000 * 64'(k)) begin
        failures++;
        $display("FAIL after %0d products s=%0d expected %0d", k, s, 64'd1440000 * 64'(k));
      end
    end
    model = 64'd5760000;
    n_acc += 4;

    // Phase 2: random operation
    for (int i = 0; i < 20000; i++) begin
      case ($urandom_range(0, 9))
        0:       step($urandom, $urandom, ($urandom_range(0, 3) == 0));
        1, 2:    step($urandom | 32'hff00_0000, $urandom | 32'hff00_0000, 1'b0);
        3:       step(32'hffff_ffff, 32'hffff_ffff, 1'b0);
        4:       step(32'($urandom_range(0, 255)), 32'($urandom_range(0, 255)), 1'b0);
        default: step($urandom, $urandom, 1'b0);
      endcase
    end

    $display("events: clear=%0d accumulate=%0d wrap=%0d block_carry=%0d skip=%0d",
             n_clear, n_acc, n_wrap, n_gen, n_skip);
    checks += 5;
    if (n_clear == 0) begin failures++; $display("FAIL no clear of a non-zero sum"); end
    if (n_acc   == 0) begin failures++; $display("FAIL no accumulation"); end
    if (n_wrap  == 0) begin failures++; $display("FAIL no wrap of the sum"); end
    if (n_gen   == 0) begin failures++; $display("FAIL no block carry"); end
    if (n_skip  == 0) begin failures++; $display("FAIL no carry skip"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
