// tb_tlb_random_repl: self-checking test of the random replacement source.
//
// A reference model of the same 16-bit Galois LFSR
// (x^16 + x^14 + x^13 + x^11 + 1, seed 0xACE1) is stepped alongside the block;
// the victim must equal its low bits, hold while `step` is low, and over 200
// steps every one of the 8 ways must come up.
module tb_tlb_random_repl;
  logic clk = 0, rst_n = 0, step = 0;
  logic [2:0] victim_way;
  int checks = 0, failures = 0;
  logic [15:0] ref_lfsr;
  bit [7:0] seen = '0;

  tlb_random_repl #(.WAYS(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // reference: shift right, xor taps when the bit shifted out is 1
  function automatic logic [15:0] next(logic [15:0] s);
    logic [15:0] n;
    n = s >> 1;
    if (s[0]) n = n ^ ((16'h1 << 15) | (16'h1 << 13) | (16'h1 << 12) | (16'h1 << 10));
    return n;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_lfsr = 16'hACE1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check("reset value", int'(victim_way), int'(ref_lfsr[2:0]));
    for (int i = 0; i < 200; i++) begin
      step = ($urandom_range(3) != 0);
      @(negedge clk);
      if (step) ref_lfsr = next(ref_lfsr);
      check("victim", int'(victim_way), int'(ref_lfsr[2:0]));
      seen[victim_way] = 1'b1;
    end
    check("all ways chosen", int'(seen), 255);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
