// tb_ptw_cache: self-checking test of the fully-associative PTW cache.
//
// A 4-entry cache: inserted entries hit in the same cycle with their page
// number; a fifth insert with no hits in between replaces the oldest entry
// (the pseudo-LRU victim worked out by hand); a hit
// protects an entry; inserting an address already present does not use a
// second slot; any sfence empties the cache.
module tb_ptw_cache;
  import tlb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic lk_valid = 0, lk_hit;
  paddr_t lk_addr = '0;
  ppn_t lk_ppn;
  logic ins_valid = 0;
  paddr_t ins_addr = '0;
  ppn_t ins_ppn = '0;
  sfence_t sfence = '0;
  int checks = 0, failures = 0;

  ptw_cache #(.ENTRIES(4)) dut (.*);

  always #5 clk = ~clk;

  function automatic paddr_t addr_of(int k);
    return paddr_t'(56'h8_0000 + 56'h1000 * k + 8 * k);
  endfunction

  function automatic ppn_t ppn_of(int k);
    return ppn_t'(44'h900 + 7 * k);
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic insert(int k);
    @(negedge clk);
    ins_valid = 1; ins_addr = addr_of(k); ins_ppn = ppn_of(k);
    @(negedge clk);
    ins_valid = 0;
  endtask

  // look up entry k for one cycle; returns hit
  task automatic look(input int k, output logic hit);
    @(negedge clk);
    lk_valid = 1; lk_addr = addr_of(k);
    #1;
    hit = lk_hit;
    if (lk_hit) check("ppn", lk_ppn, ppn_of(k));
    @(negedge clk);
    lk_valid = 0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic h;
    repeat (3) @(negedge clk);
    rst_n = 1;
    look(0, h);
    check("empty", h, 0);
    for (int k = 0; k < 4; k++) insert(k);
    for (int k = 3; k >= 0; k--) begin
      look(k, h);
      check("present", h, 1);
    end
    // touched 3,2,1,0 last: the root points away from 0 to the pair {2,3},
    // whose bit points away from 2, so entry 3 is replaced
    insert(4);
    look(3, h);
    check("pseudo-LRU victim replaced", h, 0);
    look(4, h);
    check("new entry", h, 1);
    look(0, h);
    check("recent entry kept", h, 1);
    // re-inserting a present address uses no new slot
    insert(4);
    insert(4);
    look(1, h);
    check("duplicate insert keeps others", h, 1);
    look(2, h);
    check("duplicate insert keeps others 2", h, 1);
    // sfence empties it
    @(negedge clk);
    sfence = '{valid: 1, has_addr: 1, vpn: '0};
    @(negedge clk);
    sfence = '0;
    for (int k = 0; k < 5; k++) begin
      look(k, h);
      check("flushed", h, 0);
    end
    // lookup disabled reports no hit
    insert(1);
    @(negedge clk);
    lk_valid = 0; lk_addr = addr_of(1);
    #1 check("no hit without lk_valid", lk_hit, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
