// tb_tlb_l2: self-checking test of the set-associative L2 TLB.
//
// Two instances are driven with the same stimulus: a 16-entry 4-way TLB with
// random replacement (4 sets) and a 16-entry direct-mapped one. Checked:
// a lookup answers exactly one cycle later; a refilled page hits with its
// frame and permissions; filling a 4-way set with 5 pages keeps exactly 4 of
// them, while in the direct-mapped TLB two pages with the same index evict
// each other; an sfence with an address clears the whole set (a second page
// of the same set misses too) and leaves other sets; a full sfence clears
// everything; a way refilled in the lookup cycle is not reported as a hit.
module tb_tlb_l2;
  import tlb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic lk_valid = 0;
  vpn_t lk_vpn = '0;
  logic rf_valid = 0;
  vpn_t rf_vpn = '0;
  ppn_t rf_ppn = '0;
  perm_t rf_perm = '0;
  sfence_t sfence = '0;

  logic  sa_resp_valid, sa_hit, dm_resp_valid, dm_hit;
  ppn_t  sa_ppn, dm_ppn;
  perm_t sa_perm, dm_perm;

  int checks = 0, failures = 0;

  tlb_l2 #(.ENTRIES(16), .WAYS(4), .REPL(REPL_RANDOM)) dut_sa (
    .clk, .rst_n, .lk_valid, .lk_vpn,
    .lk_resp_valid(sa_resp_valid), .lk_hit(sa_hit), .lk_ppn(sa_ppn), .lk_perm(sa_perm),
    .rf_valid, .rf_vpn, .rf_ppn, .rf_perm, .sfence);

  tlb_l2 #(.ENTRIES(16), .WAYS(1), .REPL(REPL_RANDOM)) dut_dm (
    .clk, .rst_n, .lk_valid, .lk_vpn,
    .lk_resp_valid(dm_resp_valid), .lk_hit(dm_hit), .lk_ppn(dm_ppn), .lk_perm(dm_perm),
    .rf_valid, .rf_vpn, .rf_ppn, .rf_perm, .sfence);

  always #5 clk = ~clk;

  function automatic ppn_t ppn_of(vpn_t v);
    return PPN_BITS'(v) * 3 + 44'h777;
  endfunction

  function automatic perm_t perm_of(vpn_t v);
    return perm_t'(6'(v) | 6'b110001);
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic refill(vpn_t v);
    @(negedge clk);
    rf_valid = 1; rf_vpn = v; rf_ppn = ppn_of(v); rf_perm = perm_of(v);
    @(negedge clk);
    rf_valid = 0;
  endtask

  // lookup in both; returns the two hit flags and checks the data on a hit
  task automatic lookup(input vpn_t v, output logic sa, output logic dm);
    @(negedge clk);
    lk_valid = 1; lk_vpn = v;
    check("no answer in the request cycle", sa_resp_valid, 0);
    @(negedge clk);
    lk_valid = 0;
    check("answer after one cycle (sa)", sa_resp_valid, 1);
    check("answer after one cycle (dm)", dm_resp_valid, 1);
    sa = sa_hit; dm = dm_hit;
    if (sa_hit) begin
      check("sa ppn", sa_ppn, ppn_of(v));
      check("sa perm", sa_perm, perm_of(v));
    end
    if (dm_hit) check("dm ppn", dm_ppn, ppn_of(v));
  endtask

  task automatic do_sfence(bit has_addr, vpn_t v);
    @(negedge clk);
    sfence = '{valid: 1, has_addr: has_addr, vpn: v};
    @(negedge clk);
    sfence = '0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic sa, dm;
    int kept;
    repeat (3) @(negedge clk);
    rst_n = 1;

    lookup(27'h10, sa, dm);
    check("empty miss sa", sa, 0);
    check("empty miss dm", dm, 0);

    // pages 0x10 (set 0 of both) and 0x21 (set 1 of sa, set 1 of dm)
    refill(27'h10);
    refill(27'h21);
    lookup(27'h10, sa, dm);
    check("hit sa", sa, 1);
    check("hit dm", dm, 1);
    lookup(27'h21, sa, dm);
    check("hit sa 2", sa, 1);
    check("hit dm 2", dm, 1);

    // conflict: 0x30 has the same index as 0x10 in the direct-mapped TLB
    // (16 sets, low 4 bits 0) and in the 4-way TLB (4 sets, low 2 bits 0)
    refill(27'h30);
    lookup(27'h10, sa, dm);
    check("4-way keeps both", sa, 1);
    check("direct-mapped evicted", dm, 0);
    lookup(27'h30, sa, dm);
    check("new page sa", sa, 1);
    check("new page dm", dm, 1);

    // set 0 of the 4-way TLB: 0x10,0x30 present; add 0x50,0x70,0x90
    refill(27'h50);
    refill(27'h70);
    refill(27'h90);
    kept = 0;
    for (int k = 0; k < 5; k++) begin
      lookup(27'(27'h10 + 27'h20 * k), sa, dm);
      kept += sa;
    end
    check("5 pages in a 4-way set keep 4", kept, 4);

    // sfence with address flushes the whole set
    refill(27'h10);
    lookup(27'h21, sa, dm);
    check("other set before flush", sa, 1);
    do_sfence(1, 27'h10);
    for (int k = 0; k < 5; k++) begin
      lookup(27'(27'h10 + 27'h20 * k), sa, dm);
      check("set flushed", sa, 0);
    end
    lookup(27'h21, sa, dm);
    check("other set kept", sa, 1);
    do_sfence(0, '0);
    lookup(27'h21, sa, dm);
    check("full flush sa", sa, 0);
    check("full flush dm", dm, 0);

    // refill in the lookup cycle of the same set is not a hit yet
    @(negedge clk);
    lk_valid = 1; lk_vpn = 27'h44;
    rf_valid = 1; rf_vpn = 27'h44; rf_ppn = ppn_of(27'h44); rf_perm = perm_of(27'h44);
    @(negedge clk);
    lk_valid = 0; rf_valid = 0;
    check("same-cycle refill not a hit", sa_hit, 0);
    lookup(27'h44, sa, dm);
    check("next lookup hits", sa, 1);

    // random: refill then immediate lookup always hits
    for (int i = 0; i < 100; i++) begin
      vpn_t v;
      v = 27'($urandom);
      refill(v);
      lookup(v, sa, dm);
      check("random refill hits sa", sa, 1);
      check("random refill hits dm", dm, 1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
