// tb_tlb_l1: self-checking test of the set-associative L1 TLB.
//
// The TLB is built with 16 entries as 4 sets of 4 ways and pseudo-LRU
// replacement. The testbench plays the page table walker: it answers each
// walk request after 1..5 cycles with a frame number computed from the page
// number (vpn ^ 0x5A5A) and per-page permissions, and counts the requests.
// Checked: bare-mode pass-through, miss then hit with a one-cycle hit answer,
// the answer one cycle after the walker's, the pseudo-LRU victim within a
// full set, permission faults (store to a
// read-only page, fetch without X, user access to a supervisor page, SUM),
// a walk that faults is not kept, single-page and full sfence, an sfence
// during a walk, and a random access stream against the expected mapping.
module tb_tlb_l1;
  import tlb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready;
  vaddr_t req_vaddr = '0;
  access_t req_acc = ACC_LOAD;
  priv_t priv = PRV_S;
  logic sum = 0, satp_sv39 = 0;
  sfence_t sfence = '0;
  logic resp_valid, resp_pf, miss;
  paddr_t resp_paddr;
  logic ptw_req_valid, ptw_req_ready = 0;
  ptw_req_t ptw_req;
  logic ptw_resp_valid = 0;
  ptw_resp_t ptw_resp = '0;

  int checks = 0, failures = 0, walks = 0;

  tlb_l1 #(.ENTRIES(16), .WAYS(4), .REPL(REPL_PLRU), .IS_ITLB(1'b0)) dut (.*);

  always #5 clk = ~clk;

  localparam vpn_t RO_VPN   = 27'h00123;  // readable only: no W, no X
  localparam vpn_t USER_VPN = 27'h00222;  // U page
  localparam vpn_t BAD_VPN  = 27'h00333;  // walk ends in a fault

  function automatic ppn_t ppn_of(vpn_t v);
    return PPN_BITS'(v) ^ 44'h5A5A;
  endfunction

  function automatic perm_t perm_of(vpn_t v);
    perm_t p = '{d: 1, a: 1, u: 0, x: 1, w: 1, r: 1};
    if (v == RO_VPN) begin p.w = 0; p.x = 0; end
    if (v == USER_VPN) p.u = 1;
    return p;
  endfunction

  // walker model
  initial begin
    forever begin
      @(negedge clk);
      ptw_req_ready = 1;
      if (ptw_req_valid) begin
        vpn_t v;
        v = ptw_req.vpn;
        walks++;
        @(negedge clk);
        ptw_req_ready = 0;
        repeat ($urandom_range(4)) @(negedge clk);
        ptw_resp_valid = 1;
        ptw_resp = '{pf: (v == BAD_VPN), ppn: ppn_of(v), perm: perm_of(v), level: 2'd0};
        @(negedge clk);
        ptw_resp_valid = 0;
      end
    end
  end

  // the answer of a walk reaches the requester one cycle after the walker
  logic walk_answered = 0;
  int walk_latency_checks = 0;
  always @(posedge clk) begin
    if (walk_answered) begin
      walk_latency_checks++;
      if (!resp_valid) begin
        failures++;
        $display("FAIL walk answer not passed on one cycle later");
      end
    end
    walk_answered <= ptw_resp_valid;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // one translation; reports the answer, whether it missed, and its latency
  task automatic xlate(input vaddr_t va, input access_t acc,
                       output paddr_t pa, output logic pf, output logic missed, output int lat);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_vaddr = va; req_acc = acc;
    @(negedge clk);
    req_valid = 0;
    lat = 1; missed = 0;
    while (!resp_valid) begin
      if (miss) missed = 1;
      @(negedge clk);
      lat++;
    end
    pa = resp_paddr; pf = resp_pf;
  endtask

  // expect a good translation; hit_exp: 1 hit, 0 miss
  task automatic expect_ok(string what, vpn_t v, access_t acc, bit hit_exp);
    paddr_t pa; logic pf, missed; int lat;
    logic [11:0] off;
    off = 12'($urandom);
    xlate({v, off}, acc, pa, pf, missed, lat);
    check({what, " paddr"}, pa, {ppn_of(v), off});
    check({what, " pf"}, pf, 0);
    check({what, " hit"}, !missed, hit_exp);
    if (hit_exp) check({what, " hit latency"}, lat, 1);
  endtask

  task automatic expect_pf(string what, vpn_t v, access_t acc);
    paddr_t pa; logic pf, missed; int lat;
    xlate({v, 12'h010}, acc, pa, pf, missed, lat);
    check({what, " pf"}, pf, 1);
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
    paddr_t pa; logic pf, missed; int lat, w0;
    vpn_t a, b, c, d, e;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // bare mode: identity, one cycle, no walk
    w0 = walks;
    xlate(39'h12_3456_789A, ACC_LOAD, pa, pf, missed, lat);
    check("bare paddr", pa, 56'h12_3456_789A);
    check("bare latency", lat, 1);
    check("bare no walk", walks - w0, 0);
    satp_sv39 = 1;

    // miss then hit
    w0 = walks;
    expect_ok("first access", 27'h00041, ACC_LOAD, 0);
    check("one walk", walks - w0, 1);
    expect_ok("second access", 27'h00041, ACC_STORE, 1);
    check("no second walk", walks - w0, 1);

    // pseudo-LRU in set 0 (vpn low 2 bits = 0)
    a = 27'h1000; b = 27'h2000; c = 27'h3000; d = 27'h4000; e = 27'h5000;
    expect_ok("fill a", a, ACC_LOAD, 0);
    expect_ok("fill b", b, ACC_LOAD, 0);
    expect_ok("fill c", c, ACC_LOAD, 0);
    expect_ok("fill d", d, ACC_LOAD, 0);
    expect_ok("touch a", a, ACC_LOAD, 1);
    expect_ok("fill e", e, ACC_LOAD, 0);  // evicts c
    expect_ok("a kept", a, ACC_LOAD, 1);
    expect_ok("b kept", b, ACC_LOAD, 1);
    expect_ok("d kept", d, ACC_LOAD, 1);
    expect_ok("e kept", e, ACC_LOAD, 1);
    expect_ok("c evicted", c, ACC_LOAD, 0);

    // permissions
    expect_ok("ro load", RO_VPN, ACC_LOAD, 0);
    expect_pf("ro store", RO_VPN, ACC_STORE);
    expect_pf("ro fetch", RO_VPN, ACC_FETCH);
    expect_ok("fetch X page", 27'h00041, ACC_FETCH, 1);
    expect_pf("S load of U page, SUM=0", USER_VPN, ACC_LOAD);
    sum = 1;
    expect_ok("S load of U page, SUM=1", USER_VPN, ACC_LOAD, 1);
    expect_pf("S fetch of U page", USER_VPN, ACC_FETCH);
    priv = PRV_U;
    expect_ok("U load of U page", USER_VPN, ACC_LOAD, 1);
    expect_pf("U load of S page", 27'h00041, ACC_LOAD);
    priv = PRV_M;
    xlate({27'h00041, 12'h0}, ACC_LOAD, pa, pf, missed, lat);
    check("M mode bare", pa, {27'h00041, 12'h0});
    priv = PRV_S; sum = 0;

    // faulting walk is not kept
    w0 = walks;
    expect_pf("walk fault", BAD_VPN, ACC_LOAD);
    expect_pf("walk fault again", BAD_VPN, ACC_LOAD);
    check("fault walks twice", walks - w0, 2);

    // sfence: one page, then all
    do_sfence(1, a);
    expect_ok("a flushed", a, ACC_LOAD, 0);
    expect_ok("b survives", b, ACC_LOAD, 1);
    do_sfence(0, '0);
    expect_ok("b flushed by full sfence", b, ACC_LOAD, 0);

    // sfence during a walk: answer returned, not kept
    fork
      expect_ok("walk with sfence", 27'h00777, ACC_LOAD, 0);
      begin
        wait (ptw_req_valid);
        do_sfence(0, '0);
      end
    join
    expect_ok("killed refill not kept", 27'h00777, ACC_LOAD, 0);

    // random stream over 24 pages
    for (int i = 0; i < 300; i++) begin
      vpn_t v;
      paddr_t exp_pa;
      logic [11:0] off;
      v = 27'(($urandom_range(23) * 5) + 27'h400);
      off = 12'($urandom);
      xlate({v, off}, ACC_LOAD, pa, pf, missed, lat);
      check("random paddr", pa, {ppn_of(v), off});
      check("random pf", pf, 0);
      if (!missed) check("random hit latency", lat, 1);
    end

    checks += walk_latency_checks;
    check("walk answers seen", walk_latency_checks > 20, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
