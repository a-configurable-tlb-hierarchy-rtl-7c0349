// tb_tlb_hierarchy: end-to-end test of the whole TLB hierarchy at its
// default sizes (instruction TLB 64 entries 8-way, data TLB 128 entries
// 8-way, L2 TLB 1024 entries 8-way, PTW cache 8 entries).
//
// The testbench builds Sv39 page tables in a behavioural memory (tb_pt_mem)
// and keeps its own map of every page: frame, permissions, level. Two
// threads then translate at the same time, one fetching through the
// instruction TLB and one loading and storing through the data TLB, and every
// answer is compared with the map. The page set is chosen to make every
// mechanism happen: 12 pages 128 pages apart fall in one set of all three
// TLBs and overflow it (L1 and L2 evictions); 48 pages share a few last-level
// tables (PTW cache hits); 2 MiB and 1 GiB superpages; a read-only page
// (store and fetch faults); an unmapped page (walk faults). Between phases a
// page is re-mapped and flushed with a single-page sfence, then everything is
// flushed, and finally translation is switched off (bare mode).
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_tlb_hierarchy;
  import tlb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic itlb_req_valid = 0, itlb_req_ready, itlb_resp_valid, itlb_resp_pf;
  vaddr_t itlb_req_vaddr = '0;
  paddr_t itlb_resp_paddr;
  logic dtlb_req_valid = 0, dtlb_req_ready, dtlb_resp_valid, dtlb_resp_pf;
  vaddr_t dtlb_req_vaddr = '0;
  access_t dtlb_req_acc = ACC_LOAD;
  paddr_t dtlb_resp_paddr;
  priv_t priv = PRV_S;
  logic sum = 0, satp_sv39 = 1;
  ppn_t satp_ppn = 44'h100;
  sfence_t sfence = '0;
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  paddr_t mem_req_addr;
  pte_t mem_resp_data;
  logic ev_itlb_miss, ev_dtlb_miss, ev_l2_hit, ev_l2_miss, ev_ptwc_hit, ev_mem_read;

  tlb_hierarchy dut (.*);

  tb_pt_mem #(.MAX_LAT(6)) u_mem (
    .clk, .rst_n,
    .req_valid (mem_req_valid), .req_ready (mem_req_ready), .req_addr (mem_req_addr),
    .resp_valid (mem_resp_valid), .resp_data (mem_resp_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ---------------- reference map ----------------
  typedef struct {
    ppn_t       ppn;    // frame of the page (superpage base for level > 0)
    int         level;
    logic [7:0] flags;
  } map_t;
  map_t pages [vpn_t];          // keyed by the vpn the leaf was mapped at
  vpn_t pool [$];               // pages the threads pick from

  localparam logic [7:0] RWX = 8'b1100_1111;
  localparam logic [7:0] RO  = 8'b1100_0011;

  function automatic vpn_t mk(int l2, int l1, int l0);
    return {9'(l2), 9'(l1), 9'(l0)};
  endfunction

  function automatic void add(vpn_t v, ppn_t p, int level, logic [7:0] fl);
    u_mem.map(satp_ppn, v, p, level, fl);
    pages[v] = '{ppn: p, level: level, flags: fl};
  endfunction

  // expected answer for a page: frame, fault
  function automatic void expect_of(vpn_t v, access_t acc, output ppn_t p, output logic pf);
    vpn_t key;
    map_t m;
    pf = 1; p = '0;
    for (int lvl = 0; lvl < 3; lvl++) begin
      key = (v >> (9 * lvl)) << (9 * lvl);
      if (pages.exists(key) && pages[key].level == lvl) begin
        m = pages[key];
        p = m.ppn | PPN_BITS'(v & ((27'd1 << (9 * lvl)) - 1));
        pf = 0;
        if (acc == ACC_FETCH && !m.flags[3]) pf = 1;
        if (acc == ACC_LOAD && !m.flags[1]) pf = 1;
        if (acc == ACC_STORE && !m.flags[2]) pf = 1;
        return;
      end
    end
  endfunction

  // ---------------- mechanism counters ----------------
  int n_itlb_hit = 0, n_itlb_miss = 0, n_dtlb_hit = 0, n_dtlb_miss = 0;
  int n_l2_hit = 0, n_l2_miss = 0, n_ptwc_hit = 0, n_contention = 0;
  int n_pf = 0, n_superpage = 0, n_bare = 0, n_sfence_one = 0, n_sfence_all = 0;
  int n_l1_evict = 0, n_l2_evict = 0, n_remap_seen = 0, n_store = 0;
  bit seen_i [vpn_t], seen_d [vpn_t], seen_l2 [vpn_t];

  always_ff @(posedge clk) if (rst_n) begin
    if (ev_l2_hit) n_l2_hit <= n_l2_hit + 1;
    if (ev_l2_miss) begin
      n_l2_miss <= n_l2_miss + 1;
      if (seen_l2.exists(dut.u_ptw.vpn_q)) n_l2_evict <= n_l2_evict + 1;
    end
    if (ev_ptwc_hit) n_ptwc_hit <= n_ptwc_hit + 1;
    if (dut.l1_ptw_valid == 2'b11) n_contention <= n_contention + 1;
  end

  // ---------------- request threads ----------------
  task automatic itlb_xlate(vpn_t v);
    logic [11:0] off; ppn_t p; logic pf, missed;
    off = 12'($urandom) & 12'hFFC;
    while (!itlb_req_ready) @(negedge clk);
    itlb_req_valid = 1; itlb_req_vaddr = {v, off};
    @(negedge clk);
    itlb_req_valid = 0;
    missed = 0;
    while (!itlb_resp_valid) begin
      if (ev_itlb_miss) missed = 1;
      @(negedge clk);
    end
    if (!satp_sv39) begin
      check("itlb bare", itlb_resp_paddr, PADDR_BITS'({v, off}));
      n_bare++;
    end else begin
      expect_of(v, ACC_FETCH, p, pf);
      check("itlb pf", itlb_resp_pf, pf);
      if (!pf) check("itlb paddr", itlb_resp_paddr, {p, off});
      if (missed) begin
        n_itlb_miss++;
        if (seen_i.exists(v)) n_l1_evict++;
      end else n_itlb_hit++;
      if (!pf) begin seen_i[v] = 1; seen_l2[v] = 1; end
      n_pf += pf;
    end
  endtask

  task automatic dtlb_xlate(vpn_t v, access_t acc);
    logic [11:0] off; ppn_t p; logic pf, missed;
    off = 12'($urandom);
    while (!dtlb_req_ready) @(negedge clk);
    dtlb_req_valid = 1; dtlb_req_vaddr = {v, off}; dtlb_req_acc = acc;
    @(negedge clk);
    dtlb_req_valid = 0;
    missed = 0;
    while (!dtlb_resp_valid) begin
      if (ev_dtlb_miss) missed = 1;
      @(negedge clk);
    end
    if (!satp_sv39) begin
      check("dtlb bare", dtlb_resp_paddr, PADDR_BITS'({v, off}));
      n_bare++;
    end else begin
      expect_of(v, acc, p, pf);
      check("dtlb pf", dtlb_resp_pf, pf);
      if (!pf) check("dtlb paddr", dtlb_resp_paddr, {p, off});
      if (missed) begin
        n_dtlb_miss++;
        if (seen_d.exists(v)) n_l1_evict++;
      end else n_dtlb_hit++;
      if (!pf) begin seen_d[v] = 1; seen_l2[v] = 1; end
      n_pf += pf;
      n_store += (acc == ACC_STORE);
      if (v[26:18] == 9'd40 || v[26:18] == 9'd41) n_superpage++;
    end
  endtask

  task automatic run_phase(int n);
    fork
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        itlb_xlate(pool[$urandom_range(pool.size() - 1)]);
      end
      for (int i = 0; i < n; i++) begin
        access_t a;
        @(negedge clk);
        a = ($urandom_range(3) == 0) ? ACC_STORE : ACC_LOAD;
        dtlb_xlate(pool[$urandom_range(pool.size() - 1)], a);
      end
    join
  endtask

  task automatic do_sfence(bit has_addr, vpn_t v);
    @(negedge clk);
    sfence = '{valid: 1, has_addr: has_addr, vpn: v};
    @(negedge clk);
    sfence = '0;
    if (has_addr) begin
      n_sfence_one++;
      seen_i.delete(v); seen_d.delete(v);
      seen_l2.delete();  // the L2 TLB flushes the whole set
    end else begin
      n_sfence_all++;
      seen_i.delete(); seen_d.delete(); seen_l2.delete();
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  vpn_t remap_vpn;

  initial begin
    // 12 pages in one set of every TLB (vpn low 7 bits equal)
    for (int k = 0; k < 12; k++) begin
      vpn_t v;
      v = mk(3, 0, 5) + 27'(128 * k);
      add(v, 44'h2_0000 + 44'(k), 0, RWX);
      for (int r = 0; r < 3; r++) pool.push_back(v);
    end
    // 48 pages in few last-level tables
    for (int k = 0; k < 48; k++) begin
      vpn_t v;
      v = mk(6, k % 4, 16 + k);
      add(v, 44'h3_0000 + 44'(k * 3), 0, RWX);
      pool.push_back(v);
    end
    // superpages: 2 MiB at (40,2), 1 GiB at (41)
    add(mk(40, 2, 0), 44'h5_0000 + 44'(1 << 9), 1, RWX);
    add(mk(41, 0, 0), 44'h40000 * 3, 2, RWX);
    for (int k = 0; k < 6; k++) begin
      pool.push_back(mk(40, 2, 7 * k));
      pool.push_back(mk(41, 3 * k, 5 * k));
    end
    // read-only and unmapped pages
    add(mk(7, 7, 7), 44'h7_7777, 0, RO);
    pool.push_back(mk(7, 7, 7));
    pool.push_back(mk(8, 1, 1));
    remap_vpn = mk(6, 1, 17);

    repeat (4) @(negedge clk);
    rst_n = 1;

    run_phase(600);
    // re-map one page and flush it
    add(remap_vpn, 44'h9_9999, 0, RWX);
    do_sfence(1, remap_vpn);
    begin
      ppn_t p; logic pf;
      dtlb_xlate(remap_vpn, ACC_LOAD);
      itlb_xlate(remap_vpn);
      expect_of(remap_vpn, ACC_LOAD, p, pf);
      check("re-mapped frame used", p, 44'h9_9999);
      n_remap_seen++;
    end
    run_phase(300);
    do_sfence(0, '0);
    run_phase(300);
    // bare mode
    @(negedge clk);
    satp_sv39 = 0;
    run_phase(20);
    satp_sv39 = 1;

    $display("itlb hit %0d miss %0d, dtlb hit %0d miss %0d, l2 hit %0d miss %0d, ptw cache hit %0d",
             n_itlb_hit, n_itlb_miss, n_dtlb_hit, n_dtlb_miss, n_l2_hit, n_l2_miss, n_ptwc_hit);
    $display("contention %0d, page faults %0d, superpage %0d, bare %0d, L1 evictions %0d, L2 evictions %0d, stores %0d",
             n_contention, n_pf, n_superpage, n_bare, n_l1_evict, n_l2_evict, n_store);
    check("itlb hit happened", n_itlb_hit > 0, 1);
    check("itlb miss happened", n_itlb_miss > 0, 1);
    check("dtlb hit happened", n_dtlb_hit > 0, 1);
    check("dtlb miss happened", n_dtlb_miss > 0, 1);
    check("l2 hit happened", n_l2_hit > 0, 1);
    check("l2 miss happened", n_l2_miss > 0, 1);
    check("ptw cache hit happened", n_ptwc_hit > 0, 1);
    check("arbiter contention happened", n_contention > 0, 1);
    check("page fault happened", n_pf > 0, 1);
    check("superpage happened", n_superpage > 0, 1);
    check("bare mode happened", n_bare > 0, 1);
    check("single sfence happened", n_sfence_one > 0, 1);
    check("full sfence happened", n_sfence_all > 0, 1);
    check("L1 eviction happened", n_l1_evict > 0, 1);
    check("L2 eviction happened", n_l2_evict > 0, 1);
    check("store happened", n_store > 0, 1);
    check("remap happened", n_remap_seen, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
