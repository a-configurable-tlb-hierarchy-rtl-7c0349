// tb_ptw: self-checking test of the page table walker with its L2 TLB and
// PTW cache.
//
// The walker (16-entry 4-way L2 TLB, 4-entry PTW cache) reads page tables
// that the testbench builds in a behavioural memory (tb_pt_mem) with random
// latency and back-pressure. Expected answers and memory-read counts are
// worked out from the page tables:
//   * a first 4 KiB walk reads 3 entries; a neighbour page in the same
//     last-level table then reads 1 (the two upper entries come from the PTW
//     cache); a repeated page hits in the L2 TLB and reads none;
//   * 2 MiB and 1 GiB leaves give the 4 KiB piece of the superpage;
//   * a misaligned superpage, an invalid entry, W without R and a pointer at
//     the last level are faults; faults are not put in the L2 TLB;
//   * an sfence during a walk keeps its result out of the L2 TLB and empties
//     the PTW cache;
//   * the requester number comes back with the answer.
module tb_ptw;
  import tlb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready;
  ptw_req_t req = '0;
  logic req_id = 0;
  logic resp_valid;
  ptw_resp_t resp;
  logic resp_id;
  ppn_t satp_ppn = 44'h100;
  sfence_t sfence = '0;
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  paddr_t mem_req_addr;
  pte_t mem_resp_data;
  logic ev_l2_hit, ev_l2_miss, ev_ptwc_hit, ev_mem_read;
  int checks = 0, failures = 0;
  int n_l2_hit = 0, n_ptwc_hit = 0;

  ptw #(.N_REQ(2), .L2_ENTRIES(16), .L2_WAYS(4), .PTWC_ENTRIES(4)) dut (.*);

  tb_pt_mem #(.MAX_LAT(4)) u_mem (
    .clk, .rst_n,
    .req_valid (mem_req_valid), .req_ready (mem_req_ready), .req_addr (mem_req_addr),
    .resp_valid (mem_resp_valid), .resp_data (mem_resp_data));

  always #5 clk = ~clk;

  always_ff @(posedge clk) if (rst_n) begin
    if (ev_l2_hit) n_l2_hit <= n_l2_hit + 1;
    if (ev_ptwc_hit) n_ptwc_hit <= n_ptwc_hit + 1;
  end

  localparam logic [7:0] RWX = 8'b1100_1111;  // D A - - X W R V
  localparam logic [7:0] WO  = 8'b1100_0101;  // W without R

  function automatic vpn_t mk(int l2, int l1, int l0);
    return {9'(l2), 9'(l1), 9'(l0)};
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  int last_lat;

  task automatic walk(input vpn_t v, output ptw_resp_t r, output int reads);
    int r0;
    logic id;
    r0 = u_mem.reads;
    id = 1'($urandom_range(1));
    @(negedge clk);
    req_valid = 1; req.vpn = v; req_id = id;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    last_lat = 1;
    while (!resp_valid) begin
      @(negedge clk);
      last_lat++;
    end
    r = resp;
    check("requester id returned", resp_id, id);
    reads = u_mem.reads - r0;
    @(negedge clk);
  endtask

  task automatic expect_leaf(string what, vpn_t v, ppn_t ppn, int level, int reads_exp);
    ptw_resp_t r; int reads;
    walk(v, r, reads);
    check({what, " pf"}, r.pf, 0);
    check({what, " ppn"}, r.ppn, ppn);
    if (reads_exp != 0) check({what, " level"}, r.level, level);
    check({what, " perm"}, r.perm, perm_t'(6'b110111));
    if (reads_exp >= 0) check({what, " memory reads"}, reads, reads_exp);
  endtask

  task automatic expect_fault(string what, vpn_t v);
    ptw_resp_t r; int reads;
    walk(v, r, reads);
    check({what, " pf"}, r.pf, 1);
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h0, p0;
    ptw_resp_t r; int reads;
    u_mem.map(44'h100, mk(1, 2, 3), 44'h5_0003, 0, RWX);
    u_mem.map(44'h100, mk(1, 2, 4), 44'h5_0004, 0, RWX);
    u_mem.map(44'h100, mk(5, 0, 16), 44'h6_0010, 0, RWX);
    u_mem.map(44'h100, mk(7, 8, 0), 44'h1_2000, 1, RWX);     // 2 MiB
    u_mem.map(44'h100, mk(9, 0, 0), 44'h4_0000, 2, RWX);     // 1 GiB
    u_mem.map(44'h100, mk(10, 1, 0), 44'h1_2345, 1, RWX);    // misaligned 2 MiB
    u_mem.map(44'h100, mk(1, 2, 32), 44'h0, 0, 8'h01);       // pointer at level 0
    u_mem.map(44'h100, mk(1, 2, 33), 44'h7_0000, 0, WO);     // W without R
    repeat (3) @(negedge clk);
    rst_n = 1;

    h0 = n_l2_hit; p0 = n_ptwc_hit;
    expect_leaf("first 4K walk", mk(1, 2, 3), 44'h5_0003, 0, 3);
    expect_leaf("neighbour page", mk(1, 2, 4), 44'h5_0004, 0, 1);
    check("two PTW cache hits", n_ptwc_hit - p0, 2);
    expect_leaf("L2 TLB hit", mk(1, 2, 3), 44'h5_0003, 0, 0);
    check("L2 hit answered 2 cycles after the request is taken", last_lat, 2);
    check("one L2 hit", n_l2_hit - h0, 1);
    expect_leaf("other table", mk(5, 0, 16), 44'h6_0010, 0, -1);
    expect_leaf("2 MiB piece", mk(7, 8, 9'h55), 44'h1_2055, 1, -1);
    expect_leaf("1 GiB piece", mk(9, 9'h33, 9'h44), {26'h1, 9'h33, 9'h44}, 2, -1);
    // superpage pieces are kept in the L2 TLB
    h0 = n_l2_hit;
    expect_leaf("2 MiB piece again", mk(7, 8, 9'h55), 44'h1_2055, 1, 0);
    check("superpage piece hits L2", n_l2_hit - h0, 1);

    expect_fault("misaligned superpage", mk(10, 1, 5));
    expect_fault("invalid top entry", mk(11, 0, 0));
    expect_fault("invalid last entry", mk(1, 2, 100));
    expect_fault("pointer at level 0", mk(1, 2, 32));
    expect_fault("W without R", mk(1, 2, 33));
    h0 = n_l2_hit;
    expect_fault("fault not cached", mk(1, 2, 33));
    check("fault was not an L2 hit", n_l2_hit - h0, 0);

    // sfence during a walk
    fork
      walk(mk(5, 0, 17), r, reads);
      begin
        @(negedge clk);
        @(negedge clk);
        sfence = '{valid: 1, has_addr: 0, vpn: '0};
        @(negedge clk);
        sfence = '0;
      end
    join
    check("walk during sfence answered (unmapped page)", r.pf, 1);
    expect_leaf("after sfence: full walk", mk(1, 2, 4), 44'h5_0004, 0, 3);
    u_mem.map(44'h100, mk(5, 0, 18), 44'h6_0012, 0, RWX);
    fork
      walk(mk(5, 0, 18), r, reads);
      begin
        @(negedge clk);
        @(negedge clk);
        @(negedge clk);
        sfence = '{valid: 1, has_addr: 1, vpn: mk(1, 1, 1)};
        @(negedge clk);
        sfence = '0;
      end
    join
    check("killed walk still answers", r.ppn, 44'h6_0012);
    h0 = n_l2_hit;
    expect_leaf("killed walk not in L2", mk(5, 0, 18), 44'h6_0012, 0, -1);
    check("no L2 hit after killed walk", n_l2_hit - h0, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
