// tb_cfg_run: one TLB hierarchy configuration driven with a fixed page stream.
//
// Used by tb_tlb_configs. It holds a tlb_hierarchy built with the given
// sizes, a behavioural page-table memory, and a driver that, once `start` is
// high, translates 16 pages in turn, PASSES times over, through the data TLB
// (loads) and the instruction TLB (fetches), comparing every answer with the
// frame the page was mapped to. The pages are base + 1024*a + 16*b for
// a, b in 0..3: all 16 fall in one set of an 8-way L1 TLB with 16 sets
// (so the L1 TLB keeps missing), in 4 sets of 4 pages of an 8-way 1024-entry
// L2 TLB and of a 4-way one (so they fit), and in 4 sets of 4 pages of a
// direct-mapped one (so they conflict). It reports checks, failures and
// event counts and raises `done` at the end.
module tb_cfg_run
  import tlb_pkg::*;
#(
  parameter int unsigned ITLB_ENTRIES = 64,
  parameter int unsigned ITLB_WAYS    = 8,
  parameter int unsigned DTLB_ENTRIES = 128,
  parameter int unsigned DTLB_WAYS    = 8,
  parameter int unsigned L2_ENTRIES   = 1024,
  parameter int unsigned L2_WAYS      = 8,
  parameter repl_t       L1_REPL      = REPL_PLRU,
  parameter repl_t       L2_REPL      = REPL_RANDOM,
  parameter int          PASSES       = 20
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   l2_hits,
  output int   l2_misses,
  output int   l1_misses,
  output int   walks
);

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

  tlb_hierarchy #(
    .ITLB_ENTRIES(ITLB_ENTRIES), .ITLB_WAYS(ITLB_WAYS),
    .DTLB_ENTRIES(DTLB_ENTRIES), .DTLB_WAYS(DTLB_WAYS),
    .L2_ENTRIES(L2_ENTRIES), .L2_WAYS(L2_WAYS),
    .L1_REPL(L1_REPL), .L2_REPL(L2_REPL)
  ) dut (.*);

  tb_pt_mem #(.MAX_LAT(3)) u_mem (
    .clk, .rst_n,
    .req_valid (mem_req_valid), .req_ready (mem_req_ready), .req_addr (mem_req_addr),
    .resp_valid (mem_resp_valid), .resp_data (mem_resp_data));

  localparam vpn_t BASE = 27'h0_4_0005;

  function automatic vpn_t page(int i);
    return BASE + 27'(1024 * (i / 4)) + 27'(16 * (i % 4));
  endfunction

  function automatic ppn_t frame(int i);
    return 44'h7_0000 + 44'(i * 5);
  endfunction

  initial begin
    checks = 0; failures = 0; l2_hits = 0; l2_misses = 0; l1_misses = 0; walks = 0;
    done = 0;
    for (int i = 0; i < 16; i++) u_mem.map(satp_ppn, page(i), frame(i), 0, 8'b1100_1111);
  end

  always_ff @(posedge clk) if (rst_n) begin
    if (ev_l2_hit) l2_hits <= l2_hits + 1;
    if (ev_l2_miss) l2_misses <= l2_misses + 1;
    if (ev_itlb_miss || ev_dtlb_miss) l1_misses <= l1_misses + 1;
    if (ev_mem_read) walks <= walks + 1;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %m %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    logic [11:0] off;
    wait (start);
    for (int p = 0; p < PASSES; p++) begin
      for (int i = 0; i < 16; i++) begin
        off = 12'($urandom);
        @(negedge clk);
        while (!dtlb_req_ready) @(negedge clk);
        dtlb_req_valid = 1; dtlb_req_vaddr = {page(i), off};
        @(negedge clk);
        dtlb_req_valid = 0;
        while (!dtlb_resp_valid) @(negedge clk);
        check("data translation", dtlb_resp_paddr, {frame(i), off});
        check("data fault", dtlb_resp_pf, 0);
        while (!itlb_req_ready) @(negedge clk);
        itlb_req_valid = 1; itlb_req_vaddr = {page(15 - i), off};
        @(negedge clk);
        itlb_req_valid = 0;
        while (!itlb_resp_valid) @(negedge clk);
        check("fetch translation", itlb_resp_paddr, {frame(15 - i), off});
      end
    end
    done = 1;
  end

endmodule
