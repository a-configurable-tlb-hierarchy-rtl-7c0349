// tlb_hierarchy: configurable two-level TLB hierarchy of an Sv39 RISC-V MMU.
//
// The instruction L1 TLB and the data L1 TLB (both tlb_l1, held in
// flip-flops) answer the core's fetch and load/store translations. On a miss
// each asks for the page through a round-robin arbiter (rr_arbiter) that
// lets one of them at a time into the page table walker (ptw). The walker
// first looks in the shared L2 TLB (tlb_l2, in synchronous memory), then
// walks the page table in memory, skipping reads the PTW cache (ptw_cache)
// can answer. Its answer goes back to the L1 TLB whose request it was, which
// keeps it and answers the core.
//
// Sizes and associativities are parameters; the defaults are the largest
// configuration evaluated for this design (data TLB 128 entries 8-way,
// instruction TLB 64 entries 8-way, L2 TLB 1024 entries 8-way with random
// replacement, pseudo-LRU in the L1 TLBs). L2_ENTRIES = 0 removes the L2 TLB.
//
// Interface: each L1 TLB has a valid/ready request port and answers one
// cycle after a hit, or after the walk following a `miss` pulse (see
// tlb_l1). The core supplies its privilege level, SUM, the satp mode (Sv39
// on or off) and root page number, and sfence.vma. The walker reads page
// table entries through mem_req/mem_resp. The ev_* outputs pulse once per
// event for performance counters.
module tlb_hierarchy
  import tlb_pkg::*;
#(
  parameter int unsigned ITLB_ENTRIES = 64,
  parameter int unsigned ITLB_WAYS    = 8,
  parameter int unsigned DTLB_ENTRIES = 128,
  parameter int unsigned DTLB_WAYS    = 8,
  parameter repl_t       L1_REPL      = REPL_PLRU,
  parameter int unsigned L2_ENTRIES   = 1024,
  parameter int unsigned L2_WAYS      = 8,
  parameter repl_t       L2_REPL      = REPL_RANDOM,
  parameter int unsigned PTWC_ENTRIES = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  // instruction fetch translation
  input  logic    itlb_req_valid,
  output logic    itlb_req_ready,
  input  vaddr_t  itlb_req_vaddr,
  output logic    itlb_resp_valid,
  output paddr_t  itlb_resp_paddr,
  output logic    itlb_resp_pf,
  // load/store translation
  input  logic    dtlb_req_valid,
  output logic    dtlb_req_ready,
  input  vaddr_t  dtlb_req_vaddr,
  input  access_t dtlb_req_acc,
  output logic    dtlb_resp_valid,
  output paddr_t  dtlb_resp_paddr,
  output logic    dtlb_resp_pf,
  // processor state
  input  priv_t   priv,
  input  logic    sum,
  input  logic    satp_sv39,
  input  ppn_t    satp_ppn,
  input  sfence_t sfence,
  // page table memory
  output logic    mem_req_valid,
  input  logic    mem_req_ready,
  output paddr_t  mem_req_addr,
  input  logic    mem_resp_valid,
  input  pte_t    mem_resp_data,
  // events
  output logic    ev_itlb_miss,
  output logic    ev_dtlb_miss,
  output logic    ev_l2_hit,
  output logic    ev_l2_miss,
  output logic    ev_ptwc_hit,
  output logic    ev_mem_read
);

  localparam int unsigned N_REQ = 2;  // 0: instruction TLB, 1: data TLB

  logic [N_REQ-1:0]          l1_ptw_valid, l1_ptw_ready;
  ptw_req_t [N_REQ-1:0]      l1_ptw_req;
  logic                      arb_valid, arb_ready;
  ptw_req_t                  arb_req;
  logic                      arb_id;
  logic                      ptw_resp_valid;
  ptw_resp_t                 ptw_resp;
  logic                      ptw_resp_id;

  tlb_l1 #(.ENTRIES(ITLB_ENTRIES), .WAYS(ITLB_WAYS), .REPL(L1_REPL), .IS_ITLB(1'b1)) u_itlb (
    .clk, .rst_n,
    .req_valid      (itlb_req_valid),
    .req_ready      (itlb_req_ready),
    .req_vaddr      (itlb_req_vaddr),
    .req_acc        (ACC_FETCH),
    .priv, .sum, .satp_sv39, .sfence,
    .resp_valid     (itlb_resp_valid),
    .resp_paddr     (itlb_resp_paddr),
    .resp_pf        (itlb_resp_pf),
    .miss           (ev_itlb_miss),
    .ptw_req_valid  (l1_ptw_valid[0]),
    .ptw_req_ready  (l1_ptw_ready[0]),
    .ptw_req        (l1_ptw_req[0]),
    .ptw_resp_valid (ptw_resp_valid && ptw_resp_id == 1'b0),
    .ptw_resp       (ptw_resp)
  );

  tlb_l1 #(.ENTRIES(DTLB_ENTRIES), .WAYS(DTLB_WAYS), .REPL(L1_REPL), .IS_ITLB(1'b0)) u_dtlb (
    .clk, .rst_n,
    .req_valid      (dtlb_req_valid),
    .req_ready      (dtlb_req_ready),
    .req_vaddr      (dtlb_req_vaddr),
    .req_acc        (dtlb_req_acc),
    .priv, .sum, .satp_sv39, .sfence,
    .resp_valid     (dtlb_resp_valid),
    .resp_paddr     (dtlb_resp_paddr),
    .resp_pf        (dtlb_resp_pf),
    .miss           (ev_dtlb_miss),
    .ptw_req_valid  (l1_ptw_valid[1]),
    .ptw_req_ready  (l1_ptw_ready[1]),
    .ptw_req        (l1_ptw_req[1]),
    .ptw_resp_valid (ptw_resp_valid && ptw_resp_id == 1'b1),
    .ptw_resp       (ptw_resp)
  );

  rr_arbiter #(.N(N_REQ), .DATA_W($bits(ptw_req_t))) u_arb (
    .clk, .rst_n,
    .in_valid  (l1_ptw_valid),
    .in_ready  (l1_ptw_ready),
    .in_data   (l1_ptw_req),
    .out_valid (arb_valid),
    .out_ready (arb_ready),
    .out_data  (arb_req),
    .out_id    (arb_id)
  );

  ptw #(
    .N_REQ(N_REQ), .L2_ENTRIES(L2_ENTRIES), .L2_WAYS(L2_WAYS),
    .L2_REPL(L2_REPL), .PTWC_ENTRIES(PTWC_ENTRIES)
  ) u_ptw (
    .clk, .rst_n,
    .req_valid      (arb_valid),
    .req_ready      (arb_ready),
    .req            (arb_req),
    .req_id         (arb_id),
    .resp_valid     (ptw_resp_valid),
    .resp           (ptw_resp),
    .resp_id        (ptw_resp_id),
    .satp_ppn, .sfence,
    .mem_req_valid, .mem_req_ready, .mem_req_addr,
    .mem_resp_valid, .mem_resp_data,
    .ev_l2_hit, .ev_l2_miss, .ev_ptwc_hit, .ev_mem_read
  );

endmodule
