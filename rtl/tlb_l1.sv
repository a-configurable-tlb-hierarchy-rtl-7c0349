// tlb_l1: configurable set-associative L1 instruction or data TLB.
//
// One template serves both L1 TLBs; IS_ITLB selects the instruction variant,
// which treats every request as a fetch. ENTRIES translations are held in
// flip-flops as SETS = ENTRIES/WAYS sets of WAYS ways, so WAYS = 1 gives a
// direct-mapped and WAYS = ENTRIES a fully-associative TLB. The virtual page
// number is split into an index (its low log2(SETS) bits) that selects the
// set and a tag (the remaining bits) that is compared with every way of that
// set in parallel.
//
// Protocol and timing:
//   * A request is accepted when req_valid && req_ready. One cycle later the
//     TLB answers: resp_valid with the physical address and page-fault flag on
//     a hit (or when translation is off: satp_sv39 low or machine mode), or a
//     one-cycle `miss` pulse otherwise.
//   * After a miss req_ready stays low; the TLB asks the page table walker
//     (ptw_req valid/ready) and waits for ptw_resp. The answer is written into
//     the set at the first invalid way, or at the way chosen by the
//     replacement policy (REPL: pseudo-LRU per set, or random), and the
//     request is answered with resp_valid one cycle after ptw_resp.
//   * sfence.valid with has_addr clears the valid bit of the matching entry;
//     without has_addr it clears every entry. A flush during a walk stops the
//     walk's answer from being stored (it is still returned to the requester).
//   * On a hit the permission bits are checked against the access kind, the
//     privilege level and SUM; a failed check, or a walk ending in a fault,
//     answers with resp_pf.
// Set-associative lookup, first-free-then-policy refill and single-entry
// flush follow the document; the handshake, the permission check details,
// and storing superpages as their 4 KiB piece are this design's choices.
module tlb_l1
  import tlb_pkg::*;
#(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned WAYS    = 8,
  parameter repl_t       REPL    = REPL_PLRU,
  parameter bit          IS_ITLB = 1'b0
) (
  input  logic      clk,
  input  logic      rst_n,
  // translation request
  input  logic      req_valid,
  output logic      req_ready,
  input  vaddr_t    req_vaddr,
  input  access_t   req_acc,
  // processor state
  input  priv_t     priv,
  input  logic      sum,
  input  logic      satp_sv39,
  input  sfence_t   sfence,
  // answer
  output logic      resp_valid,
  output paddr_t    resp_paddr,
  output logic      resp_pf,
  output logic      miss,
  // page table walker port
  output logic      ptw_req_valid,
  input  logic      ptw_req_ready,
  output ptw_req_t  ptw_req,
  input  logic      ptw_resp_valid,
  input  ptw_resp_t ptw_resp
);

  localparam int unsigned SETS   = ENTRIES / WAYS;
  localparam int unsigned IDX_W  = (SETS > 1) ? $clog2(SETS) : 0;
  localparam int unsigned SET_W  = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TAG_W  = VPN_BITS - IDX_W;

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    ppn_t             ppn;
    perm_t            perm;
  } entry_t;

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT} state_t;

  function automatic logic [SET_W-1:0] set_of(vpn_t v);
    return (SETS > 1) ? v[SET_W-1:0] : '0;
  endfunction

  function automatic logic [TAG_W-1:0] tag_of(vpn_t v);
    return v[VPN_BITS-1:IDX_W];
  endfunction

  logic   valid_q [SETS][WAYS];
  entry_t entry_q [SETS][WAYS];

  state_t  state_q;
  vpn_t    vpn_q;
  logic [PGIDX_BITS-1:0] off_q;
  access_t acc_q;
  logic    killed_q;

  logic    resp_valid_q, resp_pf_q, miss_q;
  paddr_t  resp_paddr_q;

  // ---------------- lookup (request cycle) ----------------
  vpn_t             lk_vpn;
  logic [SET_W-1:0] lk_set;
  logic             lk_hit;
  logic [WAY_W-1:0] lk_way;
  entry_t           lk_entry;
  access_t          lk_acc;
  logic             translate;

  assign lk_vpn    = req_vaddr[VADDR_BITS-1:PGIDX_BITS];
  assign lk_set    = set_of(lk_vpn);
  assign lk_acc    = IS_ITLB ? ACC_FETCH : req_acc;
  assign translate = satp_sv39 && (priv != PRV_M);
  assign req_ready = (state_q == S_IDLE);

  always_comb begin
    lk_hit   = 1'b0;
    lk_way   = '0;
    lk_entry = entry_q[lk_set][0];
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[lk_set][w] && entry_q[lk_set][w].tag == tag_of(lk_vpn)) begin
        lk_hit   = 1'b1;
        lk_way   = WAY_W'(w);
        lk_entry = entry_q[lk_set][w];
      end
    end
  end

  // ---------------- refill victim ----------------
  logic [SET_W-1:0] rf_set;
  logic             rf_free;
  logic [WAY_W-1:0] rf_free_way, rf_policy_way, rf_way;
  logic             refill, accept;
  logic             repl_touch;
  logic [SET_W-1:0] repl_touch_set;
  logic [WAY_W-1:0] repl_touch_way;

  assign rf_set = set_of(vpn_q);

  always_comb begin
    rf_free     = 1'b0;
    rf_free_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!valid_q[rf_set][w]) begin
        rf_free     = 1'b1;
        rf_free_way = WAY_W'(w);
      end
    end
  end

  assign rf_way = rf_free ? rf_free_way : rf_policy_way;
  assign accept = req_valid && req_ready;
  assign refill = (state_q == S_WAIT) && ptw_resp_valid && !ptw_resp.pf &&
                  !killed_q && !sfence.valid;

  // A hit or a refill makes the way the most recently used one.
  assign repl_touch     = (accept && translate && lk_hit) || refill;
  assign repl_touch_set = refill ? rf_set : lk_set;
  assign repl_touch_way = refill ? rf_way : lk_way;

  generate
    if (REPL == REPL_PLRU) begin : g_plru
      tlb_plru #(.SETS(SETS), .WAYS(WAYS)) u_repl (
        .clk, .rst_n,
        .touch_valid (repl_touch),
        .touch_set   (repl_touch_set),
        .touch_way   (repl_touch_way),
        .victim_set  (rf_set),
        .victim_way  (rf_policy_way)
      );
    end else begin : g_rand
      tlb_random_repl #(.WAYS(WAYS)) u_repl (
        .clk, .rst_n,
        .step       (refill && !rf_free),
        .victim_way (rf_policy_way)
      );
    end
  endgenerate

  // ---------------- storage ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) valid_q[s][w] <= 1'b0;
    end else if (sfence.valid) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++)
          if (!sfence.has_addr ||
              (s == int'(set_of(sfence.vpn)) && entry_q[s][w].tag == tag_of(sfence.vpn)))
            valid_q[s][w] <= 1'b0;
    end else if (refill) begin
      valid_q[rf_set][rf_way] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (refill)
      entry_q[rf_set][rf_way] <= '{tag: tag_of(vpn_q), ppn: ptw_resp.ppn, perm: ptw_resp.perm};
  end

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      vpn_q        <= '0;
      off_q        <= '0;
      acc_q        <= ACC_LOAD;
      killed_q     <= 1'b0;
      resp_valid_q <= 1'b0;
      resp_pf_q    <= 1'b0;
      resp_paddr_q <= '0;
      miss_q       <= 1'b0;
    end else begin
      resp_valid_q <= 1'b0;
      miss_q       <= 1'b0;
      if (sfence.valid && state_q != S_IDLE) killed_q <= 1'b1;
      unique case (state_q)
        S_IDLE: if (accept) begin
          vpn_q <= lk_vpn;
          off_q <= req_vaddr[PGIDX_BITS-1:0];
          acc_q <= lk_acc;
          if (!translate) begin
            resp_valid_q <= 1'b1;
            resp_pf_q    <= 1'b0;
            resp_paddr_q <= PADDR_BITS'(req_vaddr);
          end else if (lk_hit) begin
            resp_valid_q <= 1'b1;
            resp_pf_q    <= perm_fault(lk_entry.perm, lk_acc, priv, sum);
            resp_paddr_q <= {lk_entry.ppn, req_vaddr[PGIDX_BITS-1:0]};
          end else begin
            miss_q   <= 1'b1;
            killed_q <= 1'b0;
            state_q  <= S_REQ;
          end
        end
        S_REQ: if (ptw_req_ready) state_q <= S_WAIT;
        S_WAIT: if (ptw_resp_valid) begin
          resp_valid_q <= 1'b1;
          resp_pf_q    <= ptw_resp.pf | perm_fault(ptw_resp.perm, acc_q, priv, sum);
          resp_paddr_q <= {ptw_resp.ppn, off_q};
          state_q      <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign ptw_req_valid = (state_q == S_REQ);
  assign ptw_req.vpn   = vpn_q;
  assign resp_valid    = resp_valid_q;
  assign resp_paddr    = resp_paddr_q;
  assign resp_pf       = resp_pf_q;
  assign miss          = miss_q;

  // The walker answers only a request it has taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   ptw_resp_valid |-> state_q == S_WAIT)
    else $error("tlb_l1: walker answer without an outstanding request");

endmodule
