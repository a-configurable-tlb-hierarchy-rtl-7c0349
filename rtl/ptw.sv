// ptw: Sv39 page table walker with the shared L2 TLB and the PTW cache.
//
// The walker takes one translation request at a time from the arbiter (the
// requester's number comes along in req_id and is returned in resp_id).
//   1. It looks the page up in the shared L2 TLB (tlb_l2); the answer comes a
//      cycle later. A hit ends the request.
//   2. On an L2 miss it walks the 3-level Sv39 radix tree from the root page
//      number in satp_ppn. For each level it forms the address of the entry
//      (table page number * 4096 + 8 * the level's 9-bit VPN field). If the
//      PTW cache holds that entry (a non-leaf entry read before) it descends
//      without a memory read; otherwise it reads the 64-bit entry through the
//      memory port (mem_req valid/ready, then mem_resp_valid with the data).
//   3. An entry with V clear, or W set without R, is a fault. An entry with R
//      or X set is the leaf: a superpage leaf whose low page-number bits are
//      not zero is a fault; otherwise the 4 KiB piece of the page that holds
//      the address is computed, written into the L2 TLB and returned. Any
//      other entry points to the next table: it is put in the PTW cache and
//      the walk goes down one level; below level 0 it is a fault.
//   4. The answer (resp_valid, one cycle) carries the frame number, the
//      permission bits, the leaf's level and the fault flag.
// An sfence during a request stops its result from entering the L2 TLB.
// With L2_ENTRIES = 0 the L2 TLB is left out and every request walks.
// The ev_* outputs pulse once per event and feed performance counters.
// The L2 TLB inside the walker, the arbitration in front of it and the PTW
// cache follow the document; the walk's details are those of Sv39; the ports
// and the cutting of superpages into 4 KiB pieces are this design's.
module ptw
  import tlb_pkg::*;
#(
  parameter int unsigned N_REQ        = 2,
  parameter int unsigned L2_ENTRIES   = 1024,
  parameter int unsigned L2_WAYS      = 8,
  parameter repl_t       L2_REPL      = REPL_RANDOM,
  parameter int unsigned PTWC_ENTRIES = 8,
  localparam int unsigned ID_W = (N_REQ > 1) ? $clog2(N_REQ) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // request from the arbiter
  input  logic            req_valid,
  output logic            req_ready,
  input  ptw_req_t        req,
  input  logic [ID_W-1:0] req_id,
  // answer
  output logic            resp_valid,
  output ptw_resp_t       resp,
  output logic [ID_W-1:0] resp_id,
  // processor state
  input  ppn_t            satp_ppn,
  input  sfence_t         sfence,
  // memory port for page table entries
  output logic            mem_req_valid,
  input  logic            mem_req_ready,
  output paddr_t          mem_req_addr,
  input  logic            mem_resp_valid,
  input  pte_t            mem_resp_data,
  // events
  output logic            ev_l2_hit,
  output logic            ev_l2_miss,
  output logic            ev_ptwc_hit,
  output logic            ev_mem_read
);

  localparam bit USE_L2 = (L2_ENTRIES > 0);

  typedef enum logic [2:0] {S_IDLE, S_L2, S_WALK, S_MEM, S_RESP} state_t;

  state_t          state_q;
  vpn_t            vpn_q;
  logic [ID_W-1:0] id_q;
  logic [1:0]      level_q;
  ppn_t            base_q;
  logic            killed_q;
  ptw_resp_t       resp_q;

  // address of the entry read at the current level
  logic [VPN_LVL_BITS-1:0] vpn_field;
  paddr_t                  pte_addr;
  always_comb begin
    unique case (level_q)
      2'd2:    vpn_field = vpn_q[3*VPN_LVL_BITS-1:2*VPN_LVL_BITS];
      2'd1:    vpn_field = vpn_q[2*VPN_LVL_BITS-1:VPN_LVL_BITS];
      default: vpn_field = vpn_q[VPN_LVL_BITS-1:0];
    endcase
    pte_addr = {base_q, vpn_field, 3'b000};
  end

  // ---------------- L2 TLB ----------------
  logic  l2_lk_valid, l2_resp_valid, l2_hit;
  ppn_t  l2_ppn;
  perm_t l2_perm;
  logic  l2_rf_valid;
  ppn_t  leaf_ppn;
  perm_t leaf_perm;

  assign l2_lk_valid = (state_q == S_IDLE) && req_valid;

  generate
    if (USE_L2) begin : g_l2
      tlb_l2 #(.ENTRIES(L2_ENTRIES), .WAYS(L2_WAYS), .REPL(L2_REPL)) u_l2 (
        .clk, .rst_n,
        .lk_valid      (l2_lk_valid),
        .lk_vpn        (req.vpn),
        .lk_resp_valid (l2_resp_valid),
        .lk_hit        (l2_hit),
        .lk_ppn        (l2_ppn),
        .lk_perm       (l2_perm),
        .rf_valid      (l2_rf_valid),
        .rf_vpn        (vpn_q),
        .rf_ppn        (leaf_ppn),
        .rf_perm       (leaf_perm),
        .sfence        (sfence)
      );
    end else begin : g_no_l2
      assign l2_resp_valid = 1'b0;
      assign l2_hit        = 1'b0;
      assign l2_ppn        = '0;
      assign l2_perm       = '0;
    end
  endgenerate

  // ---------------- PTW cache ----------------
  logic ptwc_lk, ptwc_hit, ptwc_ins;
  ppn_t ptwc_ppn;

  assign ptwc_lk = (state_q == S_WALK);

  ptw_cache #(.ENTRIES(PTWC_ENTRIES)) u_ptwc (
    .clk, .rst_n,
    .lk_valid  (ptwc_lk),
    .lk_addr   (pte_addr),
    .lk_hit    (ptwc_hit),
    .lk_ppn    (ptwc_ppn),
    .ins_valid (ptwc_ins),
    .ins_addr  (pte_addr),
    .ins_ppn   (mem_resp_data.ppn),
    .sfence    (sfence)
  );

  // ---------------- entry decode ----------------
  pte_t pte;
  logic pte_bad, pte_leaf, pte_misaligned;
  assign pte       = mem_resp_data;
  assign pte_bad   = !pte.v || (!pte.r && pte.w);
  assign pte_leaf  = pte.r || pte.x;
  assign leaf_perm = pte_perm(pte);

  always_comb begin
    unique case (level_q)
      2'd2: begin
        pte_misaligned = |pte.ppn[2*VPN_LVL_BITS-1:0];
        leaf_ppn = {pte.ppn[PPN_BITS-1:2*VPN_LVL_BITS], vpn_q[2*VPN_LVL_BITS-1:0]};
      end
      2'd1: begin
        pte_misaligned = |pte.ppn[VPN_LVL_BITS-1:0];
        leaf_ppn = {pte.ppn[PPN_BITS-1:VPN_LVL_BITS], vpn_q[VPN_LVL_BITS-1:0]};
      end
      default: begin
        pte_misaligned = 1'b0;
        leaf_ppn = pte.ppn;
      end
    endcase
  end

  logic mem_done, leaf_ok, fault;
  assign mem_done    = (state_q == S_MEM) && mem_resp_valid;
  assign fault       = pte_bad || (pte_leaf && pte_misaligned) || (!pte_leaf && level_q == 2'd0);
  assign leaf_ok     = mem_done && !fault && pte_leaf;
  assign l2_rf_valid = USE_L2 && leaf_ok && !killed_q && !sfence.valid;
  assign ptwc_ins    = mem_done && !fault && !pte_leaf;

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      vpn_q    <= '0;
      id_q     <= '0;
      level_q  <= 2'd2;
      base_q   <= '0;
      killed_q <= 1'b0;
      resp_q   <= '0;
    end else begin
      if (sfence.valid && state_q != S_IDLE) killed_q <= 1'b1;
      unique case (state_q)
        S_IDLE: if (req_valid) begin
          vpn_q    <= req.vpn;
          id_q     <= req_id;
          killed_q <= 1'b0;
          level_q  <= 2'd2;
          base_q   <= satp_ppn;
          state_q  <= USE_L2 ? S_L2 : S_WALK;
        end
        S_L2: if (l2_resp_valid) begin
          if (l2_hit) begin
            resp_q  <= '{pf: 1'b0, ppn: l2_ppn, perm: l2_perm, level: 2'd0};
            state_q <= S_RESP;
          end else begin
            state_q <= S_WALK;
          end
        end
        S_WALK: begin
          if (ptwc_hit) begin
            base_q  <= ptwc_ppn;
            level_q <= level_q - 2'd1;
          end else if (mem_req_ready) begin
            state_q <= S_MEM;
          end
        end
        S_MEM: if (mem_resp_valid) begin
          if (fault) begin
            resp_q  <= '{pf: 1'b1, ppn: '0, perm: '0, level: level_q};
            state_q <= S_RESP;
          end else if (pte_leaf) begin
            resp_q  <= '{pf: 1'b0, ppn: leaf_ppn, perm: leaf_perm, level: level_q};
            state_q <= S_RESP;
          end else begin
            base_q  <= pte.ppn;
            level_q <= level_q - 2'd1;
            state_q <= S_WALK;
          end
        end
        S_RESP: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign req_ready     = (state_q == S_IDLE);
  assign mem_req_valid = (state_q == S_WALK) && !ptwc_hit;
  assign mem_req_addr  = pte_addr;
  assign resp_valid    = (state_q == S_RESP);
  assign resp          = resp_q;
  assign resp_id       = id_q;

  assign ev_l2_hit   = (state_q == S_L2) && l2_resp_valid && l2_hit;
  assign ev_l2_miss  = (state_q == S_L2) && l2_resp_valid && !l2_hit;
  assign ev_ptwc_hit = ptwc_lk && ptwc_hit;
  assign ev_mem_read = mem_req_valid && mem_req_ready;

  // a non-leaf entry found in the PTW cache is never a level-0 entry
  assert property (@(posedge clk) disable iff (!rst_n)
                   ptwc_lk && ptwc_hit |-> level_q != 2'd0)
    else $error("ptw: PTW cache hit at the last level");

endmodule
