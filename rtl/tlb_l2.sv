// tlb_l2: configurable set-associative shared L2 TLB.
//
// ENTRIES translations are kept as SETS = ENTRIES/WAYS rows of a
// synchronous-read memory (tlb_sram), one row per set and one lane per way,
// so the array maps to block RAM. The valid bits are kept apart, in
// flip-flops, so that they can be read, cleared and tested without the
// memory's read delay. WAYS = 1 is direct-mapped, WAYS = ENTRIES fully
// associative.
//
// Timing:
//   * Lookup: lk_valid/lk_vpn in cycle t reads the set's row; the set index,
//     tag and way write of cycle t are held in registers, and in cycle t+1 the
//     row is compared with the tag: lk_resp_valid, lk_hit, lk_ppn, lk_perm.
//   * Refill: rf_valid writes one way of the set through the memory's lane
//     mask, at the first invalid way or else the way the replacement policy
//     names (REPL; random by default). A way written in the lookup cycle is
//     treated as not present in that lookup, as the row read is the old one.
//   * Flush: sfence with an address clears the valid bits of the whole set
//     the address maps to (the tags are in the memory and could only be
//     checked a cycle later); without an address every valid bit is cleared.
// All of this follows the document; the port layout is this design's own.
module tlb_l2
  import tlb_pkg::*;
#(
  parameter int unsigned ENTRIES = 1024,
  parameter int unsigned WAYS    = 8,
  parameter repl_t       REPL    = REPL_RANDOM
) (
  input  logic    clk,
  input  logic    rst_n,
  // lookup
  input  logic    lk_valid,
  input  vpn_t    lk_vpn,
  output logic    lk_resp_valid,
  output logic    lk_hit,
  output ppn_t    lk_ppn,
  output perm_t   lk_perm,
  // refill
  input  logic    rf_valid,
  input  vpn_t    rf_vpn,
  input  ppn_t    rf_ppn,
  input  perm_t   rf_perm,
  // flush
  input  sfence_t sfence
);

  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 0;
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TAG_W = VPN_BITS - IDX_W;

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    ppn_t             ppn;
    perm_t            perm;
  } entry_t;

  localparam int unsigned ENTRY_W = $bits(entry_t);

  function automatic logic [SET_W-1:0] set_of(vpn_t v);
    return (SETS > 1) ? v[SET_W-1:0] : '0;
  endfunction

  function automatic logic [TAG_W-1:0] tag_of(vpn_t v);
    return v[VPN_BITS-1:IDX_W];
  endfunction

  logic [WAYS-1:0] valid_q [SETS];

  // ---------------- memory ----------------
  logic [WAYS-1:0][ENTRY_W-1:0] rd_row, wr_row;
  logic [WAYS-1:0]              wr_mask;
  logic [SET_W-1:0]             lk_set, rf_set;
  logic [WAY_W-1:0]             rf_way;

  assign lk_set = set_of(lk_vpn);
  assign rf_set = set_of(rf_vpn);

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      wr_row[w]  = ENTRY_W'({tag_of(rf_vpn), rf_ppn, rf_perm});
      wr_mask[w] = (rf_way == WAY_W'(w));
    end
  end

  tlb_sram #(.DEPTH(SETS), .LANES(WAYS), .LANE_W(ENTRY_W)) u_mem (
    .clk,
    .ren   (lk_valid),
    .raddr (lk_set),
    .rdata (rd_row),
    .wen   (rf_valid),
    .waddr (rf_set),
    .wmask (wr_mask),
    .wdata (wr_row)
  );

  // ---------------- intermediate state of a lookup ----------------
  logic             s1_valid_q;
  logic [SET_W-1:0] s1_set_q;
  logic [TAG_W-1:0] s1_tag_q;
  logic [WAYS-1:0]  s1_stale_q;   // ways written during the read cycle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid_q <= 1'b0;
      s1_set_q   <= '0;
      s1_tag_q   <= '0;
      s1_stale_q <= '0;
    end else begin
      s1_valid_q <= lk_valid;
      if (lk_valid) begin
        s1_set_q   <= lk_set;
        s1_tag_q   <= tag_of(lk_vpn);
        s1_stale_q <= (rf_valid && rf_set == lk_set) ? wr_mask : '0;
      end
    end
  end

  logic             hit;
  logic [WAY_W-1:0] hit_way;
  entry_t           hit_entry;

  always_comb begin
    entry_t e;
    hit       = 1'b0;
    hit_way   = '0;
    hit_entry = entry_t'(rd_row[0]);
    for (int w = 0; w < WAYS; w++) begin
      e = entry_t'(rd_row[w]);
      if (valid_q[s1_set_q][w] && !s1_stale_q[w] && e.tag == s1_tag_q) begin
        hit       = 1'b1;
        hit_way   = WAY_W'(w);
        hit_entry = e;
      end
    end
  end

  assign lk_resp_valid = s1_valid_q;
  assign lk_hit        = s1_valid_q && hit;
  assign lk_ppn        = hit_entry.ppn;
  assign lk_perm       = hit_entry.perm;

  // ---------------- replacement ----------------
  logic             rf_free;
  logic [WAY_W-1:0] rf_free_way, rf_policy_way;

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

  generate
    if (REPL == REPL_PLRU) begin : g_plru
      tlb_plru #(.SETS(SETS), .WAYS(WAYS)) u_repl (
        .clk, .rst_n,
        .touch_valid (rf_valid || lk_hit),
        .touch_set   (rf_valid ? rf_set : s1_set_q),
        .touch_way   (rf_valid ? rf_way : hit_way),
        .victim_set  (rf_set),
        .victim_way  (rf_policy_way)
      );
    end else begin : g_rand
      tlb_random_repl #(.WAYS(WAYS), .SEED(16'h1D2B)) u_repl (
        .clk, .rst_n,
        .step       (rf_valid && !rf_free),
        .victim_way (rf_policy_way)
      );
    end
  endgenerate

  // ---------------- valid bits ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) valid_q[s] <= '0;
    end else if (sfence.valid) begin
      if (sfence.has_addr) valid_q[set_of(sfence.vpn)] <= '0;
      else for (int s = 0; s < SETS; s++) valid_q[s] <= '0;
    end else if (rf_valid) begin
      valid_q[rf_set][rf_way] <= 1'b1;
    end
  end

endmodule
