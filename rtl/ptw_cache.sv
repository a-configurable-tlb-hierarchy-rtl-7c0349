// ptw_cache: small fully-associative cache of non-leaf page table entries.
//
// The walker reads the page table top-down; every entry it reads above the
// leaf points to the next table. This cache keeps, for the physical address
// of such a non-leaf entry, the page number of the table it points to, so a
// later walk through the same tables skips those memory reads. ENTRIES
// entries live in flip-flops; a lookup compares the address with all of them
// in the same cycle (lk_hit/lk_ppn are combinational). An insert goes to the
// first invalid entry, else to the pseudo-LRU victim; hits and inserts update
// the pseudo-LRU tree. Any sfence clears the whole cache, as a changed page
// table may have changed non-leaf entries too.
// The function (hold non-leaf translations, fully associative, small) follows
// the document; its size, key, policy and flush rule are this design's.
module ptw_cache
  import tlb_pkg::*;
#(
  parameter int unsigned ENTRIES = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  // lookup, by the physical address of the entry about to be read
  input  logic    lk_valid,
  input  paddr_t  lk_addr,
  output logic    lk_hit,
  output ppn_t    lk_ppn,
  // insert a non-leaf entry just read from memory
  input  logic    ins_valid,
  input  paddr_t  ins_addr,
  input  ppn_t    ins_ppn,
  // flush
  input  sfence_t sfence
);

  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  localparam int unsigned KEY_W = PADDR_BITS - 3;  // entries are 8-byte aligned

  logic [ENTRIES-1:0] valid_q;
  logic [KEY_W-1:0]   key_q [ENTRIES];
  ppn_t               ppn_q [ENTRIES];

  logic [IDX_W-1:0] hit_idx, free_idx, victim_idx, ins_idx;
  logic             free;
  logic             ins_present;

  always_comb begin
    lk_hit  = 1'b0;
    hit_idx = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (valid_q[i] && key_q[i] == lk_addr[PADDR_BITS-1:3]) begin
        lk_hit  = lk_valid;
        hit_idx = IDX_W'(i);
      end
    lk_ppn = ppn_q[hit_idx];
  end

  always_comb begin
    free        = 1'b0;
    free_idx    = '0;
    ins_present = 1'b0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (!valid_q[i]) begin
        free     = 1'b1;
        free_idx = IDX_W'(i);
      end
      if (valid_q[i] && key_q[i] == ins_addr[PADDR_BITS-1:3]) ins_present = 1'b1;
    end
  end

  assign ins_idx = free ? free_idx : victim_idx;

  tlb_plru #(.SETS(1), .WAYS(ENTRIES)) u_plru (
    .clk, .rst_n,
    .touch_valid (lk_hit || (ins_valid && !ins_present)),
    .touch_set   (1'b0),
    .touch_way   ((ins_valid && !ins_present) ? ins_idx : hit_idx),
    .victim_set  (1'b0),
    .victim_way  (victim_idx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else if (sfence.valid) begin
      valid_q <= '0;
    end else if (ins_valid && !ins_present) begin
      valid_q[ins_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (ins_valid && !ins_present && !sfence.valid) begin
      key_q[ins_idx] <= ins_addr[PADDR_BITS-1:3];
      ppn_q[ins_idx] <= ins_ppn;
    end
  end

endmodule
