// tlb_plru: set-associative tree pseudo-LRU replacement state.
//
// Each of the SETS sets holds a binary tree of WAYS-1 direction bits (WAYS a
// power of two). Node 1 is the root; node n has children 2n and 2n+1 and the
// leaves WAYS..2*WAYS-1 stand for ways 0..WAYS-1. A bit of 0 points the
// victim search to the left child, 1 to the right. Touching a way makes every
// node on its path point away from it, so the victim is always a way that was
// not among the most recently used. A fully-associative TLB uses SETS = 1,
// a direct-mapped one WAYS = 1 (victim always 0).
//
// Timing: victim_way is combinational from victim_set and the state; a touch
// updates the state at the next rising edge. Reset clears all trees.
// Keeping one tree per set (rather than one for the whole TLB) is what turns
// the fully-associative policy into a set-associative one; the tree encoding
// is this design's choice.
module tlb_plru #(
  parameter int unsigned SETS = 16,
  parameter int unsigned WAYS = 8,
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             touch_valid,
  input  logic [SET_W-1:0] touch_set,
  input  logic [WAY_W-1:0] touch_way,
  input  logic [SET_W-1:0] victim_set,
  output logic [WAY_W-1:0] victim_way
);

  localparam int unsigned LOG_WAYS = (WAYS > 1) ? $clog2(WAYS) : 0;

  // bit 0 of each tree is unused so that node n is bit n
  logic [WAYS-1:0] tree_q [SETS];

  generate
    if (WAYS > 1) begin : g_tree
      always_comb begin
        logic [WAYS-1:0] t;
        int unsigned node;
        t = tree_q[victim_set];
        node = 1;
        for (int l = 0; l < LOG_WAYS; l++) node = 2 * node + int'(t[node]);
        victim_way = WAY_W'(node - WAYS);
      end

      logic [WAYS-1:0] tree_next;
      always_comb begin
        int unsigned node;
        logic dir;
        tree_next = tree_q[touch_set];
        node = 1;
        for (int l = LOG_WAYS - 1; l >= 0; l--) begin
          dir = touch_way[l];
          tree_next[node] = ~dir;
          node = 2 * node + int'(dir);
        end
      end

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int s = 0; s < SETS; s++) tree_q[s] <= '0;
        end else if (touch_valid) begin
          tree_q[touch_set] <= tree_next;
        end
      end
    end else begin : g_dm
      assign victim_way = '0;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) for (int s = 0; s < SETS; s++) tree_q[s] <= '0;
      end
    end
  endgenerate

endmodule
