// tlb_pkg: types and constants shared by the configurable TLB hierarchy.
//
// The hierarchy translates RV64 Sv39 virtual addresses: 39-bit virtual
// address, 4 KiB base pages (12-bit offset), a 27-bit virtual page number
// split into three 9-bit fields for the 3-level radix page table, and a 44-bit
// physical page number (56-bit physical address). These sizes are those of
// the Sv39 scheme the design targets; the PTE bit layout is the standard
// Sv39 one. The request/response structs and the replacement-policy enum are
// this design's own choices.
package tlb_pkg;

  localparam int unsigned VADDR_BITS  = 39;
  localparam int unsigned PGIDX_BITS  = 12;
  localparam int unsigned VPN_BITS    = VADDR_BITS - PGIDX_BITS;   // 27
  localparam int unsigned PPN_BITS    = 44;
  localparam int unsigned PADDR_BITS  = PPN_BITS + PGIDX_BITS;     // 56
  localparam int unsigned LEVELS      = 3;
  localparam int unsigned VPN_LVL_BITS = 9;
  localparam int unsigned PTE_BYTES   = 8;

  typedef logic [VPN_BITS-1:0]   vpn_t;
  typedef logic [PPN_BITS-1:0]   ppn_t;
  typedef logic [VADDR_BITS-1:0] vaddr_t;
  typedef logic [PADDR_BITS-1:0] paddr_t;

  // Sv39 page table entry, bit 0 (V) at the right.
  typedef struct packed {
    logic [9:0] reserved;
    ppn_t       ppn;
    logic [1:0] rsw;
    logic       d;
    logic       a;
    logic       g;
    logic       u;
    logic       x;
    logic       w;
    logic       r;
    logic       v;
  } pte_t;

  // Permission bits kept in a TLB entry.
  typedef struct packed {
    logic d;
    logic a;
    logic u;
    logic x;
    logic w;
    logic r;
  } perm_t;

  // Kind of access that asks for a translation.
  typedef enum logic [1:0] {
    ACC_FETCH = 2'd0,
    ACC_LOAD  = 2'd1,
    ACC_STORE = 2'd2
  } access_t;

  // RISC-V privilege levels.
  typedef enum logic [1:0] {
    PRV_U = 2'd0,
    PRV_S = 2'd1,
    PRV_M = 2'd3
  } priv_t;

  // Replacement policy of a set-associative TLB.
  typedef enum logic {
    REPL_PLRU   = 1'b0,
    REPL_RANDOM = 1'b1
  } repl_t;

  // Translation request from an L1 TLB to the page table walker.
  typedef struct packed {
    vpn_t vpn;
  } ptw_req_t;

  // Answer of the page table walker. ppn is the 4 KiB page's frame even when
  // the leaf was a superpage (the superpage is cut into its 4 KiB piece).
  typedef struct packed {
    logic  pf;     // no valid leaf: page fault
    ppn_t  ppn;
    perm_t perm;
    logic [1:0] level; // level of the leaf PTE: 2 = 1 GiB, 1 = 2 MiB, 0 = 4 KiB
  } ptw_resp_t;

  // SFENCE.VMA as seen by the TLBs.
  typedef struct packed {
    logic valid;
    logic has_addr;  // rs1 != x0: flush only the page of vaddr
    vpn_t vpn;
  } sfence_t;

  function automatic perm_t pte_perm(pte_t p);
    return '{d: p.d, a: p.a, u: p.u, x: p.x, w: p.w, r: p.r};
  endfunction

  // Permission check done by the L1 TLBs on a hit. Returns 1 on a page fault.
  function automatic logic perm_fault(perm_t p, access_t acc, priv_t priv, logic sum);
    logic f;
    f = !p.a;
    unique case (acc)
      ACC_FETCH: f = f | !p.x;
      ACC_LOAD:  f = f | !p.r;
      default:   f = f | !p.w | !p.d;
    endcase
    if (priv == PRV_U) f = f | !p.u;
    else if (p.u) f = f | (acc == ACC_FETCH) | !sum;
    return f;
  endfunction

endpackage
