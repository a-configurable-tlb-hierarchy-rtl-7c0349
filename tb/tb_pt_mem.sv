// tb_pt_mem: behavioural page-table memory for the walker testbenches.
//
// Stands in for the data cache / main memory that the page table walker reads
// page table entries from. It is not synthesizable and not part of the
// design. Memory is a sparse associative array of 64-bit words keyed by the
// physical address; unwritten words read as 0 (an invalid entry). A request
// is taken when req_valid && req_ready (ready is high on a random 3 cycles
// in 4) and answered with one resp_valid cycle 1..MAX_LAT cycles later. Only
// one request is outstanding at a time.
//
// map() builds Sv39 page tables: it walks from the root, allocating a fresh
// table page (from next_table upwards) for every missing non-leaf entry, and
// writes a leaf at the requested level (2 = 1 GiB, 1 = 2 MiB, 0 = 4 KiB).
module tb_pt_mem
  import tlb_pkg::*;
#(
  parameter int unsigned MAX_LAT = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   req_valid,
  output logic   req_ready,
  input  paddr_t req_addr,
  output logic   resp_valid,
  output pte_t   resp_data
);

  logic [63:0] mem [paddr_t];
  ppn_t        next_table = 44'h800;
  int          reads = 0;

  function automatic pte_t rd(paddr_t a);
    return mem.exists(a) ? pte_t'(mem[a]) : pte_t'(64'd0);
  endfunction

  function automatic void wr(paddr_t a, pte_t p);
    mem[a] = p;
  endfunction

  function automatic paddr_t entry_addr(ppn_t table_ppn, vpn_t vpn, int lvl);
    logic [8:0] f;
    f = vpn[9*lvl +: 9];
    return {table_ppn, f, 3'b000};
  endfunction

  // flags = {D, A, G, U, X, W, R, V}
  function automatic void map(ppn_t root, vpn_t vpn, ppn_t ppn, int level, logic [7:0] flags);
    ppn_t   tbl;
    paddr_t a;
    pte_t   p;
    tbl = root;
    for (int lvl = 2; lvl > level; lvl--) begin
      a = entry_addr(tbl, vpn, lvl);
      p = rd(a);
      if (!p.v) begin
        p = '0;
        p.v = 1'b1;
        p.ppn = next_table;
        next_table = next_table + 1;
        wr(a, p);
      end
      tbl = p.ppn;
    end
    a = entry_addr(tbl, vpn, level);
    p = pte_t'({10'd0, ppn, 2'b00, flags});
    wr(a, p);
  endfunction

  logic   busy;
  int     wait_cnt;
  paddr_t addr_q;
  logic   ready_rand;

  always_ff @(posedge clk) ready_rand <= ($urandom_range(3) != 0);

  assign req_ready = rst_n && !busy && ready_rand;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      resp_valid <= 1'b0;
      resp_data  <= '0;
      wait_cnt   <= 0;
      addr_q     <= '0;
    end else begin
      resp_valid <= 1'b0;
      if (req_valid && req_ready) begin
        busy     <= 1'b1;
        addr_q   <= req_addr;
        wait_cnt <= int'($urandom_range(MAX_LAT - 1));
        reads    <= reads + 1;
      end else if (busy) begin
        if (wait_cnt == 0) begin
          busy       <= 1'b0;
          resp_valid <= 1'b1;
          resp_data  <= rd(addr_q);
        end else begin
          wait_cnt <= wait_cnt - 1;
        end
      end
    end
  end

endmodule
