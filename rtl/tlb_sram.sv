// tlb_sram: synchronous-read, synchronous-write memory with a lane write mask.
//
// DEPTH rows of LANES lanes, each LANE_W bits wide: one row holds one set of
// the L2 TLB, one lane one way. It has one read port and one write port.
// A read addressed in cycle t delivers the row in cycle t+1 (the output is
// registered, so it maps to block RAM). A write stores only the lanes whose
// wmask bit is set, which lets a refill update one way of a set without a
// read-modify-write. A read and a write to the same row in the same cycle
// return the old row. The contents are not reset: validity is kept outside.
module tlb_sram #(
  parameter int unsigned DEPTH  = 128,
  parameter int unsigned LANES  = 8,
  parameter int unsigned LANE_W = 70,
  localparam int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                          clk,
  input  logic                          ren,
  input  logic [ADDR_W-1:0]             raddr,
  output logic [LANES-1:0][LANE_W-1:0]  rdata,
  input  logic                          wen,
  input  logic [ADDR_W-1:0]             waddr,
  input  logic [LANES-1:0]              wmask,
  input  logic [LANES-1:0][LANE_W-1:0]  wdata
);

  logic [LANES-1:0][LANE_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ren) rdata <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    if (wen)
      for (int l = 0; l < LANES; l++)
        if (wmask[l]) mem[waddr][l] <= wdata[l];
  end

endmodule
