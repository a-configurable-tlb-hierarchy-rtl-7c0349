// tlb_random_repl: random replacement victim for a set-associative TLB.
//
// A 16-bit maximal-length Galois LFSR (taps 16,14,13,11) steps once on every
// cycle in which `step` is high, i.e. every time a victim is consumed by a
// refill. victim_way is the low WAY_W bits of the LFSR (WAYS must be a power
// of two), so it is combinational from the state and needs no per-set
// storage, which is why this policy is the cheap one. Reset loads SEED.
// The LFSR polynomial and seed are this design's choices.
module tlb_random_repl #(
  parameter int unsigned WAYS = 8,
  parameter logic [15:0] SEED = 16'hACE1,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step,
  output logic [WAY_W-1:0] victim_way
);

  logic [15:0] lfsr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr_q <= SEED;
    else if (step) lfsr_q <= {1'b0, lfsr_q[15:1]} ^ (lfsr_q[0] ? 16'hB400 : 16'h0000);
  end

  assign victim_way = (WAYS > 1) ? lfsr_q[WAY_W-1:0] : '0;

endmodule
