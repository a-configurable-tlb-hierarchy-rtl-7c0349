// rr_arbiter: round-robin arbiter in front of the page table walker.
//
// N requesters (here the instruction and the data L1 TLB) each offer a
// DATA_W-bit request with valid/ready. The arbiter forwards one of them to
// its single output: it searches from the requester after the one granted
// last, so a requester that keeps asking cannot starve another. The choice is
// combinational; in_ready of the chosen requester equals out_ready and
// out_id names it, so the walker can route its answer back. The pointer
// moves only when a request is actually handed over (out_valid && out_ready).
// Round-robin order follows the document; the interface is this design's.
module rr_arbiter #(
  parameter int unsigned N      = 2,
  parameter int unsigned DATA_W = 27,
  localparam int unsigned ID_W  = (N > 1) ? $clog2(N) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N-1:0]               in_valid,
  output logic [N-1:0]               in_ready,
  input  logic [N-1:0][DATA_W-1:0]   in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [DATA_W-1:0]          out_data,
  output logic [ID_W-1:0]            out_id
);

  logic [ID_W-1:0] last_q;

  // requester k places after the one granted last
  function automatic logic [ID_W-1:0] after_last(logic [ID_W-1:0] last, int unsigned k);
    return ID_W'((int'(last) + k) % N);
  endfunction

  always_comb begin
    out_valid = 1'b0;
    out_id    = '0;
    for (int unsigned k = N; k >= 1; k--) begin
      if (in_valid[after_last(last_q, k)]) begin
        out_valid = 1'b1;
        out_id    = after_last(last_q, k);
      end
    end
    out_data = in_data[out_id];
    in_ready = '0;
    if (out_valid) in_ready[out_id] = out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_q <= ID_W'(N - 1);
    else if (out_valid && out_ready) last_q <= out_id;
  end

  // A request that was offered is held until it is taken.
  for (genvar i = 0; i < N; i++) begin : g_hold
    assert property (@(posedge clk) disable iff (!rst_n)
                     in_valid[i] && !in_ready[i] |=> in_valid[i])
      else $error("rr_arbiter: requester %0d dropped a pending request", i);
  end

endmodule
