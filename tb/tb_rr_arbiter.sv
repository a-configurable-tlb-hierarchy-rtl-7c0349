// tb_rr_arbiter: self-checking test of the round-robin arbiter.
//
// Three requesters. A lone requester is granted at once; with all three
// asking every cycle and the output always ready, the grants must rotate;
// while out_ready is low the choice does not move and nobody is told ready;
// the data and id at the output belong to the granted requester; random
// traffic is checked for fairness (no requester is passed over more than
// N-1 times while it waits).
module tb_rr_arbiter;
  localparam int N = 3, W = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid = '0, in_ready;
  logic [N-1:0][W-1:0] in_data;
  logic out_valid, out_ready = 0;
  logic [W-1:0] out_data;
  logic [1:0] out_id;
  int checks = 0, failures = 0;

  rr_arbiter #(.N(N), .DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  for (genvar i = 0; i < N; i++) assign in_data[i] = 8'(8'hA0 + i);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int waits [N];
    logic [N-1:0] grant;
    logic stall;
    int held;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("idle", out_valid, 0);
    // lone requester 2
    out_ready = 1;
    in_valid = 3'b100;
    #1 check("lone requester", out_id, 2);
    check("lone data", out_data, 8'hA2);
    @(negedge clk);
    // all requesting: rotation continues after 2
    in_valid = '1;
    for (int i = 0; i < 9; i++) begin
      #1;
      check("rotation", out_id, i % N);
      check("data", out_data, 8'hA0 + (i % N));
      check("ready to winner", in_ready, 1 << (i % N));
      @(negedge clk);
    end
    // output stalled: choice holds
    out_ready = 0;
    #1;
    held = out_id;
    check("no ready while stalled", in_ready, 0);
    repeat (3) @(negedge clk);
    #1 check("choice holds", out_id, held);
    // random fairness; pending requests stay
    for (int i = 0; i < N; i++) waits[i] = 0;
    for (int c = 0; c < 500; c++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) if (!in_valid[i]) in_valid[i] = 1'($urandom_range(1));
      out_ready = ($urandom_range(3) != 0);
      #1;
      if (out_valid) check("winner requests", in_valid[out_id], 1);
      grant = in_valid & in_ready;
      stall = !out_ready;
      @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) begin
        if (grant[i]) begin
          waits[i] = 0;
          in_valid[i] = 0;
        end else if (in_valid[i] && !stall) waits[i]++;
        checks++;
        if (waits[i] > N - 1) begin
          failures++;
          $display("FAIL requester %0d waited %0d grants", i, waits[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
