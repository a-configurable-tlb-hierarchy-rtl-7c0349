// tb_tlb_plru: self-checking test of the per-set tree pseudo-LRU.
//
// With 4 sets of 4 ways it checks properties that any tree pseudo-LRU must
// have, worked out by hand rather than by re-running the tree:
//   * after touching ways 0,1,2,3 in that order the victim is way 0;
//   * after touching 0,1,2,3 and then 0 again the victim is way 2;
//   * the victim is never the way touched last;
//   * repeatedly touching the victim visits every way once in WAYS steps;
//   * sets are independent, and reset leaves every victim at way 0.
module tb_tlb_plru;
  localparam int SETS = 4, WAYS = 4;
  logic clk = 0, rst_n = 0;
  logic touch_valid = 0;
  logic [1:0] touch_set = 0, touch_way = 0, victim_set = 0, victim_way;
  int checks = 0, failures = 0;

  tlb_plru #(.SETS(SETS), .WAYS(WAYS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic touch(int s, int w);
    @(negedge clk);
    touch_valid = 1; touch_set = 2'(s); touch_way = 2'(w);
    @(negedge clk);
    touch_valid = 0;
  endtask

  task automatic get_victim(input int s, output int v);
    victim_set = 2'(s);
    #1;
    v = int'(victim_way);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < SETS; s++) begin
      get_victim(s, v);
      check("reset victim", v, 0);
    end
    // sequence 0,1,2,3 in set 1
    for (int w = 0; w < WAYS; w++) touch(1, w);
    get_victim(1, v);
    check("after 0,1,2,3", v, 0);
    touch(1, 0);
    get_victim(1, v);
    check("after 0,1,2,3,0", v, 2);
    // other sets untouched
    get_victim(0, v);
    check("set 0 independent", v, 0);
    get_victim(2, v);
    check("set 2 independent", v, 0);
    // touching the victim cycles through all ways of set 3
    begin
      bit [WAYS-1:0] seen = '0;
      for (int i = 0; i < WAYS; i++) begin
        get_victim(3, v);
        seen[v] = 1;
        touch(3, v);
      end
      check("victim walk covers all ways", int'(seen), (1 << WAYS) - 1);
    end
    // random touches: victim never the last touched way
    for (int i = 0; i < 200; i++) begin
      int s, w;
      s = $urandom_range(SETS - 1);
      w = $urandom_range(WAYS - 1);
      touch(s, w);
      checks++;
      get_victim(s, v);
      if (v == w) begin
        failures++;
        $display("FAIL victim equals last touched way %0d in set %0d", w, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
