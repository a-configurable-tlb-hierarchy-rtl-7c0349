// tb_tlb_configs: the evaluated TLB configurations side by side.
//
// Runs the same page stream (see tb_cfg_run) through the hierarchy built as
// each configuration of the evaluation table that the default build does not
// cover, and through a 1024-entry L2 TLB at three associativities:
//   Conf I   : DTLB 32 fully-associative, ITLB 32 fully-associative, no L2
//   Conf II  : same L1, L2 128 entries 4-way
//   Conf III : same L1, L2 512 entries 4-way
//   Conf IV  : DTLB 64 8-way, ITLB 128 8-way, L2 1024 8-way
//   L2 sweep : Conf V L1 TLBs with a 1024-entry L2 TLB direct-mapped, 4-way, 8-way
//   other    : direct-mapped 16-entry L1 TLBs with random replacement and a
//              64-entry 4-way pseudo-LRU L2 TLB (the remaining policy corners)
// Every translation is checked. On top of that: Conf I never touches an L2
// TLB; and in the sweep the direct-mapped L2 misses more often than the 4-way
// and the 8-way one, whose misses stay at the 16 compulsory ones per TLB pair
// (the stream's pages conflict only in the direct-mapped L2 TLB).
module tb_tlb_configs;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  localparam int NCFG = 8;
  logic done [NCFG];
  int c [NCFG], f [NCFG], l2h [NCFG], l2m [NCFG], l1m [NCFG], wk [NCFG];
  int checks = 0, failures = 0;

  tb_cfg_run #(.ITLB_ENTRIES(32), .ITLB_WAYS(32), .DTLB_ENTRIES(32), .DTLB_WAYS(32), .L2_ENTRIES(0))
    conf1 (clk, rst_n, start, done[0], c[0], f[0], l2h[0], l2m[0], l1m[0], wk[0]);
  tb_cfg_run #(.ITLB_ENTRIES(32), .ITLB_WAYS(32), .DTLB_ENTRIES(32), .DTLB_WAYS(32), .L2_ENTRIES(128), .L2_WAYS(4))
    conf2 (clk, rst_n, start, done[1], c[1], f[1], l2h[1], l2m[1], l1m[1], wk[1]);
  tb_cfg_run #(.ITLB_ENTRIES(32), .ITLB_WAYS(32), .DTLB_ENTRIES(32), .DTLB_WAYS(32), .L2_ENTRIES(512), .L2_WAYS(4))
    conf3 (clk, rst_n, start, done[2], c[2], f[2], l2h[2], l2m[2], l1m[2], wk[2]);
  tb_cfg_run #(.ITLB_ENTRIES(128), .ITLB_WAYS(8), .DTLB_ENTRIES(64), .DTLB_WAYS(8), .L2_ENTRIES(1024), .L2_WAYS(8))
    conf4 (clk, rst_n, start, done[3], c[3], f[3], l2h[3], l2m[3], l1m[3], wk[3]);
  tb_cfg_run #(.L2_ENTRIES(1024), .L2_WAYS(1))
    l2_dm (clk, rst_n, start, done[4], c[4], f[4], l2h[4], l2m[4], l1m[4], wk[4]);
  tb_cfg_run #(.L2_ENTRIES(1024), .L2_WAYS(4))
    l2_4w (clk, rst_n, start, done[5], c[5], f[5], l2h[5], l2m[5], l1m[5], wk[5]);
  tb_cfg_run #(.L2_ENTRIES(1024), .L2_WAYS(8))
    l2_8w (clk, rst_n, start, done[6], c[6], f[6], l2h[6], l2m[6], l1m[6], wk[6]);
  tb_cfg_run #(.ITLB_ENTRIES(16), .ITLB_WAYS(1), .DTLB_ENTRIES(16), .DTLB_WAYS(1),
               .L1_REPL(tlb_pkg::REPL_RANDOM), .L2_ENTRIES(64), .L2_WAYS(4), .L2_REPL(tlb_pkg::REPL_PLRU))
    other (clk, rst_n, start, done[7], c[7], f[7], l2h[7], l2m[7], l1m[7], wk[7]);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string names [NCFG] = '{"Conf I", "Conf II", "Conf III", "Conf IV", "L2 direct-mapped", "L2 4-way", "L2 8-way", "DM L1, PLRU L2"};
    repeat (4) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    for (int i = 0; i < NCFG; i++) wait (done[i]);
    for (int i = 0; i < NCFG; i++) begin
      $display("%-17s L1 misses %4d  L2 hits %4d  L2 misses %4d  PTE reads %4d  (%0d checks, %0d failures)",
               names[i], l1m[i], l2h[i], l2m[i], wk[i], c[i], f[i]);
      checks += c[i];
      failures += f[i];
    end
    check("Conf I has no L2 TLB", l2h[0] == 0 && l2m[0] == 0);
    check("Conf II uses its L2 TLB", l2h[1] > 0);
    check("direct-mapped L2 misses more than 4-way", l2m[4] > l2m[5]);
    check("direct-mapped L2 misses more than 8-way", l2m[4] > l2m[6]);
    check("8-way L2 misses only the 16 first-touch pages", l2m[6] == 16);
    check("4-way L2 misses only the 16 first-touch pages", l2m[5] == 16);
    check("Conf IV L2 misses only the 16 first-touch pages", l2m[3] == 16);
    check("L1 TLBs keep missing (stream overflows one L1 set)", l1m[6] > 16 * 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
