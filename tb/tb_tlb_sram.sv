// tb_tlb_sram: self-checking test of the masked synchronous-read memory.
//
// Random masked writes and reads against a model array; a read returns the
// row one cycle after it is addressed; a read of a row being written in the
// same cycle returns the old row; a cleared mask bit leaves its lane alone.
module tb_tlb_sram;
  localparam int DEPTH = 16, LANES = 4, LANE_W = 12;
  logic clk = 0;
  logic ren = 0, wen = 0;
  logic [3:0] raddr = 0, waddr = 0;
  logic [LANES-1:0] wmask = 0;
  logic [LANES-1:0][LANE_W-1:0] rdata, wdata = '0;
  logic [LANES-1:0][LANE_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  tlb_sram #(.DEPTH(DEPTH), .LANES(LANES), .LANE_W(LANE_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [LANES-1:0][LANE_W-1:0] expect_row;
    // fill every row completely
    for (int r = 0; r < DEPTH; r++) begin
      @(negedge clk);
      wen = 1; waddr = 4'(r); wmask = '1;
      for (int l = 0; l < LANES; l++) wdata[l] = LANE_W'($urandom);
      model[r] = wdata;
    end
    @(negedge clk);
    wen = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      ren = 1; raddr = 4'($urandom_range(DEPTH - 1));
      wen = $urandom_range(1); waddr = 4'($urandom_range(DEPTH - 1));
      if (i % 5 == 0) waddr = raddr;
      wmask = LANES'($urandom);
      for (int l = 0; l < LANES; l++) wdata[l] = LANE_W'($urandom);
      expect_row = model[raddr];
      if (wen) for (int l = 0; l < LANES; l++) if (wmask[l]) model[waddr][l] = wdata[l];
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== expect_row) begin
        failures++;
        $display("FAIL read row %0d: got %h expected %h", raddr, rdata, expect_row);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
