// tb_sync_flag_logic: self-checking test of the single-clock flag logic.
//
// Drives random write and read pointers holding 0 to DEPTH words (including
// pointer pairs that straddle the wrap), and random requests. The expected
// occupancy is computed from plain integers, and each flag from it: empty at
// 0, full at DEPTH, half_full from DEPTH/2, almost_full from 6, almost_empty
// up to 1. After each clock edge overflow must equal "write requested while
// full" and underflow "read requested while empty" from before the edge.
module tb_sync_flag_logic;
  localparam int AW = 3, Depth = 1 << AW;
  int checks = 0, failures = 0, n_over = 0, n_under = 0;

  logic        clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [AW:0] wr_ptr = '0, rd_ptr = '0, occupancy;
  logic        empty, full, half_full, almost_full, almost_empty, overflow, underflow;

  sync_flag_logic #(.AW(AW), .ALMOST_FULL(6), .ALMOST_EMPTY(1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int occ, rd;
    logic exp_over, exp_under;
    repeat (2) @(posedge clk);
    #1 check(!overflow && !underflow, "reset clears pulses");
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      rd  = int'($urandom % 16);
      occ = (i % 3 == 0) ? ((i / 3) % 2) * Depth : int'($urandom % (Depth + 1));
      rd_ptr = (AW + 1)'(rd);
      wr_ptr = (AW + 1)'((rd + occ) % 16);
      wr_en  = $urandom % 2 == 1;
      rd_en  = $urandom % 2 == 1;
      #1;
      check(int'(occupancy) == occ, "occupancy");
      check(empty == (occ == 0), "empty");
      check(full == (occ == Depth), "full");
      check(half_full == (occ >= Depth / 2), "half_full");
      check(almost_full == (occ >= 6), "almost_full");
      check(almost_empty == (occ <= 1), "almost_empty");
      exp_over  = wr_en && occ == Depth;
      exp_under = rd_en && occ == 0;
      @(posedge clk); #1;
      check(overflow == exp_over, "overflow pulse");
      check(underflow == exp_under, "underflow pulse");
      if (overflow) n_over++;
      if (underflow) n_under++;
    end
    check(n_over > 0 && n_under > 0, "both pulses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
