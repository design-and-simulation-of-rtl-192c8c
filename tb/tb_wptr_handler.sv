// tb_wptr_handler: self-checking test of the write-pointer handler.
//
// The testbench plays the read side: it keeps its own binary read count and
// presents it in Gray code as the synchronized read pointer, advancing it at
// random but never past the writes. Before each rising edge it checks that a
// write is accepted exactly when w_en is high and the FIFO is not full; after
// each edge it checks the binary and Gray write pointers against its own
// write count, full against "write count - read count = depth" with the read
// count as presented at that edge (full is registered), and wr_level
// against the same difference. Random w_en with a slow read side makes the
// FIFO fill, stay full and wrap many times.
module tb_wptr_handler;
  localparam int AW = 3, Depth = 1 << AW;
  int checks = 0, failures = 0, full_cycles = 0;

  logic          wclk = 0, wrst_n = 0, w_en = 0;
  logic [AW:0]   g_rptr_sync = '0, b_wptr, g_wptr, wr_level;
  logic          full, w_accept;
  logic [AW:0]   wcount = '0, rcount = '0;
  logic          exp_full = 1'b0;

  wptr_handler #(.AW(AW)) dut (.*);

  always #5 wclk = ~wclk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge wclk);
    @(negedge wclk) wrst_n = 1;
    #1 check(b_wptr == 0 && g_wptr == 0 && !full, "reset state");
    for (int i = 0; i < 2000; i++) begin
      @(negedge wclk);
      w_en = ($urandom % 4) != 0;
      if (rcount != wcount && ($urandom % 3) == 0) rcount++;
      g_rptr_sync = rcount ^ (rcount >> 1);
      #1;
      check(w_accept == (w_en && !exp_full), "w_accept");
      @(posedge wclk);
      if (w_en && !exp_full) wcount++;
      // full is registered: it reflects the read pointer seen at this edge
      exp_full = int'((AW + 1)'(wcount - rcount)) == Depth;
      #1;
      check(b_wptr == wcount, "binary write pointer");
      check(g_wptr == (wcount ^ (wcount >> 1)), "Gray write pointer");
      check(full == exp_full, "full flag");
      check(wr_level == (AW + 1)'(wcount - rcount), "wr_level");
      if (full) full_cycles++;
    end
    check(full_cycles > 0, "full was reached");
    $display("full cycles seen: %0d", full_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
