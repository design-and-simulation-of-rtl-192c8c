// tb_rptr_handler: self-checking test of the read-pointer handler.
//
// The testbench plays the write side: it keeps its own binary write count and
// presents it in Gray code as the synchronized write pointer, advancing it at
// random but never more than a depth ahead of the reads. Before each rising
// edge it checks that a read is accepted exactly when r_en is high and the
// FIFO is not empty; after each edge it checks the binary and Gray read
// pointers against its own read count, empty against "read count = write
// count", and rd_level against the difference. It also checks that empty is
// high straight out of reset.
module tb_rptr_handler;
  localparam int AW = 3, Depth = 1 << AW;
  int checks = 0, failures = 0, empty_cycles = 0;

  logic          rclk = 0, rrst_n = 0, r_en = 0;
  logic [AW:0]   g_wptr_sync = '0, b_rptr, g_rptr, rd_level;
  logic          empty, r_accept;
  logic [AW:0]   wcount = '0, rcount = '0;

  rptr_handler #(.AW(AW)) dut (.*);

  always #5 rclk = ~rclk;

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
    repeat (2) @(posedge rclk);
    #1 check(empty && b_rptr == 0 && g_rptr == 0, "reset state");
    @(negedge rclk) rrst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge rclk);
      r_en = ($urandom % 3) == 0 ? 1'b0 : 1'b1;
      if (int'((AW + 1)'(wcount - rcount)) != Depth && ($urandom % 2) == 0) wcount++;
      g_wptr_sync = wcount ^ (wcount >> 1);
      #1;
      check(r_accept == (r_en && !empty), "r_accept");
      @(posedge rclk);
      if (r_accept) rcount++;
      #1;
      check(b_rptr == rcount, "binary read pointer");
      check(g_rptr == (rcount ^ (rcount >> 1)), "Gray read pointer");
      check(empty == (rcount == wcount), "empty flag");
      check(rd_level == (AW + 1)'(wcount - rcount), "rd_level");
      if (empty) empty_cycles++;
    end
    check(empty_cycles > 0, "empty was reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
