// tb_fifo_top: end-to-end test of the top level at its default sizes.
//
// Runs both FIFOs of the top at the same time, each against its own reference
// queue, with no parameter overrides (eight words of eight bits each).
//
// Dual-clock FIFO: writer and reader clocks at three different ratios (writer
// faster, reader faster, nearly equal) with random enables. Every read word is
// checked in order, no write may be taken with the FIFO truly full and no read
// with it truly empty, and the internal Gray pointers are watched to change in
// at most one bit per clock edge. Counted mechanisms: full, empty, a refused
// write, a refused read, pointer wrap-around, and a write arriving in the
// read domain through the synchronizers (empty falling).
//
// Single-clock FIFO: random reads and writes on one clock with a cycle-exact
// reference. Counted mechanisms: full, empty, overflow, underflow, half_full,
// almost_full, almost_empty, a simultaneous read and write, and pointer
// wrap-around.
// Every mechanism must have happened at least once, or a failure is counted.
module tb_fifo_top;
  localparam int Dw = fifo_pkg::DefDataWidth, Depth = fifo_pkg::DefDepth;
  localparam int Aw = $clog2(Depth);
  int checks = 0, failures = 0;

  // dual-clock side
  logic          a_wclk = 0, a_rclk = 0, a_wrst_n = 0, a_rrst_n = 0, a_w_en = 0, a_r_en = 0;
  logic [Dw-1:0] a_data_in = '0, a_data_out;
  logic          a_full, a_empty;
  logic [Aw:0]   a_wr_level, a_rd_level;
  // single-clock side
  logic          s_clk = 0, s_rst_n = 0, s_wr_en = 0, s_rd_en = 0;
  logic [Dw-1:0] s_wr_data = '0, s_rd_data;
  logic          s_empty, s_full, s_half_full, s_almost_full, s_almost_empty, s_overflow, s_underflow;
  logic [Aw:0]   s_occupancy;

  fifo_top dut (.*);

  // mechanism counters
  int a_n_wr = 0, a_n_rd = 0, a_n_full = 0, a_n_empty = 0, a_n_wblk = 0, a_n_rblk = 0, a_n_cross = 0;
  int s_n_wr = 0, s_n_full = 0, s_n_empty = 0, s_n_over = 0, s_n_under = 0;
  int s_n_half = 0, s_n_afull = 0, s_n_aempty = 0, s_n_both = 0;

  int whalf = 3, rhalf = 7, pw = 70, pr = 60;
  bit running = 0;

  always begin repeat (whalf) #1; a_wclk = ~a_wclk; end
  initial begin #1; forever begin repeat (rhalf) #1; a_rclk = ~a_rclk; end end
  always #4 s_clk = ~s_clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- dual-clock FIFO ----------------
  logic [Dw-1:0] aq [$];
  logic          a_empty_d = 1'b1;

  always @(posedge a_wclk) if (a_wrst_n) begin
    if (a_w_en && !a_full) begin
      check(aq.size() < Depth, "async: write taken only with room");
      aq.push_back(a_data_in);
      a_n_wr++;
    end else if (a_w_en) a_n_wblk++;
    if (a_full) a_n_full++;
  end

  always @(posedge a_rclk) if (a_rrst_n) begin
    if (a_empty_d && !a_empty) a_n_cross++;
    a_empty_d = a_empty;
    if (a_r_en && !a_empty) begin
      logic [Dw-1:0] exp;
      check(aq.size() > 0, "async: read taken only with data");
      exp = aq.size() > 0 ? aq.pop_front() : '0;
      a_n_rd++;
      #1 check(a_data_out == exp, "async: read data in order");
    end else begin
      if (a_r_en) a_n_rblk++;
      if (a_empty) a_n_empty++;
    end
  end

  // Gray pointers change in at most one bit per edge
  logic [Aw:0] gw_prev = '0, gr_prev = '0;
  always @(posedge a_wclk) begin
    #0.5 check($countones(dut.u_async.g_wptr ^ gw_prev) <= 1, "async: write Gray pointer single-bit step");
    gw_prev = dut.u_async.g_wptr;
  end
  always @(posedge a_rclk) begin
    #0.5 check($countones(dut.u_async.g_rptr ^ gr_prev) <= 1, "async: read Gray pointer single-bit step");
    gr_prev = dut.u_async.g_rptr;
  end

  always @(negedge a_wclk) if (running) begin
    a_w_en    <= ($urandom % 100) < pw;
    a_data_in <= Dw'($urandom);
  end
  always @(negedge a_rclk) if (running) a_r_en <= ($urandom % 100) < pr;

  // ---------------- single-clock FIFO ----------------
  logic [Dw-1:0] sq [$];
  logic [Dw-1:0] s_last;

  always @(negedge s_clk) if (running) begin
    s_wr_en   = ($urandom % 100) < (($time / 20000) % 2 == 0 ? 65 : 35);
    s_rd_en   = ($urandom % 100) < (($time / 20000) % 2 == 0 ? 35 : 65);
    s_wr_data = Dw'($urandom);
  end

  always @(posedge s_clk) if (running) begin
    int n;
    logic acc_w, acc_r, exp_over, exp_under;
    n = sq.size();
    check(s_empty == (n == 0) && s_full == (n == Depth) && int'(s_occupancy) == n,
          "sync: flags and occupancy");
    check(s_half_full == (n >= Depth / 2) && s_almost_full == (n >= fifo_pkg::DefAlmostFull)
          && s_almost_empty == (n <= fifo_pkg::DefAlmostEmpty), "sync: level flags");
    if (s_full) s_n_full++;
    if (s_empty) s_n_empty++;
    if (s_half_full) s_n_half++;
    if (s_almost_full) s_n_afull++;
    if (s_almost_empty) s_n_aempty++;
    acc_w = s_wr_en && n < Depth;
    acc_r = s_rd_en && n > 0;
    exp_over  = s_wr_en && n == Depth;
    exp_under = s_rd_en && n == 0;
    if (acc_r) s_last = sq.pop_front();
    if (acc_w) begin sq.push_back(s_wr_data); s_n_wr++; end
    if (acc_w && acc_r) s_n_both++;
    #1;
    check(s_rd_data == s_last, "sync: read data in order");
    check(s_overflow == exp_over && s_underflow == exp_under, "sync: overflow/underflow pulses");
    if (s_overflow) s_n_over++;
    if (s_underflow) s_n_under++;
  end

  // ---------------- sequence ----------------
  task automatic need(input int count, input string what);
    checks++;
    if (count == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
    else $display("  %-34s %0d", what, count);
  endtask

  initial begin
    repeat (4) @(posedge a_rclk);
    a_wrst_n = 1; a_rrst_n = 1; s_rst_n = 1;
    repeat (3) @(posedge s_clk);   // reset release through the reset logic
    @(negedge s_clk) s_last = s_rd_data;
    running = 1;
    repeat (3000) @(posedge a_rclk);
    whalf = 7; rhalf = 3; pw = 60; pr = 70;   // reader faster
    repeat (3000) @(posedge a_wclk);
    whalf = 5; rhalf = 6; pw = 50; pr = 50;   // nearly equal
    repeat (3000) @(posedge a_wclk);
    running = 0;
    @(negedge a_wclk) a_w_en = 0;
    @(negedge a_rclk) a_r_en = 1;
    repeat (4 * Depth) @(posedge a_rclk);
    @(negedge a_rclk) a_r_en = 0;
    check(aq.size() == 0 && a_empty, "async: all data delivered");
    $display("mechanisms:");
    need(a_n_full, "async full");
    need(a_n_empty, "async empty");
    need(a_n_wblk, "async write refused (full)");
    need(a_n_rblk, "async read refused (empty)");
    need(a_n_wr / (2 * Depth), "async pointer wrap-around");
    need(a_n_cross, "async write seen across domains");
    need(s_n_full, "sync full");
    need(s_n_empty, "sync empty");
    need(s_n_over, "sync overflow");
    need(s_n_under, "sync underflow");
    need(s_n_half, "sync half_full");
    need(s_n_afull, "sync almost_full");
    need(s_n_aempty, "sync almost_empty");
    need(s_n_both, "sync simultaneous read and write");
    need(s_n_wr / (2 * Depth), "sync pointer wrap-around");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
