// tb_async_fifo: self-checking test of the dual-clock FIFO.
//
// Write and read clocks run at unrelated rates. A queue in the testbench is
// the reference: a monitor on each clock pushes every accepted write and pops
// every accepted read, checks read data in order, and checks that the flags
// are never wrong in the unsafe direction (no write accepted with DEPTH words
// held, no read accepted with none held).
//
// Directed part, with clock edges that never coincide:
//   - after reset both sides see an empty, not-full FIFO;
//   - a single write into the empty FIFO clears empty on exactly the third
//     read-clock edge (two synchronizer stages, then the registered flag);
//   - DEPTH writes with no reads raise full on the edge of the last write;
//   - one read of the full FIFO lowers full on exactly the third write-clock
//     edge after it.
// Random part: writer faster than reader, reader faster than writer, and
// nearly equal clocks, each with random enables, so that full, empty, the
// blocked requests and pointer wrap-around all happen many times; every
// counter must be non-zero at the end.
module tb_async_fifo;
  localparam int Depth = 8, Dw = 8, Aw = 3;
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_wr_blocked = 0, n_rd_blocked = 0, n_full = 0, n_empty = 0;

  logic          wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0, w_en = 0, r_en = 0;
  logic [Dw-1:0] data_in = '0, data_out;
  logic          full, empty;
  logic [Aw:0]   wr_level, rd_level;
  logic [Dw-1:0] q [$];
  int            whalf = 5, rhalf = 7;
  int            pw = 50, pr = 50;   // enable probabilities in percent
  bit            random_on = 0;

  async_fifo #(.DATA_WIDTH(Dw), .DEPTH(Depth)) dut (.*);

  always begin repeat (whalf) #1; wclk = ~wclk; end
  initial begin
    #1;
    forever begin repeat (rhalf) #1; rclk = ~rclk; end
  end

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

  // write-side monitor
  always @(posedge wclk) if (wrst_n) begin
    check(int'(wr_level) >= q.size() && int'(wr_level) <= Depth, "wr_level never under-counts");
    if (w_en && !full) begin
      check(q.size() < Depth, "write accepted only with room");
      q.push_back(data_in);
      n_wr++;
    end else if (w_en) n_wr_blocked++;
    if (full) n_full++;
  end

  // read-side monitor
  always @(posedge rclk) if (rrst_n) begin
    check(int'(rd_level) <= q.size(), "rd_level never over-counts");
    if (r_en && !empty) begin
      logic [Dw-1:0] exp;
      check(q.size() > 0, "read accepted only with data");
      exp = q.size() > 0 ? q.pop_front() : '0;
      n_rd++;
      #1 check(data_out == exp, "read data in write order");
    end else begin
      if (r_en) n_rd_blocked++;
      if (empty) n_empty++;
    end
  end

  // random stimulus
  always @(negedge wclk) if (random_on) begin
    w_en    <= ($urandom % 100) < pw;
    data_in <= Dw'($urandom);
  end
  always @(negedge rclk) if (random_on) r_en <= ($urandom % 100) < pr;

  task automatic write_one(input logic [Dw-1:0] v);
    @(negedge wclk) begin w_en = 1; data_in = v; end
    @(negedge wclk) w_en = 0;
  endtask

  initial begin
    int edges;
    repeat (3) @(posedge rclk);
    wrst_n = 1; rrst_n = 1;
    @(posedge wclk); #1;
    check(empty && !full, "reset state");

    // single write: empty falls on the third read-clock edge after it
    @(negedge wclk) begin w_en = 1; data_in = 8'hA5; end
    @(posedge wclk) #0.1 w_en = 0;
    edges = 0;
    while (empty && edges < 10) begin @(posedge rclk); #0.1 edges++; end
    check(edges == 3, "write-to-not-empty latency of 3 read clocks");
    $display("write to not-empty: %0d read-clock edges", edges);
    // drain it
    @(negedge rclk) r_en = 1;
    @(negedge rclk) r_en = 0;
    repeat (4) @(posedge wclk);

    // fill with no reads: full on the last write
    for (int i = 0; i < Depth; i++) begin
      @(negedge wclk);
      check(!full, "not full before the last write");
      w_en = 1; data_in = Dw'(i + 1);
    end
    @(posedge wclk) #0.1 w_en = 0;
    check(full, "full on the edge of the last write");
    write_one(8'hEE);   // refused
    check(full, "stays full");

    // one read: full falls on the third write-clock edge after it
    @(negedge rclk) r_en = 1;
    @(posedge rclk) #0.1 r_en = 0;
    edges = 0;
    while (full && edges < 10) begin @(posedge wclk); #0.1 edges++; end
    check(edges == 3, "read-to-not-full latency of 3 write clocks");
    $display("read to not-full: %0d write-clock edges", edges);

    // random traffic at three clock ratios
    random_on = 1;
    whalf = 3; rhalf = 7; pw = 70; pr = 60;   // fast writer
    repeat (3000) @(posedge rclk);
    whalf = 7; rhalf = 3; pw = 60; pr = 70;   // fast reader
    repeat (3000) @(posedge wclk);
    whalf = 5; rhalf = 6; pw = 50; pr = 50;   // near-equal clocks
    repeat (3000) @(posedge wclk);
    // drain
    random_on = 0;
    @(negedge wclk) w_en = 0;
    @(negedge rclk) r_en = 1;
    repeat (4 * Depth) @(posedge rclk);
    @(negedge rclk) r_en = 0;
    repeat (4) @(posedge wclk);
    check(q.size() == 0 && empty, "all data delivered");
    check(n_wr > 8 * Depth && n_wr_blocked > 0 && n_rd_blocked > 0 && n_full > 0 && n_empty > 0,
          "full, empty, blocked writes and reads, and wrap-around all seen");
    $display("writes=%0d reads=%0d blocked_w=%0d blocked_r=%0d full_cycles=%0d empty_cycles=%0d",
             n_wr, n_rd, n_wr_blocked, n_rd_blocked, n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
