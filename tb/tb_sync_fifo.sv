// tb_sync_fifo: self-checking test of the single-clock FIFO.
//
// A queue in the testbench is the reference. Each cycle the testbench sets
// wr_en, rd_en and wr_data before the rising edge, then updates the queue by
// the FIFO rules (a write is taken when fewer than DEPTH words are held, a
// read when at least one is) and after the edge checks rd_data (the word
// popped at that edge, one cycle of read latency), occupancy, all five level
// flags and the overflow/underflow pulses. The sequence follows the document's
// scenarios: continuous writes into a full FIFO, continuous reads out of an
// empty one, simultaneous reads and writes (one word per clock each way,
// checked by counting), and a long random mix that wraps the pointers many
// times. It also checks that the FIFO leaves reset empty after the two-edge
// reset release.
module tb_sync_fifo;
  localparam int Depth = 8, Dw = 8;
  int checks = 0, failures = 0;
  int n_full = 0, n_over = 0, n_under = 0, n_both = 0;

  logic          clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [Dw-1:0] wr_data = '0, rd_data;
  logic          empty, full, half_full, almost_full, almost_empty, overflow, underflow;
  logic [3:0]    occupancy;
  logic [Dw-1:0] q [$];
  logic [Dw-1:0] last_read;

  sync_fifo #(.DATA_WIDTH(Dw), .DEPTH(Depth), .ALMOST_FULL(6), .ALMOST_EMPTY(1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one clock cycle with the given requests, then all checks
  task automatic cycle(input logic we, input logic re);
    int n;
    logic acc_w, acc_r, exp_over, exp_under;
    @(negedge clk);
    wr_en = we; rd_en = re; wr_data = Dw'($urandom);
    n = q.size();
    #1 check(empty == (n == 0) && full == (n == Depth), "flags before edge");
    acc_w = we && n < Depth;
    acc_r = re && n > 0;
    exp_over  = we && n == Depth;
    exp_under = re && n == 0;
    @(posedge clk);
    if (acc_r) last_read = q.pop_front();
    if (acc_w) q.push_back(wr_data);
    if (acc_w && acc_r) n_both++;
    #1;
    n = q.size();
    check(rd_data == last_read, "read data");
    check(int'(occupancy) == n, "occupancy");
    check(empty == (n == 0), "empty");
    check(full == (n == Depth), "full");
    check(half_full == (n >= Depth / 2), "half_full");
    check(almost_full == (n >= 6), "almost_full");
    check(almost_empty == (n <= 1), "almost_empty");
    check(overflow == exp_over, "overflow");
    check(underflow == exp_under, "underflow");
    if (full) n_full++;
    if (overflow) n_over++;
    if (underflow) n_under++;
  endtask

  initial begin
    int got;
    last_read = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (2) @(posedge clk);
    #1 check(empty && !full && occupancy == 0, "empty after reset");
    // the first read of an empty FIFO must be refused and leave rd_data alone
    @(negedge clk) last_read = rd_data;
    // continuous writes: fill, then keep writing into a full FIFO
    repeat (Depth + 3) cycle(1, 0);
    // continuous reads: drain, then keep reading an empty FIFO
    repeat (Depth + 3) cycle(0, 1);
    // simultaneous reads and writes: half fill, then both every cycle
    repeat (4) cycle(1, 0);
    got = n_both;
    repeat (20) cycle(1, 1);
    check(n_both - got == 20, "one word in and one out per clock");
    // random mix
    for (int i = 0; i < 3000; i++) cycle($urandom % 2 == 1, $urandom % 2 == 1);
    repeat (Depth + 1) cycle(0, 1);
    check(n_full > 0 && n_over > 0 && n_under > 0, "full, overflow and underflow all seen");
    $display("full=%0d overflow=%0d underflow=%0d simultaneous=%0d", n_full, n_over, n_under, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
