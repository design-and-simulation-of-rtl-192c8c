// tb_sync_2ff: self-checking test of the two-flop synchronizer.
//
// Checks that both stages clear on reset, and that with random input a value
// presented before one rising edge reaches q on the following edge: q always
// equals the input of the previous cycle, two register stages after it.
module tb_sync_2ff;
  int checks = 0, failures = 0;

  logic       clk = 0, rst_n = 0;
  logic [3:0] d, q;
  logic [3:0] hist [3];

  sync_2ff #(.WIDTH(4)) dut (.clk, .rst_n, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 4'hF;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (q !== 4'h0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1;
    // first edge after reset: meta takes d, q still 0
    @(posedge clk); #1;
    checks++;
    if (q !== 4'h0) begin failures++; $display("FAIL q changed after one edge"); end
    @(posedge clk); #1;
    checks++;
    if (q !== 4'hF) begin failures++; $display("FAIL q=%h after two edges", q); end
    hist[0] = d; hist[1] = d;
    for (int i = 0; i < 200; i++) begin
      d = 4'($urandom);
      @(posedge clk); #1;
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d;
      // q now holds the d that was applied one cycle earlier
      checks++;
      if (q !== hist[1]) begin
        failures++;
        $display("FAIL cycle %0d q=%h expected %h", i, q, hist[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
