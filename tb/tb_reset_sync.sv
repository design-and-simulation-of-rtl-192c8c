// tb_reset_sync: self-checking test of the reset logic.
//
// Checks that the output reset asserts immediately (between clock edges) when
// the input reset falls, and that after the input rises the output stays low
// at the first rising edge and goes high at the second.
module tb_reset_sync;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n_in = 0, rst_n_out;

  reset_sync dut (.clk, .rst_n_in, .rst_n_out);

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input logic v, input string what);
    checks++;
    if (rst_n_out !== v) begin failures++; $display("FAIL %s: rst_n_out=%b", what, rst_n_out); end
  endtask

  initial begin
    for (int round = 0; round < 3; round++) begin
      repeat (2) @(posedge clk);
      #1 expect_out(1'b0, "held in reset");
      @(negedge clk) rst_n_in = 1;
      @(posedge clk); #1 expect_out(1'b0, "first edge after release");
      @(posedge clk); #1 expect_out(1'b1, "second edge after release");
      repeat (3) @(posedge clk);
      #2 rst_n_in = 0;       // mid-cycle assertion
      #1 expect_out(1'b0, "asynchronous assertion");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
