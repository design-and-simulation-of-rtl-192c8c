// tb_sync_wr_ctrl: self-checking test of the single-clock write control.
//
// Drives random wr_en and full and checks that wr_accept is wr_en && !full,
// that the write pointer advances by one exactly on accepted writes, wraps
// through all 2*DEPTH values, and clears on reset.
module tb_sync_wr_ctrl;
  localparam int AW = 3;
  int checks = 0, failures = 0, wraps = 0;

  logic        clk = 0, rst_n = 0, wr_en = 0, full = 0, wr_accept;
  logic [AW:0] wr_ptr, model = '0;

  sync_wr_ctrl #(.AW(AW)) dut (.*);

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
    repeat (2) @(posedge clk);
    #1 check(wr_ptr == 0, "reset");
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      wr_en = $urandom % 2 == 1;
      full  = $urandom % 4 == 0;
      #1 check(wr_accept == (wr_en && !full), "wr_accept");
      @(posedge clk);
      if (wr_en && !full) begin
        model++;
        if (model == 0) wraps++;
      end
      #1 check(wr_ptr == model, "write pointer");
    end
    check(wraps > 0, "pointer wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
