// tb_sync_rd_ctrl: self-checking test of the single-clock read control.
//
// Drives random rd_en and empty and checks that rd_accept is rd_en && !empty,
// that the read pointer advances by one exactly on accepted reads, wraps
// through all 2*DEPTH values, and clears on reset.
module tb_sync_rd_ctrl;
  localparam int AW = 3;
  int checks = 0, failures = 0, wraps = 0;

  logic        clk = 0, rst_n = 0, rd_en = 0, empty = 0, rd_accept;
  logic [AW:0] rd_ptr, model = '0;

  sync_rd_ctrl #(.AW(AW)) dut (.*);

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
    #1 check(rd_ptr == 0, "reset");
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      rd_en = $urandom % 2 == 1;
      empty  = $urandom % 4 == 0;
      #1 check(rd_accept == (rd_en && !empty), "rd_accept");
      @(posedge clk);
      if (rd_en && !empty) begin
        model++;
        if (model == 0) wraps++;
      end
      #1 check(rd_ptr == model, "read pointer");
    end
    check(wraps > 0, "pointer wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
