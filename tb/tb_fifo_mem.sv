// tb_fifo_mem: self-checking test of the dual-port FIFO memory.
//
// Writes a random word to every address on the write clock (100 MHz), then
// reads them back on an unrelated read clock (about 71 MHz), checking that a
// read shows the word one read-clock edge later and that rdata holds while
// ren is low. A second round overwrites half the addresses and checks that
// only those change, and that a write with wen low stores nothing.
module tb_fifo_mem;
  int checks = 0, failures = 0;

  logic       wclk = 0, rclk = 0;
  logic       wen = 0, ren = 0;
  logic [2:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] model [8];

  fifo_mem #(.DATA_WIDTH(8), .DEPTH(8)) dut (.*);

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input logic [2:0] a, input logic [7:0] v, input logic en);
    @(negedge wclk);
    waddr = a; wdata = v; wen = en;
    @(negedge wclk);
    wen = 0;
    if (en) model[a] = v;
  endtask

  task automatic read_check(input logic [2:0] a);
    logic [7:0] held;
    @(negedge rclk);
    raddr = a; ren = 1;
    @(negedge rclk);
    ren = 0;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      $display("FAIL read addr %0d got %h expected %h", a, rdata, model[a]);
    end
    held = rdata;
    raddr = a + 3'd1;
    @(negedge rclk);
    checks++;
    if (rdata !== held) begin failures++; $display("FAIL rdata changed with ren low"); end
  endtask

  initial begin
    for (int a = 0; a < 8; a++) write(3'(a), 8'($urandom), 1'b1);
    for (int a = 0; a < 8; a++) read_check(3'(a));
    for (int a = 0; a < 8; a += 2) write(3'(a), 8'($urandom), 1'b1);
    write(3'd3, ~model[3], 1'b0);
    for (int a = 7; a >= 0; a--) read_check(3'(a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
