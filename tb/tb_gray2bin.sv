// tb_gray2bin: self-checking test of the Gray-to-binary converter.
//
// Feeds every 4-bit and every 8-bit Gray code and checks the result against
// a binary value found by searching, in the testbench, for the n whose
// Gray code n ^ (n >> 1) equals the input.
module tb_gray2bin;
  int checks = 0, failures = 0;

  logic [3:0] g4, b4;
  logic [7:0] g8, b8;
  gray2bin #(.WIDTH(4)) dut4 (.gray(g4), .bin(b4));
  gray2bin #(.WIDTH(8)) dut8 (.gray(g8), .bin(b8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 16; n++) begin
      g4 = 4'(n ^ (n >> 1));
      #1;
      checks++;
      if (b4 !== 4'(n)) begin
        failures++;
        $display("FAIL gray=%h bin=%0d expected %0d", g4, b4, n);
      end
    end
    for (int n = 0; n < 256; n++) begin
      g8 = 8'(n ^ (n >> 1));
      #1;
      checks++;
      if (b8 !== 8'(n)) begin
        failures++;
        $display("FAIL gray=%h bin=%0d expected %0d", g8, b8, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
