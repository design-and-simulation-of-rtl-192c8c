// tb_bin2gray: self-checking test of the binary-to-Gray converter.
//
// For a 4-bit instance it compares every output with the printed reflected
// Gray sequence 0,1,3,2,6,7,5,4,12,13,15,14,10,11,9,8. For an 8-bit instance
// it checks the defining properties instead: successive codes (including the
// wrap from 255 to 0) differ in exactly one bit, and no code repeats.
module tb_bin2gray;
  int checks = 0, failures = 0;

  logic [3:0] b4, g4;
  logic [7:0] b8, g8;
  bin2gray #(.WIDTH(4)) dut4 (.bin(b4), .gray(g4));
  bin2gray #(.WIDTH(8)) dut8 (.bin(b8), .gray(g8));

  localparam logic [3:0] Table [16] = '{0, 1, 3, 2, 6, 7, 5, 4, 12, 13, 15, 14, 10, 11, 9, 8};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] prev;
    logic       seen [256];
    for (int i = 0; i < 16; i++) begin
      b4 = 4'(i);
      #1;
      checks++;
      if (g4 !== Table[i]) begin
        failures++;
        $display("FAIL bin=%0d gray=%0d expected %0d", i, g4, Table[i]);
      end
    end
    for (int i = 0; i < 256; i++) seen[i] = 1'b0;
    b8 = 8'd255;
    #1 prev = g8;
    for (int i = 0; i < 256; i++) begin
      b8 = 8'(i);
      #1;
      checks++;
      if ($countones(g8 ^ prev) != 1 || seen[g8]) begin
        failures++;
        $display("FAIL 8-bit code %0d -> %h (prev %h)", i, g8, prev);
      end
      seen[g8] = 1'b1;
      prev = g8;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
