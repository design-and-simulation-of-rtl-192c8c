// gray2bin: reflected Gray code to binary converter (combinational).
//
// A Gray pointer that has crossed into the other clock domain is compared in
// Gray form for the full and empty flags; it is turned back into binary only
// where arithmetic is needed, here the fill-level count of each domain. Bit i
// of the binary value is the XOR of Gray bits WIDTH-1 down to i, computed as a
// running XOR from the most significant bit. Purely combinational, no clock.
//   gray : Gray-coded input, WIDTH bits
//   bin  : binary output, WIDTH bits
module gray2bin #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] gray,
  output logic [WIDTH-1:0] bin
);
  always_comb begin
    bin[WIDTH-1] = gray[WIDTH-1];
    for (int i = int'(WIDTH) - 2; i >= 0; i--) bin[i] = bin[i+1] ^ gray[i];
  end
endmodule
