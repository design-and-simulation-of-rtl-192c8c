// bin2gray: binary to reflected Gray code converter (combinational).
//
// Each pointer handler of the dual-clock FIFO turns its binary pointer into
// Gray code before the value crosses to the other clock domain, so that
// successive pointer values differ in a single bit. The conversion is the
// standard one, gray = bin ^ (bin >> 1). Purely combinational, no clock.
//   bin  : binary input, WIDTH bits
//   gray : Gray-coded output, WIDTH bits
module bin2gray #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] bin,
  output logic [WIDTH-1:0] gray
);
  always_comb gray = bin ^ (bin >> 1);
endmodule
