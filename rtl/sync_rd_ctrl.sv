// sync_rd_ctrl: read control and read pointer of the single-clock FIFO.
//
// Read control lets a read request through only when the FIFO is not empty
// (rd_accept = rd_en && !empty); the accepted read loads the word at the low
// AW bits of rd_ptr into the memory's read register and, on the same rising
// clock edge, the pointer counts up by one. The pointer is an AW+1 bit binary
// counter that wraps like the write pointer, with the same extra lap bit.
// Reset (active low, asynchronous) clears the pointer. Blocking reads when
// empty, the binary counter and the wrap follow the document.
module sync_rd_ctrl #(
  parameter int unsigned AW = 3   // address bits; depth is 2**AW
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rd_en,
  input  logic        empty,
  output logic        rd_accept,
  output logic [AW:0] rd_ptr
);
  always_comb rd_accept = rd_en && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         rd_ptr <= '0;
    else if (rd_accept) rd_ptr <= rd_ptr + 1'b1;
  end
endmodule
