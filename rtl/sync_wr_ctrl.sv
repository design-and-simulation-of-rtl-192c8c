// sync_wr_ctrl: write control and write pointer of the single-clock FIFO.
//
// Write control lets a write request through only when the FIFO is not full
// (wr_accept = wr_en && !full); the accepted write stores the input word at
// the low AW bits of wr_ptr and, on the same rising clock edge, the pointer
// counts up by one. The pointer is an AW+1 bit binary counter: its low bits
// wrap from the last memory address back to 0 (circular buffer), and the
// extra top bit flips at each wrap so that the flag logic can tell a full
// FIFO from an empty one when the addresses are equal. Reset (active low,
// asynchronous) clears the pointer. Blocking writes when full, the binary
// counter and the wrap follow the document; the wrap bit is the usual way to
// do the full/empty distinction it asks for.
module sync_wr_ctrl #(
  parameter int unsigned AW = 3   // address bits; depth is 2**AW
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic        full,
  output logic        wr_accept,
  output logic [AW:0] wr_ptr
);
  always_comb wr_accept = wr_en && !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         wr_ptr <= '0;
    else if (wr_accept) wr_ptr <= wr_ptr + 1'b1;
  end
endmodule
