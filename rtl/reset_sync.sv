// reset_sync: reset logic of the single-clock FIFO.
//
// Takes an external active-low reset that may change at any time and gives
// the FIFO a reset that asserts at once (asynchronously) and releases on a
// rising clock edge, two edges after the input goes high, so that all FIFO
// registers leave reset on the same edge. The document only names a reset
// logic block; the two-flop asynchronous-assert, synchronous-release form is
// this design's choice.
//   clk       : FIFO clock
//   rst_n_in  : external reset, active low, asynchronous
//   rst_n_out : reset for the FIFO, active low, released in step with clk
module reset_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);
  logic stage1;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      stage1    <= 1'b0;
      rst_n_out <= 1'b0;
    end else begin
      stage1    <= 1'b1;
      rst_n_out <= stage1;
    end
  end
endmodule
