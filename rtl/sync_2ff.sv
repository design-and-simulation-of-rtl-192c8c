// sync_2ff: two-flip-flop synchronizer for a multi-bit Gray-coded bus.
//
// The bus comes from another clock domain and passes through two cascaded
// registers clocked by the receiving clock. The first register may go
// metastable when the input changes near the clock edge; the second gives it
// a full clock period to settle before the value is used. Because the input
// is Gray coded, at most one bit is in flight at a time, so the output is
// always either the old or the new pointer value.
// Timing: q follows d two rising edges of clk later. Both stages clear to
// zero on the active-low asynchronous reset (the reset value of a pointer).
//   clk, rst_n : receiving clock and its reset
//   d          : bus from the sending domain
//   q          : synchronized bus
module sync_2ff #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
