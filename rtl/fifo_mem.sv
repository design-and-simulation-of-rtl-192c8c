// fifo_mem: dual-port FIFO storage array with independent write and read clocks.
//
// DEPTH words of DATA_WIDTH bits. Port A writes wdata at waddr on a rising
// edge of wclk when wen is high. Port B copies the word at raddr into the
// rdata register on a rising edge of rclk when ren is high, so read data
// appears one read-clock cycle after the read is accepted and holds until the
// next accepted read. The array itself has no reset; the FIFO control never
// reads a location before writing it. The same module serves the single-clock
// FIFO with both clocks tied together. The document asks for a dual-port
// memory; the registered read port is this design's own choice.
module fifo_mem #(
  parameter int unsigned DATA_WIDTH = fifo_pkg::DefDataWidth,
  parameter int unsigned DEPTH      = fifo_pkg::DefDepth,
  localparam int unsigned AW        = $clog2(DEPTH)
) (
  input  logic                  wclk,
  input  logic                  wen,
  input  logic [AW-1:0]         waddr,
  input  logic [DATA_WIDTH-1:0] wdata,
  input  logic                  rclk,
  input  logic                  ren,
  input  logic [AW-1:0]         raddr,
  output logic [DATA_WIDTH-1:0] rdata
);
  logic [DATA_WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (wen) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    if (ren) rdata <= mem[raddr];
  end
endmodule
