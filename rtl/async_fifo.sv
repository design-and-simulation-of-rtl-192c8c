// async_fifo: dual-clock FIFO with Gray-coded pointers and two-flop synchronizers.
//
// A producer on wclk and a consumer on rclk, with unrelated frequencies and
// phases, exchange DATA_WIDTH-bit words through DEPTH words of dual-port
// memory. Everything on the write side (write pointer, full flag) runs on
// wclk and everything on the read side (read pointer, empty flag, read data)
// on rclk. The only signals that cross are the two pointers, each converted
// to Gray code in its own domain and passed through a two-flop synchronizer
// in the other: g_wptr into the read domain for the empty test, g_rptr into
// the write domain for the full test. This is the structure of the document's
// block diagram (write pointer handler, read pointer handler, FIFO memory and
// the two synchronizer pairs).
//
// Interface:
//   write side: w_en with data_in; the word is stored on the rising wclk edge
//               when full is low (a write while full is dropped).
//   read side : r_en; when empty is low, the rising rclk edge accepts the
//               read and data_out shows the word from that edge on.
//   wr_level / rd_level: fill-level estimates in each domain.
// Timing: a word written on a wclk edge clears empty after the write pointer
// has crossed, i.e. two to three rclk edges later; likewise a read lowers full
// two to three wclk edges later. Each side has its own active-low
// asynchronous reset (wrst_n, rrst_n); assert both together.
module async_fifo #(
  parameter int unsigned DATA_WIDTH = fifo_pkg::DefDataWidth,
  parameter int unsigned DEPTH      = fifo_pkg::DefDepth,
  localparam int unsigned AW        = $clog2(DEPTH)
) (
  input  logic                  wclk,
  input  logic                  wrst_n,
  input  logic                  w_en,
  input  logic [DATA_WIDTH-1:0] data_in,
  output logic                  full,
  output logic [AW:0]           wr_level,
  input  logic                  rclk,
  input  logic                  rrst_n,
  input  logic                  r_en,
  output logic [DATA_WIDTH-1:0] data_out,
  output logic                  empty,
  output logic [AW:0]           rd_level
);
  if (DEPTH != (1 << AW) || AW < 1) begin : g_bad_depth
    $error("async_fifo: DEPTH must be a power of two of at least 2");
  end

  logic [AW:0] b_wptr, g_wptr, g_wptr_sync;
  logic [AW:0] b_rptr, g_rptr, g_rptr_sync;
  logic        w_accept, r_accept;

  sync_2ff #(.WIDTH(AW + 1)) u_sync_r2w (
    .clk(wclk), .rst_n(wrst_n), .d(g_rptr), .q(g_rptr_sync));

  sync_2ff #(.WIDTH(AW + 1)) u_sync_w2r (
    .clk(rclk), .rst_n(rrst_n), .d(g_wptr), .q(g_wptr_sync));

  wptr_handler #(.AW(AW)) u_wptr (
    .wclk, .wrst_n, .w_en, .g_rptr_sync,
    .b_wptr, .g_wptr, .full, .w_accept, .wr_level);

  rptr_handler #(.AW(AW)) u_rptr (
    .rclk, .rrst_n, .r_en, .g_wptr_sync,
    .b_rptr, .g_rptr, .empty, .r_accept, .rd_level);

  fifo_mem #(.DATA_WIDTH(DATA_WIDTH), .DEPTH(DEPTH)) u_mem (
    .wclk, .wen(w_accept), .waddr(b_wptr[AW-1:0]), .wdata(data_in),
    .rclk, .ren(r_accept), .raddr(b_rptr[AW-1:0]), .rdata(data_out));
endmodule
