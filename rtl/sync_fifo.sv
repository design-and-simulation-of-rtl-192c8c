// sync_fifo: single-clock FIFO with full, empty, level and error flags.
//
// Write and read share one clock, so the two binary pointers can be compared
// directly with no synchronizers. The blocks are those of the document's
// block diagram: reset logic, write control with the write pointer, read
// control with the read pointer, the FIFO memory and the flag logic.
//
// Interface (all on the rising edge of clk):
//   wr_en, wr_data : store wr_data when full is low; a write while full is
//                    dropped and raises overflow for one cycle.
//   rd_en, rd_data : when empty is low the read is accepted and rd_data shows
//                    the oldest word from that edge on (one cycle of read
//                    latency); a read while empty is dropped, rd_data holds,
//                    and underflow rises for one cycle.
//   A read and a write on the same edge are both served (except a write when
//   full or a read when empty), so the FIFO moves one word per clock each way.
//   empty, full, half_full, almost_full, almost_empty, occupancy: see
//   sync_flag_logic; they reflect the pointers after the last edge.
// rst_n is an active-low asynchronous reset, released in step with clk by the
// reset logic (two clk edges after it goes high).
module sync_fifo #(
  parameter int unsigned DATA_WIDTH   = fifo_pkg::DefDataWidth,
  parameter int unsigned DEPTH        = fifo_pkg::DefDepth,
  parameter int unsigned ALMOST_FULL  = fifo_pkg::DefAlmostFull,
  parameter int unsigned ALMOST_EMPTY = fifo_pkg::DefAlmostEmpty,
  localparam int unsigned AW          = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic [DATA_WIDTH-1:0] wr_data,
  input  logic                  rd_en,
  output logic [DATA_WIDTH-1:0] rd_data,
  output logic                  empty,
  output logic                  full,
  output logic                  half_full,
  output logic                  almost_full,
  output logic                  almost_empty,
  output logic                  overflow,
  output logic                  underflow,
  output logic [AW:0]           occupancy
);
  if (DEPTH != (1 << AW) || AW < 1) begin : g_bad_depth
    $error("sync_fifo: DEPTH must be a power of two of at least 2");
  end

  logic        rst_n_sync;
  logic        wr_accept, rd_accept;
  logic [AW:0] wr_ptr, rd_ptr;

  reset_sync u_reset (.clk, .rst_n_in(rst_n), .rst_n_out(rst_n_sync));

  sync_wr_ctrl #(.AW(AW)) u_wr (
    .clk, .rst_n(rst_n_sync), .wr_en, .full, .wr_accept, .wr_ptr);

  sync_rd_ctrl #(.AW(AW)) u_rd (
    .clk, .rst_n(rst_n_sync), .rd_en, .empty, .rd_accept, .rd_ptr);

  sync_flag_logic #(.AW(AW), .ALMOST_FULL(ALMOST_FULL), .ALMOST_EMPTY(ALMOST_EMPTY)) u_flags (
    .clk, .rst_n(rst_n_sync), .wr_ptr, .rd_ptr, .wr_en, .rd_en,
    .empty, .full, .half_full, .almost_full, .almost_empty,
    .overflow, .underflow, .occupancy);

  fifo_mem #(.DATA_WIDTH(DATA_WIDTH), .DEPTH(DEPTH)) u_mem (
    .wclk(clk), .wen(wr_accept), .waddr(wr_ptr[AW-1:0]), .wdata(wr_data),
    .rclk(clk), .ren(rd_accept), .raddr(rd_ptr[AW-1:0]), .rdata(rd_data));
endmodule
