// fifo_top: the dual-clock FIFO and the single-clock FIFO side by side.
//
// The design consists of two FIFOs. The main one moves words between two
// unrelated clock domains, passing only Gray-coded pointers through two-flop
// synchronizers. The second one works on a single clock and has a fuller set
// of status flags. They are independent and share nothing, so each keeps its
// own ports here: prefix a_ for the dual-clock FIFO, s_ for the single-clock
// one. See async_fifo and sync_fifo for the interfaces and timing; there is no
// logic in this module beyond the two instances. Both FIFOs default to eight
// words of eight bits, the size of the original design; putting the two in
// one top level is this implementation's own arrangement.
module fifo_top #(
  parameter int unsigned A_DATA_WIDTH   = fifo_pkg::DefDataWidth,
  parameter int unsigned A_DEPTH        = fifo_pkg::DefDepth,
  parameter int unsigned S_DATA_WIDTH   = fifo_pkg::DefDataWidth,
  parameter int unsigned S_DEPTH        = fifo_pkg::DefDepth,
  parameter int unsigned S_ALMOST_FULL  = fifo_pkg::DefAlmostFull,
  parameter int unsigned S_ALMOST_EMPTY = fifo_pkg::DefAlmostEmpty,
  localparam int unsigned A_AW          = $clog2(A_DEPTH),
  localparam int unsigned S_AW          = $clog2(S_DEPTH)
) (
  // dual-clock FIFO, write domain
  input  logic                    a_wclk,
  input  logic                    a_wrst_n,
  input  logic                    a_w_en,
  input  logic [A_DATA_WIDTH-1:0] a_data_in,
  output logic                    a_full,
  output logic [A_AW:0]           a_wr_level,
  // dual-clock FIFO, read domain
  input  logic                    a_rclk,
  input  logic                    a_rrst_n,
  input  logic                    a_r_en,
  output logic [A_DATA_WIDTH-1:0] a_data_out,
  output logic                    a_empty,
  output logic [A_AW:0]           a_rd_level,
  // single-clock FIFO
  input  logic                    s_clk,
  input  logic                    s_rst_n,
  input  logic                    s_wr_en,
  input  logic [S_DATA_WIDTH-1:0] s_wr_data,
  input  logic                    s_rd_en,
  output logic [S_DATA_WIDTH-1:0] s_rd_data,
  output logic                    s_empty,
  output logic                    s_full,
  output logic                    s_half_full,
  output logic                    s_almost_full,
  output logic                    s_almost_empty,
  output logic                    s_overflow,
  output logic                    s_underflow,
  output logic [S_AW:0]           s_occupancy
);
  async_fifo #(.DATA_WIDTH(A_DATA_WIDTH), .DEPTH(A_DEPTH)) u_async (
    .wclk(a_wclk), .wrst_n(a_wrst_n), .w_en(a_w_en), .data_in(a_data_in),
    .full(a_full), .wr_level(a_wr_level),
    .rclk(a_rclk), .rrst_n(a_rrst_n), .r_en(a_r_en), .data_out(a_data_out),
    .empty(a_empty), .rd_level(a_rd_level));

  sync_fifo #(.DATA_WIDTH(S_DATA_WIDTH), .DEPTH(S_DEPTH),
              .ALMOST_FULL(S_ALMOST_FULL), .ALMOST_EMPTY(S_ALMOST_EMPTY)) u_sync (
    .clk(s_clk), .rst_n(s_rst_n), .wr_en(s_wr_en), .wr_data(s_wr_data),
    .rd_en(s_rd_en), .rd_data(s_rd_data),
    .empty(s_empty), .full(s_full), .half_full(s_half_full),
    .almost_full(s_almost_full), .almost_empty(s_almost_empty),
    .overflow(s_overflow), .underflow(s_underflow), .occupancy(s_occupancy));
endmodule
