// sync_flag_logic: status flags of the single-clock FIFO.
//
// occupancy = wr_ptr - rd_ptr (AW+1 bits, modulo 2**(AW+1)) is the number of
// stored words, 0 to DEPTH. From it, combinationally:
//   empty        when the pointers are equal (occupancy 0)
//   full         when the addresses are equal but the lap bits differ
//                (occupancy DEPTH)
//   half_full    occupancy >= DEPTH/2
//   almost_full  occupancy >= ALMOST_FULL
//   almost_empty occupancy <= ALMOST_EMPTY
// and, registered for one clock cycle after the offending request:
//   overflow     a write was requested while full (the write was dropped)
//   underflow    a read was requested while empty (the read was dropped)
// The pointers are registers, so the combinational flags change only just
// after a clock edge. Empty, full, overflow and underflow follow the document's
// text; half_full, almost_full and almost_empty come from its block diagram,
// and their thresholds and the one-cycle overflow/underflow pulses from its
// waveforms. Reset (active low, asynchronous) clears the two pulse flags.
module sync_flag_logic #(
  parameter int unsigned AW           = 3,
  parameter int unsigned ALMOST_FULL  = fifo_pkg::DefAlmostFull,
  parameter int unsigned ALMOST_EMPTY = fifo_pkg::DefAlmostEmpty
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [AW:0] wr_ptr,
  input  logic [AW:0] rd_ptr,
  input  logic        wr_en,
  input  logic        rd_en,
  output logic        empty,
  output logic        full,
  output logic        half_full,
  output logic        almost_full,
  output logic        almost_empty,
  output logic        overflow,
  output logic        underflow,
  output logic [AW:0] occupancy
);
  localparam int unsigned Depth = 1 << AW;

  always_comb begin
    occupancy    = wr_ptr - rd_ptr;
    empty        = (wr_ptr == rd_ptr);
    full         = (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]) && (wr_ptr[AW] != rd_ptr[AW]);
    half_full    = 32'(occupancy) >= Depth / 2;
    almost_full  = 32'(occupancy) >= ALMOST_FULL;
    almost_empty = 32'(occupancy) <= ALMOST_EMPTY;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      overflow  <= wr_en && full;
      underflow <= rd_en && empty;
    end
  end

  a_occupancy_in_range: assert property (@(posedge clk) disable iff (!rst_n)
      32'(occupancy) <= Depth)
    else $error("FIFO occupancy above depth");
endmodule
