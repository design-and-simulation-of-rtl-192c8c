// fifo_pkg: default sizes shared by the FIFO modules and their testbenches.
//
// Both FIFOs are eight words deep and eight bits wide by default: the block
// diagram of the dual-clock FIFO draws a memory of locations 0 to 7, and the
// single-clock FIFO's waveforms show eight-bit write and read data and an
// occupancy that climbs to 8. The almost-full and almost-empty thresholds
// (6 and 1) are the values shown for the single-clock FIFO's parameters in its
// status waveform. Every module takes these as parameter defaults, so a user
// can override them per instance; depths must be powers of two.
package fifo_pkg;
  localparam int unsigned DefDataWidth   = 8;  // bits per word
  localparam int unsigned DefDepth       = 8;  // words
  localparam int unsigned DefAlmostFull  = 6;  // almost_full when occupancy >= this
  localparam int unsigned DefAlmostEmpty = 1;  // almost_empty when occupancy <= this
endpackage
