// wptr_handler: write-pointer handler of the dual-clock FIFO (write clock domain).
//
// Holds the write pointer twice: in binary (b_wptr), whose low AW bits address
// the memory, and in Gray code (g_wptr), which is what crosses to the read
// domain. Both are AW+1 bits wide; the extra top bit counts wraps of the
// circular buffer, which is what tells "full" from "empty" when the addresses
// coincide. A write is accepted (w_accept) when w_en is high and the FIFO is
// not full; the pointers then advance on that rising edge of wclk.
//
// Full: the next Gray write pointer is compared with the read pointer that has
// come through the two-flop synchronizer (g_rptr_sync). The FIFO is full when
// the two differ in exactly their two top bits, i.e. the write pointer is one
// whole lap ahead. full is registered, so it rises on the same edge that
// stores the last free word. Because the read pointer arrives two write-clock
// edges late, full may stay high a little after a read frees a word; that is
// the safe direction (no overwrite).
//
// wr_level is b_wptr minus the synchronized read pointer turned back into
// binary: a count of stored words that can only over-estimate.
// The comparison in Gray form and the synchronized read pointer follow the
// document; the wrap bit, the registered flag and wr_level are this design's
// own choices. The assertion checks that g_wptr never changes in more than
// one bit per clock.
module wptr_handler #(
  parameter int unsigned AW = 3   // address bits; depth is 2**AW
) (
  input  logic        wclk,
  input  logic        wrst_n,
  input  logic        w_en,
  input  logic [AW:0] g_rptr_sync,
  output logic [AW:0] b_wptr,
  output logic [AW:0] g_wptr,
  output logic        full,
  output logic        w_accept,
  output logic [AW:0] wr_level
);
  localparam logic [AW:0] TopTwo = (AW + 1)'(3) << (AW - 1);  // two top bits set

  logic [AW:0] b_wptr_next, g_wptr_next, rptr_bin;

  always_comb w_accept    = w_en && !full;
  always_comb b_wptr_next = b_wptr + (AW + 1)'(w_accept);

  bin2gray #(.WIDTH(AW + 1)) u_b2g (.bin(b_wptr_next), .gray(g_wptr_next));
  gray2bin #(.WIDTH(AW + 1)) u_g2b (.gray(g_rptr_sync), .bin(rptr_bin));

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      b_wptr <= '0;
      g_wptr <= '0;
      full   <= 1'b0;
    end else begin
      b_wptr <= b_wptr_next;
      g_wptr <= g_wptr_next;
      full   <= (g_wptr_next == (g_rptr_sync ^ TopTwo));
    end
  end

  always_comb wr_level = b_wptr - rptr_bin;

  a_gray_one_bit: assert property (@(posedge wclk) disable iff (!wrst_n)
      $countones(g_wptr ^ $past(g_wptr)) <= 1)
    else $error("write Gray pointer changed in more than one bit");
endmodule
