// rptr_handler: read-pointer handler of the dual-clock FIFO (read clock domain).
//
// Mirror of the write-pointer handler. Holds the read pointer in binary
// (b_rptr, low AW bits address the memory) and in Gray code (g_rptr, sent to
// the write domain), both AW+1 bits wide with a wrap bit on top. A read is
// accepted (r_accept) when r_en is high and the FIFO is not empty; the
// pointers then advance on that rising edge of rclk, and the memory's read
// register loads the word at the old address on the same edge.
//
// Empty: the next Gray read pointer equals the write pointer that has come
// through the two-flop synchronizer (g_wptr_sync). empty is registered and
// comes out of reset high. Because the write pointer arrives two read-clock
// edges late, empty may stay high a little after a write; that is the safe
// direction (no read of an unwritten word).
//
// rd_level is the synchronized write pointer turned back into binary minus
// b_rptr: a count of stored words that can only under-estimate.
// The Gray comparison with the synchronized write pointer follows the
// document; the registered flag, reset value and rd_level are this design's
// own choices. The assertion checks that g_rptr never changes in more than
// one bit per clock.
module rptr_handler #(
  parameter int unsigned AW = 3   // address bits; depth is 2**AW
) (
  input  logic        rclk,
  input  logic        rrst_n,
  input  logic        r_en,
  input  logic [AW:0] g_wptr_sync,
  output logic [AW:0] b_rptr,
  output logic [AW:0] g_rptr,
  output logic        empty,
  output logic        r_accept,
  output logic [AW:0] rd_level
);
  logic [AW:0] b_rptr_next, g_rptr_next, wptr_bin;

  always_comb r_accept    = r_en && !empty;
  always_comb b_rptr_next = b_rptr + (AW + 1)'(r_accept);

  bin2gray #(.WIDTH(AW + 1)) u_b2g (.bin(b_rptr_next), .gray(g_rptr_next));
  gray2bin #(.WIDTH(AW + 1)) u_g2b (.gray(g_wptr_sync), .bin(wptr_bin));

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      b_rptr <= '0;
      g_rptr <= '0;
      empty  <= 1'b1;
    end else begin
      b_rptr <= b_rptr_next;
      g_rptr <= g_rptr_next;
      empty  <= (g_rptr_next == g_wptr_sync);
    end
  end

  always_comb rd_level = wptr_bin - b_rptr;

  a_gray_one_bit: assert property (@(posedge rclk) disable iff (!rrst_n)
      $countones(g_rptr ^ $past(g_rptr)) <= 1)
    else $error("read Gray pointer changed in more than one bit");
endmodule
