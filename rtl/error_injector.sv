// error_injector: deliberate single-bit error on the serial link.
//
// The injector counts the valid bits of each frame from start and, when
// inject_en is high, inverts the bit whose index (0 = first bit sent) equals
// inject_pos. It lets the receiver's error detection be demonstrated on a
// corrupted frame. The bit path is combinational: bit_out follows bit_in in
// the same clock; the bit's valid is the transmitter's own.
//
// Interface: start (one clock, before the first bit of a frame) clears the
// bit index; injected pulses in the clock a bit is inverted.
module error_injector
  import can_crc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic inject_en,
  input  cnt_t inject_pos,
  input  logic bit_in,
  input  logic valid_in,
  output logic bit_out,
  output logic injected
);

  cnt_t idx;

  updown_counter #(.WIDTH(CNT_W)) u_idx (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (start),
    .en    (valid_in),
    .up    (1'b1),
    .q     (idx)
  );

  assign injected  = inject_en && valid_in && (idx == inject_pos);
  assign bit_out   = bit_in ^ injected;

endmodule
