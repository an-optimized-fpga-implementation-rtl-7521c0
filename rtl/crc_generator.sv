// crc_generator: latches the CRC and appends it to the data field.
//
// The transmitter's bit counter raises latch on the clock after the last of
// the data bits and the CRC_W appended zeros have gone through the LFSR. On
// that edge this block stores the LFSR remainder as the CRC and builds the
// frame: the first 8*bytes(dlc) bits of the data field, MSB first and
// left-aligned, immediately followed by the CRC, with the unused bits below
// it zero. Which bits hold the CRC depends on the DLC, so the frame is
// assembled through a DLC-controlled shift (a multiplexer per bit).
//
// Interface: data is left-aligned (byte 0 in the top 8 bits). crc_out, frame
// and crc_valid are registered; clear or rst_n zero them and drop crc_valid.
// frame_len is the number of valid frame bits, 8*bytes(dlc) + CRC_W.
module crc_generator
  import can_crc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   latch,
  input  crc_t   crc_in,
  input  data_t  data,
  input  dlc_t   dlc,
  output crc_t   crc_out,
  output frame_t frame,
  output cnt_t   frame_len,
  output logic   crc_valid
);

  cnt_t   nbits;
  data_t  data_mask;
  frame_t frame_nxt;

  always_comb begin
    nbits     = dlc_to_bits(dlc);
    // keep the top nbits of the data field
    data_mask = ~(DATA_W'({DATA_W{1'b1}}) >> nbits);
    if (nbits == '0) data_mask = '0;
    frame_nxt = {data & data_mask, {CRC_W{1'b0}}}
              | (FRAME_W'(crc_in) << (DATA_W - int'(nbits)));
  end

  assign frame_len = nbits + cnt_t'(CRC_W);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc_out   <= '0;
      frame     <= '0;
      crc_valid <= 1'b0;
    end else if (clear) begin
      crc_out   <= '0;
      frame     <= '0;
      crc_valid <= 1'b0;
    end else if (latch) begin
      crc_out   <= crc_in;
      frame     <= frame_nxt;
      crc_valid <= 1'b1;
    end
  end

endmodule
