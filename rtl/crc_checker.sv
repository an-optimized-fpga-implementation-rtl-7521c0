// crc_checker: receiver side of the CAN CRC error detection circuit.
//
// The receiver uses the same CRC LFSR as the transmitter: starting from all
// zeros it shifts in the received data field and CRC, MSB first, without
// appending zeros. An intact frame is a multiple of the generator polynomial,
// so the register ends at zero; any non-zero remainder means the frame was
// damaged. A bit counter, loaded with the frame length from the DLC, tells
// when the last CRC bit has arrived.
//
// Interface and timing: start (one clock, before the first bit) clears the
// LFSR and the counter and takes dlc. Each clock with rx_valid shifts rx_bit.
// The clock after the last bit, done pulses together with ack (remainder
// zero) or nak (remainder non-zero), to be returned to the transmitter.
// crc_err holds the result and remainder the register until the next start.
// For one data byte, 23 bits, the result is ready after the 23rd bit.
module crc_checker
  import can_crc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  dlc_t dlc,
  input  logic rx_bit,
  input  logic rx_valid,
  output crc_t remainder,
  output logic crc_err,
  output logic done,
  output logic ack,
  output logic nak,
  output logic busy
);

  cnt_t cnt, flen;
  logic last_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flen <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        flen <= dlc_to_bits(dlc) + cnt_t'(CRC_W);
        busy <= 1'b1;
      end else if (last_bit) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  assign last_bit = busy && rx_valid && (cnt == flen - 1'b1);

  updown_counter #(.WIDTH(CNT_W)) u_cnt (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (start),
    .en    (busy && rx_valid),
    .up    (1'b1),
    .q     (cnt)
  );

  crc_lfsr #(.WIDTH(CRC_W), .POLY(CRC_POLY)) u_lfsr (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (start),
    .shift_en (busy && rx_valid),
    .din      (rx_bit),
    .crc      (remainder)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     crc_err <= 1'b0;
    else if (start) crc_err <= 1'b0;
    else if (done)  crc_err <= |remainder;
  end

  assign ack = done && (remainder == '0);
  assign nak = done && (remainder != '0);

endmodule
