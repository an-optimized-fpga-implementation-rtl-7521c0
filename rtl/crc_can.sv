// crc_can: CAN 2.0 CRC error detection circuit, transmitter to receiver.
//
// The transmitter computes the CRC-15 of the data field with its LFSR, bit
// counter and CRC generator, and sends data followed by CRC on a serial link.
// The link passes through an error injector, which can invert one chosen bit
// to show the detection at work. The receiver divides what arrives by the
// same polynomial with the same LFSR: a zero remainder is answered with ack,
// a non-zero one raises crc_err and answers nak, upon which the transmitter
// sends the stored frame again (up to MAX_RETRY times). Beside the CRC path
// stands a 5-stage example LFSR (x^5 + x^2 + 1 pseudorandom generator) with
// its own ports.
//
// Interface: start with dlc and data (left-aligned, byte 0 in data[63:56])
// begins a frame; inject_en with inject_pos (index of the bit in the frame,
// 0 = first data bit) corrupts that bit of every transmission while held.
// tx_done pulses at the end, with gave_up if the retries ran out. Timing for
// one frame of n = 8*bytes(dlc) + 15 bits: n + 1 clocks of CRC computation,
// n clocks on the line, the receiver's answer one clock after the last bit.
module crc_can
  import can_crc_pkg::*;
#(
  parameter int unsigned MAX_RETRY = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  // frame request
  input  logic       start,
  input  dlc_t       dlc,
  input  data_t      data,
  // error injection on the link
  input  logic       inject_en,
  input  cnt_t       inject_pos,
  // transmitter results
  output crc_t       crc_out,
  output frame_t     frame_out,
  output logic       crc_done,
  output logic       tx_busy,
  output logic       tx_done,
  output logic       gave_up,
  output logic [3:0] retries,
  // serial link, after the injector
  output logic       line_bit,
  output logic       line_valid,
  output logic       injected,
  // receiver results
  output crc_t       rx_remainder,
  output logic       crc_err,
  output logic       rx_done,
  output logic       rx_ack,
  output logic       rx_nak,
  // example pseudorandom LFSR
  input  logic       prbs_load,
  input  logic       prbs_en,
  output logic [4:0] prbs_state,
  output logic       prbs_out
);

  logic tx_bit, tx_valid, frame_start, rx_busy;

  crc_transmitter #(.MAX_RETRY(MAX_RETRY)) u_tx (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .dlc         (dlc),
    .data        (data),
    .ack         (rx_ack),
    .nak         (rx_nak),
    .tx_bit      (tx_bit),
    .tx_valid    (tx_valid),
    .frame_start (frame_start),
    .crc_out     (crc_out),
    .frame_out   (frame_out),
    .crc_done    (crc_done),
    .busy        (tx_busy),
    .done        (tx_done),
    .gave_up     (gave_up),
    .retries     (retries)
  );

  error_injector u_inj (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (frame_start),
    .inject_en  (inject_en),
    .inject_pos (inject_pos),
    .bit_in     (tx_bit),
    .valid_in   (tx_valid),
    .bit_out    (line_bit),
    .injected   (injected)
  );

  // the receiver reads the frame length from the same DLC the transmitter used
  dlc_t dlc_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  dlc_q <= '0;
    else if (start && !tx_busy)  dlc_q <= dlc;
  end

  crc_checker u_rx (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (frame_start),
    .dlc       (dlc_q),
    .rx_bit    (line_bit),
    .rx_valid  (line_valid),
    .remainder (rx_remainder),
    .crc_err   (crc_err),
    .done      (rx_done),
    .ack       (rx_ack),
    .nak       (rx_nak),
    .busy      (rx_busy)
  );

  assign line_valid = tx_valid;

  lfsr5_example u_prbs (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (prbs_load),
    .en    (prbs_en),
    .q     (prbs_state),
    .dout  (prbs_out)
  );

  // every bit on the line arrives while the receiver expects it
  assert property (@(posedge clk) disable iff (!rst_n) line_valid |-> rx_busy);

endmodule
