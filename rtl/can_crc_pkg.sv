// can_crc_pkg: constants, types and helpers shared by the CAN CRC error
// detection blocks.
//
// The CRC is the CAN 2.0 CRC-15 with generator polynomial
// x^15 + x^14 + x^10 + x^8 + x^7 + x^4 + x^3 + 1 (15'h4599 without the x^15
// term). A frame here is the data field (0 to 8 bytes, MSB of byte 0 first)
// followed by the 15 CRC bits. The data field length comes from the 4-bit
// Data Length Code (DLC); codes above 8 are read as 8 bytes, which is this
// design's choice for the codes CAN forbids.
package can_crc_pkg;

  localparam int unsigned CRC_W     = 15;
  localparam logic [CRC_W-1:0] CRC_POLY = 15'h4599;
  localparam int unsigned MAX_BYTES = 8;
  localparam int unsigned DATA_W    = 8 * MAX_BYTES;       // 64-bit data field
  localparam int unsigned FRAME_W   = DATA_W + CRC_W;      // 79-bit frame
  localparam int unsigned CNT_W     = 7;                   // bit counter width

  typedef logic [3:0]         dlc_t;
  typedef logic [CRC_W-1:0]   crc_t;
  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [FRAME_W-1:0] frame_t;
  typedef logic [CNT_W-1:0]   cnt_t;

  // Transmitter sequencing
  typedef enum logic [1:0] {
    TX_IDLE,   // waiting for start
    TX_CALC,   // data + appended zeros through the LFSR
    TX_SEND,   // frame shifted out on the serial line
    TX_WAIT    // waiting for the receiver's ACK or NAK
  } tx_state_t;

  // Number of data bytes encoded by a DLC (Table of DLC codes: 0..8 valid).
  function automatic logic [3:0] dlc_to_bytes(dlc_t dlc);
    return (dlc > 4'd8) ? 4'd8 : dlc;
  endfunction

  // Number of data-field bits for a DLC.
  function automatic cnt_t dlc_to_bits(dlc_t dlc);
    return cnt_t'({dlc_to_bytes(dlc), 3'b000});
  endfunction

endpackage
