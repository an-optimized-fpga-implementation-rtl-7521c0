// crc_transmitter: transmitter side of the CAN CRC error detection circuit.
//
// A frame is sent in three phases.
//  * CALC: the data field (8*bytes(dlc) bits, MSB first) and then CRC_W zero
//    bits are shifted through the CRC LFSR, one bit per clock, while the bit
//    counter counts them. When the count reaches 8*bytes(dlc) + CRC_W the
//    counter's compare raises a one-clock latch pulse and the CRC generator
//    stores the remainder and appends it to the data field.
//  * SEND: the frame (data then CRC, MSB first) is put on tx_bit with
//    tx_valid high, one bit per clock; the counter selects the bit.
//  * WAIT: the transmitter waits for the receiver's answer. ack ends the
//    frame with a done pulse. nak resends the stored frame (no new CRC
//    computation) up to MAX_RETRY times; after that the frame is abandoned and
//    gave_up is raised with done.
// The retry limit and the ACK/NAK handshake are this design's choices; the
// LFSR division, the counter-timed latch and the data-then-CRC order follow
// the CAN CRC scheme.
//
// Timing: start is taken in IDLE. CALC takes 8*bytes(dlc) + CRC_W + 1 clocks
// (23 + 1 for one byte), SEND 8*bytes(dlc) + CRC_W clocks. frame_start pulses
// in the clock before the first bit of every transmission, so that the link
// and the receiver can clear their bit counts. crc_done (the latched CRC is
// valid) stays high until the next start.
module crc_transmitter
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
  // answer from the receiver
  input  logic       ack,
  input  logic       nak,
  // serial output
  output logic       tx_bit,
  output logic       tx_valid,
  output logic       frame_start,
  // results
  output crc_t       crc_out,
  output frame_t     frame_out,
  output logic       crc_done,
  output logic       busy,
  output logic       done,
  output logic       gave_up,
  output logic [3:0] retries
);

  tx_state_t state;
  data_t     data_sr;
  dlc_t      dlc_q;
  cnt_t      cnt, nbits, flen;
  crc_t      lfsr_crc;
  logic      calc_shift, latch, cnt_clear, cnt_en;
  logic      last_send, resend;
  data_t     data_sr_at_start;   // copy of the data field kept whole for the generator

  assign nbits = dlc_to_bits(dlc_q);

  assign calc_shift = (state == TX_CALC) && (cnt < flen);
  assign latch      = (state == TX_CALC) && (cnt == flen);
  assign last_send  = (state == TX_SEND) && (cnt == flen - 1'b1);
  assign resend     = (state == TX_WAIT) && nak && (retries < 4'(MAX_RETRY));

  assign cnt_clear  = (state == TX_IDLE) || latch || last_send;
  assign cnt_en     = calc_shift || (state == TX_SEND);

  updown_counter #(.WIDTH(CNT_W)) u_cnt (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (cnt_clear),
    .en    (cnt_en),
    .up    (1'b1),
    .q     (cnt)
  );

  crc_lfsr #(.WIDTH(CRC_W), .POLY(CRC_POLY)) u_lfsr (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (state == TX_IDLE),
    .shift_en (calc_shift),
    .din      ((cnt < nbits) ? data_sr[DATA_W-1] : 1'b0),
    .crc      (lfsr_crc)
  );

  crc_generator u_gen (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     ((state == TX_IDLE) && start),
    .latch     (latch),
    .crc_in    (lfsr_crc),
    .data      (data_sr_at_start),
    .dlc       (dlc_q),
    .crc_out   (crc_out),
    .frame     (frame_out),
    .frame_len (flen),
    .crc_valid (crc_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= TX_IDLE;
      data_sr          <= '0;
      data_sr_at_start <= '0;
      dlc_q            <= '0;
      retries          <= '0;
    end else begin
      unique case (state)
        TX_IDLE: if (start) begin
          data_sr          <= data;
          data_sr_at_start <= data;
          dlc_q            <= dlc;
          retries          <= '0;
          state            <= TX_CALC;
        end
        TX_CALC: begin
          if (calc_shift) data_sr <= data_sr << 1;
          if (latch)      state   <= TX_SEND;
        end
        TX_SEND: if (last_send) state <= TX_WAIT;
        TX_WAIT: begin
          if (ack) state <= TX_IDLE;
          else if (nak) begin
            if (resend) begin
              retries <= retries + 1'b1;
              state   <= TX_SEND;
            end else begin
              state   <= TX_IDLE;
            end
          end
        end
        default: state <= TX_IDLE;
      endcase
    end
  end

  assign tx_valid    = (state == TX_SEND);
  assign tx_bit      = tx_valid ? frame_out[FRAME_W - 1 - int'(cnt)] : 1'b0;
  assign frame_start = latch || resend;
  assign busy        = (state != TX_IDLE);
  assign done        = (state == TX_WAIT) && (ack || nak) && !resend;
  assign gave_up     = (state == TX_WAIT) && !ack && nak && !resend;

  // the counter never runs past the frame length
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == TX_SEND) |-> (cnt < flen));
  // ack and nak are never given together
  assert property (@(posedge clk) disable iff (!rst_n) !(ack && nak));

endmodule
