// crc_lfsr: bit-serial CRC division register (linear feedback shift register).
//
// Each enabled clock the register shifts left by one: the new message bit
// enters the LSB and the bit leaving the MSB is fed back and XORed into every
// stage whose polynomial coefficient is 1. This is polynomial long division
// in modulo-2 arithmetic with the message entering the dividend side, so the
// sender appends WIDTH zero bits to the message and the register then holds
// the CRC; the receiver shifts in message and CRC and finds zero when the
// frame is intact. With the CAN polynomial 15'h4599 the next-state logic is
// seven 2-input XORs (stages 0, 3, 4, 7, 8, 10 and 14).
//
// Interface: clear (synchronous) and rst_n (asynchronous) set all stages to
// zero, which is the initial state of the division. shift_en advances one bit.
// crc is the register itself, valid the clock after the last shift.
module crc_lfsr #(
  parameter int unsigned         WIDTH = 15,
  parameter logic [WIDTH-1:0]    POLY  = 15'h4599
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             shift_en,
  input  logic             din,
  output logic [WIDTH-1:0] crc
);

  logic [WIDTH-1:0] crc_nxt;

  always_comb begin
    crc_nxt = {crc[WIDTH-2:0], din};
    if (crc[WIDTH-1]) crc_nxt = crc_nxt ^ POLY;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        crc <= '0;
    else if (clear)    crc <= '0;
    else if (shift_en) crc <= crc_nxt;
  end

endmodule
