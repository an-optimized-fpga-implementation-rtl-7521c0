// updown_counter: binary up/down counter with wrap-around.
//
// When en is high the count steps by one each clock, upward when up is 1 and
// downward when up is 0, wrapping from all ones to zero and back (for 3 bits:
// 000, 001, ... 111, 000 counting up). The design uses it as the bit counter
// of the transmitter, the receiver and the error injector, with a width of 7
// bits, enough for the longest frame of 64 data bits plus 15 CRC bits.
//
// Interface: rst_n resets asynchronously and clear synchronously to zero;
// clear has priority over en. q changes on the clock edge after en.
module updown_counter #(
  parameter int unsigned WIDTH = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic             up,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (clear) q <= '0;
    else if (en)    q <= up ? q + 1'b1 : q - 1'b1;
  end

endmodule
