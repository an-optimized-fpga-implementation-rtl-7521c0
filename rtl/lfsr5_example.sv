// lfsr5_example: 5-stage Fibonacci LFSR pseudorandom sequence generator.
//
// Stages 1 and 4 are XORed and the result is shifted into stage 0 (the LS
// bit) each clock; the output is the MS bit, stage 4. The taps correspond to
// x^5 + x^2 + 1, a primitive polynomial, so from any non-zero seed the
// register walks through all 31 non-zero states before repeating. From the
// seed 5'h1F the first feedback bit is 1 XOR 1 = 0, so the first clock loads
// a 0 into stage 0 (5'h1E).
//
// Interface: rst_n (asynchronous) and load (synchronous) set the register to
// SEED; en advances one state per clock. q is the register, dout its MS bit.
// The all-zero state is a lock-up state of an XOR LFSR and is never reached
// from a non-zero seed; SEED must be non-zero.
module lfsr5_example #(
  parameter logic [4:0] SEED = 5'h1F
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic       en,
  output logic [4:0] q,
  output logic       dout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= SEED;
    else if (load) q <= SEED;
    else if (en)   q <= {q[3:0], q[1] ^ q[4]};
  end

  assign dout = q[4];

endmodule
