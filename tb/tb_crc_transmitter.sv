// tb_crc_transmitter: self-checking test of the transmitter.
//
// For random data fields and every DLC code, the testbench starts a frame and
// checks: the CRC computation takes 8*bytes(dlc) + 15 + 1 clocks up to the
// frame_start pulse; the latched CRC equals the long-division reference
// (10101010 with DLC 1 gives 100001110010001); the serial bits, taken while
// tx_valid is high, are the data field then the CRC, MSB first; a NAK makes
// the same frame go out again, up to MAX_RETRY times, after which gave_up is
// raised; an ACK ends the frame with done.
module tb_crc_transmitter;
  import can_crc_pkg::*;
  import tb_can_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   start, ack, nak, txb, txv, fstart, crc_done, busy, done, gave_up;
  dlc_t   dlc;
  data_t  data;
  crc_t   crc;
  frame_t frame;
  logic [3:0] retries;

  crc_transmitter dut (.clk(clk), .rst_n(rst_n), .start(start), .dlc(dlc), .data(data),
    .ack(ack), .nak(nak), .tx_bit(txb), .tx_valid(txv), .frame_start(fstart),
    .crc_out(crc), .frame_out(frame), .crc_done(crc_done), .busy(busy), .done(done),
    .gave_up(gave_up), .retries(retries));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // receive one transmission; returns the bits seen, left-aligned
  task automatic receive(input int n, output logic [78:0] got);
    int k;
    got = '0; k = 0;
    // the caller is at a falling edge; sample there first
    forever begin
      if (txv) begin got[78-k] = txb; k++; end
      if (k == n) break;
      @(negedge clk);
    end
    @(negedge clk);
    check(!txv, "tx_valid drops after the last bit");
  endtask

  task automatic run_frame(input logic [63:0] d, input logic [3:0] c, input int naks);
    int nb, cyc;
    logic [78:0] exp_f, got;
    logic [14:0] exp_c;
    nb = dlc_bits(c);
    exp_c = ref_crc(d, nb);
    exp_f = ref_frame(d, nb);
    @(negedge clk);
    data = d; dlc = c; start = 1;
    @(negedge clk); start = 0;
    data = ~d;                   // inputs may change once start is taken
    cyc = 1;
    while (!fstart) begin @(negedge clk); cyc++; end
    check(cyc == nb + 15 + 1, $sformatf("CRC computation %0d clocks, expected %0d", cyc, nb + 16));
    @(negedge clk);             // first bit on the line
    check(crc_done && crc == exp_c, $sformatf("dlc %0d crc %b expected %b", c, crc, exp_c));
    for (int a = 0; a <= naks; a++) begin
      receive(nb + 15, got);
      check(got == exp_f, $sformatf("attempt %0d frame %h expected %h", a, got, exp_f));
      // answer
      if (a < naks) begin
        nak = 1; #1;
        if (a < 3) check(fstart && !done, "NAK causes a resend");
        else       check(done && gave_up, "retries exhausted");
        @(negedge clk); nak = 0;
        if (a >= 3) break;
        check(retries == 4'(a + 1), "retry count");
      end else begin
        ack = 1; #1;
        check(done && !gave_up, "ACK ends the frame");
        @(negedge clk); ack = 0;
      end
    end
    check(!busy, "idle after the frame");
  endtask

  initial begin
    start = 0; ack = 0; nak = 0; dlc = '0; data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run_frame(64'hAA00_0000_0000_0000, 4'd1, 0);
    check(crc == 15'b100001110010001, "10101010 CRC");
    for (int c = 0; c < 16; c++) run_frame({$urandom, $urandom}, 4'(c), 0);
    run_frame({$urandom, $urandom}, 4'd8, 1);
    run_frame({$urandom, $urandom}, 4'd3, 4);
    for (int t = 0; t < 40; t++) run_frame({$urandom, $urandom}, 4'($urandom), $urandom % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
