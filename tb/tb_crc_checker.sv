// tb_crc_checker: self-checking test of the receiver CRC checker.
//
// Frames built by the reference model (data then CRC) are fed bit by bit with
// random gaps in rx_valid. An intact frame must end with remainder zero, ack
// and crc_err low; a frame with one or more inverted bits must end with the
// remainder the long-division reference gives for the damaged bits, nak and
// crc_err high. done must come exactly one clock after the last bit. The
// case of 10101010 with its 8th bit inverted must give 100010110011001.
module tb_crc_checker;
  import can_crc_pkg::*;
  import tb_can_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, rxb, rxv, err, done, ack, nak, busy;
  dlc_t dlc;
  crc_t rem;

  crc_checker dut (.clk(clk), .rst_n(rst_n), .start(start), .dlc(dlc), .rx_bit(rxb),
    .rx_valid(rxv), .remainder(rem), .crc_err(err), .done(done), .ack(ack), .nak(nak),
    .busy(busy));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // flip: bit mask over the frame (bit 78 = first bit)
  task automatic run(input logic [63:0] d, input logic [3:0] c, input logic [78:0] flip,
                     input bit gaps);
    int n, k;
    logic [78:0] f;
    logic b[];
    logic [14:0] exp_r;
    n = dlc_bits(c) + 15;
    f = ref_frame(d, dlc_bits(c)) ^ flip;
    b = new[n];
    for (int i = 0; i < n; i++) b[i] = f[78-i];
    exp_r = ref_rem(b, n);
    @(negedge clk);
    dlc = c; start = 1;
    @(negedge clk); start = 0; dlc = 4'($urandom);
    k = 0;
    while (k < n) begin
      rxv = gaps ? (($urandom % 3) != 0) : 1'b1;
      rxb = rxv ? f[78-k] : 1'($urandom);
      check(!done, "no early done");
      @(negedge clk);
      if (rxv) k++;
    end
    rxv = 0; rxb = 0; #1;
    check(done && (ack == (exp_r == 0)) && (nak == (exp_r != 0)) && rem == exp_r,
          $sformatf("dlc %0d remainder %b expected %b", c, rem, exp_r));
    @(negedge clk);
    check(!done && err == (exp_r != 0) && !busy, "result held");
  endtask

  initial begin
    start = 0; rxb = 0; rxv = 0; dlc = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run(64'hAA00_0000_0000_0000, 4'd1, '0, 0);
    check(rem == '0 && !err, "10101010 frame intact");
    run(64'hAA00_0000_0000_0000, 4'd1, 79'(1) << (78 - 7), 0);
    check(rem == 15'b100010110011001 && err, "10101010 with 8th bit inverted");
    for (int c = 0; c < 16; c++) run({$urandom, $urandom}, 4'(c), '0, 1);
    for (int t = 0; t < 300; t++) begin
      logic [3:0] c;
      logic [78:0] fl;
      int n, pos;
      c = 4'($urandom);
      n = dlc_bits(c) + 15;
      fl = '0;
      pos = int'($urandom % 3);
      case (pos)
        0: ;
        1: begin
          pos = int'($urandom % 32'(n));
          fl[78 - pos] = 1'b1;
        end
        default:
          for (int j = 0; j < 4; j++) begin
            pos = int'($urandom % 32'(n));
            fl[78 - pos] ^= 1'b1;
          end
      endcase
      run({$urandom, $urandom}, c, fl, 1'($urandom));
      if (fl != '0 && $countones(fl) == 1) check(err, $sformatf("single-bit error always detected %h c=%0d rem=%h", fl, c, rem));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
