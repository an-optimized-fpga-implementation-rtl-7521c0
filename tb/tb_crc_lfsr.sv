// tb_crc_lfsr: self-checking test of the CRC division register.
//
// Three checks: (1) a 5-bit instance with x^5 + x^4 + x^2 + 1 is stepped
// through the textbook division of the 11-bit message 11001011101 with five
// appended zeros and compared with the expected register contents at every
// step (final CRC 00100), then the receiver pass over message + CRC must end
// at zero; (2) the CAN CRC-15 of the byte 10101010 must be 100001110010001;
// (3) random messages are compared with a reference that does the long
// division on a bit array, and message + CRC must leave remainder zero.
module tb_crc_lfsr;
  import can_crc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // 5-bit instance
  logic clr5, sh5, d5;
  logic [4:0] r5;
  crc_lfsr #(.WIDTH(5), .POLY(5'b10101)) u5 (
    .clk(clk), .rst_n(rst_n), .clear(clr5), .shift_en(sh5), .din(d5), .crc(r5));

  // CAN instance
  logic clr, sh, d;
  crc_t r;
  crc_lfsr u15 (.clk(clk), .rst_n(rst_n), .clear(clr), .shift_en(sh), .din(d), .crc(r));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference: remainder of (msg * x^15 [+ tail]) mod G by long division
  function automatic crc_t ref_div(input logic msg[$]);
    logic a[$];
    a = msg;
    for (int i = 0; i + CRC_W < a.size(); i++)
      if (a[i]) begin
        a[i] = 1'b0;
        for (int k = 0; k < CRC_W; k++) a[i+1+k] ^= CRC_POLY[CRC_W-1-k];
      end
    ref_div = '0;
    for (int k = 0; k < CRC_W; k++) ref_div[CRC_W-1-k] = a[a.size()-CRC_W+k];
  endfunction

  task automatic shift15(input logic b);
    d = b; sh = 1'b1; @(posedge clk); #1; sh = 1'b0;
  endtask

  // expected register after each step of the 5-bit example (steps 2..17)
  logic [4:0] exp5 [16] = '{5'b00001, 5'b00011, 5'b00110, 5'b01100, 5'b11001,
                            5'b00111, 5'b01111, 5'b11111, 5'b01010, 5'b10100,
                            5'b11100, 5'b01101, 5'b11010, 5'b00001, 5'b00010,
                            5'b00100};
  logic msg5 [11] = '{1,1,0,0,1,0,1,1,1,0,1};

  initial begin
    clr5 = 0; sh5 = 0; d5 = 0; clr = 0; sh = 0; d = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(r5 == 5'b0 && r == '0, "reset to zero");

    // (1) transmitter: message then five zeros
    for (int s = 0; s < 16; s++) begin
      d5 = (s < 11) ? msg5[s] : 1'b0; sh5 = 1'b1;
      @(posedge clk); #1;
      check(r5 == exp5[s], $sformatf("5-bit step %0d: %b expected %b", s + 2, r5, exp5[s]));
    end
    sh5 = 0;
    // receiver pass: message then the CRC 00100
    clr5 = 1; @(posedge clk); #1; clr5 = 0;
    check(r5 == '0, "synchronous clear");
    for (int s = 0; s < 16; s++) begin
      d5 = (s < 11) ? msg5[s] : exp5[15][15-s]; sh5 = 1'b1;
      @(posedge clk); #1;
    end
    sh5 = 0;
    check(r5 == '0, "5-bit receiver remainder zero");
    // hold when not enabled
    d5 = 1; repeat (3) @(posedge clk); #1;
    check(r5 == '0, "no shift without shift_en");

    // (2) CAN CRC of 10101010
    clr = 1; @(posedge clk); #1; clr = 0;
    for (int i = 7; i >= 0; i--) shift15(8'hAA >> i);
    repeat (CRC_W) shift15(1'b0);
    check(r == 15'b100001110010001, $sformatf("CRC of AA = %b", r));

    // (3) random messages
    for (int t = 0; t < 200; t++) begin
      logic m[$];
      logic mz[$];
      crc_t c;
      int n;
      n = 1 + ($urandom % 64);
      m.delete();
      for (int i = 0; i < n; i++) m.push_back(1'($urandom));
      mz = m;
      for (int i = 0; i < CRC_W; i++) mz.push_back(1'b0);
      clr = 1; @(posedge clk); #1; clr = 0;
      foreach (mz[i]) shift15(mz[i]);
      c = ref_div(mz);
      check(r == c, $sformatf("random %0d: crc %h expected %h", t, r, c));
      // receiver pass
      clr = 1; @(posedge clk); #1; clr = 0;
      foreach (m[i]) shift15(m[i]);
      for (int i = CRC_W - 1; i >= 0; i--) shift15(c[i]);
      check(r == '0, $sformatf("random %0d: receiver remainder %h", t, r));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
