// tb_updown_counter: self-checking test of the up/down counter.
//
// A 3-bit and a 7-bit instance are driven with random enable, direction and
// clear; a model counts alongside in plain integer arithmetic modulo 2^WIDTH.
// The 3-bit instance is also taken through the full up and down sequences
// (000 .. 111 .. 000 and 111 .. 000 .. 111) including the wrap.
module tb_updown_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clr, en, up;
  logic [2:0] q3;
  logic [6:0] q7;
  updown_counter #(.WIDTH(3)) u3 (.clk(clk), .rst_n(rst_n), .clear(clr), .en(en), .up(up), .q(q3));
  updown_counter                u7 (.clk(clk), .rst_n(rst_n), .clear(clr), .en(en), .up(up), .q(q7));

  int m3, m7;

  initial begin
    clr = 0; en = 0; up = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (q3 != 0 || q7 != 0) begin failures++; $display("FAIL reset"); end
    // full up sequence with wrap
    en = 1; up = 1;
    for (int i = 1; i <= 9; i++) begin
      @(posedge clk); #1;
      checks++; if (q3 != 3'(i)) begin failures++; $display("FAIL up %0d: %0d", i, q3); end
    end
    // back down through zero
    up = 0;
    for (int i = 0; i <= 9; i++) begin
      @(posedge clk); #1;
      checks++; if (q3 != 3'(-i)) begin failures++; $display("FAIL down %0d: %0d", i, q3); end
    end
    // random
    clr = 1; @(posedge clk); #1; clr = 0;
    m3 = 0; m7 = 0;
    for (int t = 0; t < 2000; t++) begin
      en = 1'($urandom); up = 1'($urandom); clr = ($urandom % 50) == 0;
      @(posedge clk); #1;
      if (clr) begin m3 = 0; m7 = 0; end
      else if (en) begin
        m3 = (m3 + (up ? 1 : 7)) % 8;
        m7 = (m7 + (up ? 1 : 127)) % 128;
      end
      checks++;
      if (q3 != 3'(m3) || q7 != 7'(m7)) begin
        failures++; $display("FAIL random %0d: %0d/%0d expected %0d/%0d", t, q3, q7, m3, m7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
