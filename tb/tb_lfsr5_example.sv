// tb_lfsr5_example: self-checking test of the 5-stage example LFSR.
//
// From the seed 5'h1F the first clock must load 0 into stage 0 (5'h1E). The
// register must visit 31 distinct non-zero states and return to the seed
// after exactly 31 clocks (maximal length 2^5 - 1). Each state is compared
// with a model that computes the feedback as stage1 XOR stage4; load and a
// held enable are also checked.
module tb_lfsr5_example;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load, en, dout;
  logic [4:0] q, m;
  bit seen [32];

  lfsr5_example dut (.clk(clk), .rst_n(rst_n), .load(load), .en(en), .q(q), .dout(dout));

  initial begin
    load = 0; en = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (q != 5'h1F) begin failures++; $display("FAIL seed %h", q); end
    en = 1; m = 5'h1F;
    for (int i = 1; i <= 31; i++) begin
      @(posedge clk); #1;
      m = {m[3:0], m[4] ^ m[1]};
      checks++;
      if (q != m || dout != q[4] || seen[q] || q == 0) begin
        failures++; $display("FAIL step %0d: %b expected %b", i, q, m);
      end
      if (i == 1) begin checks++; if (q != 5'h1E) begin failures++; $display("FAIL first"); end end
      if (i < 31) seen[q] = 1'b1;
    end
    checks++; if (q != 5'h1F) begin failures++; $display("FAIL period"); end
    // hold and load
    repeat (5) @(posedge clk); #1;
    en = 0;
    m = q; repeat (3) @(posedge clk); #1;
    checks++; if (q != m) begin failures++; $display("FAIL hold"); end
    load = 1; @(posedge clk); #1; load = 0;
    checks++; if (q != 5'h1F) begin failures++; $display("FAIL load"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
