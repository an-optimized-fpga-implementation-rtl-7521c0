// tb_error_injector: self-checking test of the link error injector.
//
// Random frames of random length are passed through; with inject_en low every
// bit must pass unchanged, with inject_en high exactly the bit at index
// inject_pos (counted over valid bits from start) must be inverted, gaps in
// valid must not advance the index, and injected must pulse once.
module tb_error_injector;
  import can_crc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, inj_en, bin, vin, bout, injected;
  cnt_t pos;

  error_injector dut (.clk(clk), .rst_n(rst_n), .start(start), .inject_en(inj_en),
    .inject_pos(pos), .bit_in(bin), .valid_in(vin), .bit_out(bout),
    .injected(injected));

  initial begin
    start = 0; inj_en = 0; bin = 0; vin = 0; pos = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int n, idx, flips;
      n = 15 + ($urandom % 65);
      inj_en = 1'($urandom);
      pos = cnt_t'($urandom % n);
      start = 1; @(posedge clk); #1; start = 0;
      idx = 0; flips = 0;
      while (idx < n) begin
        vin = ($urandom % 4) != 0;
        bin = 1'($urandom);
        #1;
        checks++;
        if (bout != (bin ^ (vin && inj_en && idx == int'(pos)))) begin
          failures++; $display("FAIL frame %0d bit %0d", t, idx);
        end
        if (injected) flips++;
        @(posedge clk); #1;
        if (vin) idx++;
      end
      vin = 0;
      checks++;
      if (flips != (inj_en ? 1 : 0)) begin failures++; $display("FAIL flips %0d", flips); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
