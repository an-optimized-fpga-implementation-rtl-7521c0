// tb_crc_generator: self-checking test of the CRC latch and frame assembly.
//
// Random CRC values, data fields and DLC codes (0..15) are applied; after a
// latch pulse the registered CRC, frame and frame length must match a model
// that places the first 8*bytes(dlc) data bits and then the CRC bit by bit.
// Without latch the outputs must hold, and clear must drop crc_valid.
module tb_crc_generator;
  import can_crc_pkg::*;
  import tb_can_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   clr, latch, vld;
  crc_t   cin, cout;
  data_t  data;
  dlc_t   dlc;
  frame_t frame, expf;
  cnt_t   flen;

  crc_generator dut (.clk(clk), .rst_n(rst_n), .clear(clr), .latch(latch),
    .crc_in(cin), .data(data), .dlc(dlc), .crc_out(cout), .frame(frame),
    .frame_len(flen), .crc_valid(vld));

  initial begin
    clr = 0; latch = 0; cin = '0; data = '0; dlc = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (vld || frame != '0) begin failures++; $display("FAIL reset"); end
    for (int t = 0; t < 500; t++) begin
      int nb;
      cin  = 15'($urandom);
      data = {$urandom, $urandom};
      dlc  = (t < 16) ? 4'(t) : 4'($urandom);
      nb   = dlc_bits(dlc);
      expf = '0;
      for (int i = 0; i < nb; i++) expf[78-i] = data[63-i];
      for (int i = 0; i < 15; i++) expf[78-nb-i] = cin[14-i];
      latch = 1; @(posedge clk); #1; latch = 0;
      checks++;
      if (!vld || cout != cin || frame != expf || int'(flen) != nb + 15) begin
        failures++;
        $display("FAIL dlc %0d: frame %h expected %h len %0d", dlc, frame, expf, flen);
      end
      // hold without latch
      cin = ~cin; data = ~data;
      @(posedge clk); #1;
      checks++;
      if (frame != expf || cout == cin) begin failures++; $display("FAIL hold"); end
    end
    clr = 1; @(posedge clk); #1; clr = 0;
    checks++; if (vld) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
