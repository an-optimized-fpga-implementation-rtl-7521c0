// tb_crc_can: end-to-end test of the CAN CRC error detection circuit.
//
// The top is used with its default parameters. Frames go from the
// transmitter over the link to the receiver and the testbench checks, for
// each frame, the CRC, the remainder and flag at the receiver, the answer
// and the number of clocks (a clean frame of n = 8*bytes(dlc) + 15 bits
// takes n + 1 clocks of CRC computation, n clocks on the line and one clock
// for the answer: 2n + 2 clocks from start to tx_done).
// Scenarios: the 10101010 byte clean and with its 8th bit inverted on the
// link (receiver remainder 100010110011001, NAK, resend accepted); every DLC
// code including 0 and the codes above 8; random frames with and without a
// single injected error; an error held on every attempt until the retries
// run out; and the example pseudorandom LFSR run through its 31 states.
// Each mechanism is counted and one that never happens counts as a failure.
module tb_crc_can;
  import can_crc_pkg::*;
  import tb_can_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   start, inject_en, crc_done, tx_busy, tx_done, gave_up;
  logic   line_bit, line_valid, injected, crc_err, rx_done, rx_ack, rx_nak;
  logic   prbs_load, prbs_en, prbs_out;
  logic [4:0] prbs_state;
  logic [3:0] retries;
  dlc_t   dlc;
  data_t  data;
  cnt_t   inject_pos;
  crc_t   crc_out, rx_remainder;
  frame_t frame_out;

  crc_can dut (.*);

  int n_clean = 0, n_detected = 0, n_resend = 0, n_gave_up = 0, n_dlc_clamp = 0,
      n_dlc_zero = 0, n_prbs = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // errors: number of attempts to corrupt (0 = none, 99 = all)
  task automatic run(input logic [63:0] d, input logic [3:0] c, input int pos, input int errors);
    int nb, n, cyc, attempts, hit;
    logic [14:0] exp_c, exp_bad;
    logic [78:0] f;
    logic b[];
    nb = dlc_bits(c);
    n  = nb + 15;
    exp_c = ref_crc(d, nb);
    f = ref_frame(d, nb);
    if (pos >= 0) f[78 - pos] ^= 1'b1;
    b = new[n];
    for (int i = 0; i < n; i++) b[i] = f[78-i];
    exp_bad = ref_rem(b, n);
    @(negedge clk);
    data = d; dlc = c; start = 1;
    inject_en = (errors > 0); inject_pos = cnt_t'(pos < 0 ? 0 : pos);
    @(negedge clk); start = 0;
    cyc = 1; attempts = 0; hit = 0;
    while (!tx_done) begin
      if (injected) hit++;
      if (rx_done) begin
        attempts++;
        check(crc_out == exp_c, $sformatf("crc %b expected %b", crc_out, exp_c));
        if (inject_en) begin
          check(rx_nak && rx_remainder == exp_bad, $sformatf("damaged frame remainder %b expected %b",
                                                       rx_remainder, exp_bad));
          n_detected++;
        end else
          check(rx_ack && rx_remainder == '0, "intact frame accepted");
        if (rx_nak) n_resend++;
        if (hit >= errors && errors != 99) inject_en = 0;
      end
      @(negedge clk); cyc++;
      check(cyc < 1000, "frame finishes");
      if (cyc >= 1000) return;
    end
    if (errors == 0) begin
      check(cyc == 2 * n + 2, $sformatf("clean frame %0d clocks, expected %0d", cyc, 2 * n + 2));
      check(rx_ack && !gave_up && attempts == 0, "clean frame ACK");
      n_clean++;
    end else if (errors == 99) begin
      check(gave_up && retries == 4'd3 && rx_nak, "gave up after three resends");
      n_detected++;
      n_gave_up++;
    end else begin
      check(rx_ack && !gave_up && attempts == errors, "resent frame accepted");
    end
    if (c > 8) n_dlc_clamp++;
    if (c == 0) n_dlc_zero++;
    inject_en = 0;
    @(negedge clk);
    check(!tx_busy && !crc_err == (errors != 99), "idle with flag");
  endtask

  initial begin
    start = 0; inject_en = 0; inject_pos = '0; dlc = '0; data = '0;
    prbs_load = 0; prbs_en = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // the one-byte example, clean and with the 8th bit inverted
    run(64'hAA00_0000_0000_0000, 4'd1, -1, 0);
    check(crc_out == 15'b100001110010001 && frame_out[78:56] == 23'b10101010_100001110010001,
          "10101010 frame");
    run(64'hAA00_0000_0000_0000, 4'd1, 7, 1);
    // every DLC code
    for (int c = 0; c < 16; c++) run({$urandom, $urandom}, 4'(c), -1, 0);
    // random, some with one corrupted attempt
    for (int t = 0; t < 60; t++) begin
      logic [3:0] c;
      int p, e;
      c = 4'($urandom);
      e = int'($urandom % 3);
      p = int'($urandom % 32'(dlc_bits(c) + 15));
      run({$urandom, $urandom}, c, (e == 0) ? -1 : p, e);
    end
    // persistent error: retries exhausted
    run({$urandom, $urandom}, 4'd5, 20, 99);
    // example LFSR
    @(negedge clk); prbs_en = 1;
    for (int i = 0; i < 31; i++) begin
      @(negedge clk);
      check(prbs_state != 0 && prbs_out == prbs_state[4], "prbs state");
      if (i < 30) check(prbs_state != 5'h1F, "no early repeat");
      n_prbs++;
    end
    check(prbs_state == 5'h1F, "prbs period 31");
    prbs_en = 0;

    $display("mechanisms: clean=%0d detected=%0d resend=%0d gave_up=%0d dlc_clamp=%0d dlc_zero=%0d prbs=%0d",
             n_clean, n_detected, n_resend, n_gave_up, n_dlc_clamp, n_dlc_zero, n_prbs);
    check(n_clean > 0,     "clean frame happened");
    check(n_detected > 0,  "error detection happened");
    check(n_resend > 0,    "NAK resend happened");
    check(n_gave_up > 0,   "retry exhaustion happened");
    check(n_dlc_clamp > 0, "DLC above 8 happened");
    check(n_dlc_zero > 0,  "empty data field happened");
    check(n_prbs > 0,      "example LFSR ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
