// tb_can_ref_pkg: reference models shared by the testbenches.
//
// ref_crc computes the CAN CRC-15 of the first nbits of a left-aligned data
// field by polynomial long division of data * x^15 by the generator
// 1100010110011001 (x^15 + x^14 + x^10 + x^8 + x^7 + x^4 + x^3 + 1), working
// on an unpacked bit array rather than on a shift register. ref_frame builds
// the expected data-then-CRC frame, left-aligned in 79 bits.
package tb_can_ref_pkg;

  localparam logic [15:0] GEN = 16'b1100010110011001;

  function automatic logic [14:0] ref_rem(input logic bits[], input int n);
    logic a[];
    a = new[n];
    for (int i = 0; i < n; i++) a[i] = bits[i];
    for (int i = 0; i + 15 < n; i++)
      if (a[i])
        for (int k = 0; k < 16; k++) a[i+k] ^= GEN[15-k];
    ref_rem = '0;
    for (int k = 0; k < 15; k++) ref_rem[14-k] = (n >= 15 - k) ? a[n-15+k] : 1'b0;
  endfunction

  function automatic int dlc_bits(input logic [3:0] dlc);
    return 8 * ((dlc > 8) ? 8 : int'(dlc));
  endfunction

  function automatic logic [14:0] ref_crc(input logic [63:0] data, input int nbits);
    logic b[];
    b = new[nbits + 15];
    for (int i = 0; i < nbits + 15; i++) b[i] = (i < nbits) ? data[63-i] : 1'b0;
    return ref_rem(b, nbits + 15);
  endfunction

  function automatic logic [78:0] ref_frame(input logic [63:0] data, input int nbits);
    logic [14:0] c;
    c = ref_crc(data, nbits);
    ref_frame = '0;
    for (int i = 0; i < nbits; i++) ref_frame[78-i] = data[63-i];
    for (int i = 0; i < 15; i++) ref_frame[78-nbits-i] = c[14-i];
  endfunction

endpackage
