// crc_pkg -- constants shared by the serial CRC (7,4) encoder and its
// testbenches.
//
// The code is a (7,4) cyclic code: a 4-bit data word is extended by a 3-bit
// remainder to a 7-bit code word. The remainder is the modulo-2 remainder of
// the data word followed by three zeros (the "augmented" data word), divided
// by a 4-bit divisor whose top bit is always 1. The example divisor 1011
// (x^3 + x + 1) is the one used throughout the worked example and the codebook;
// in the hardware the lower three divisor bits are inputs, so it is only a
// default for testbenches.
package crc_pkg;

  localparam int unsigned CRC_N = 7;          // code word bits (n)
  localparam int unsigned CRC_K = 4;          // data word bits (k)
  localparam int unsigned CRC_R = CRC_N - CRC_K;  // remainder bits (n-k)

  // Example divisor 1,dv2,dv1,dv0 = 1011; only the low CRC_R bits are inputs.
  localparam logic [CRC_R:0] CRC_DIVISOR_EXAMPLE = 4'b1011;

  // Reference remainder by long division, bit-serial, most significant bit
  // first: the same recurrence the shift register implements, written as a
  // loop over the message. Used by testbenches as an independent model.
  function automatic logic [CRC_R-1:0] crc_remainder(
      input logic [CRC_N-1:0] augmented,
      input logic [CRC_R-1:0] dv_low);
    logic [CRC_R:0] acc;
    acc = '0;
    for (int i = CRC_N - 1; i >= 0; i--) begin
      acc = {acc[CRC_R-1:0], augmented[i]};
      if (acc[CRC_R]) acc = acc ^ {1'b1, dv_low};
    end
    return acc[CRC_R-1:0];
  endfunction

endpackage
