// crc_ref_pkg: reference model for the CRC testbenches.
//
// Computes the CRC by polynomial long division, independently of any shift
// register: the message M(x), first bit as the highest power, is multiplied
// by x^16 and reduced modulo G(x) = x^16 + poly(x), where poly holds the
// coefficients of x^15..x^0 (bit 0, the +1 term, is always set by the
// hardware). The remainder is returned with the x^15 coefficient in bit 15,
// which is the first CRC bit the generator sends.
package crc_ref_pkg;

  localparam int unsigned MAX_BITS = 64;

  // Named degree-16 polynomials, x^16 term implied.
  localparam logic [15:0] POLY_CRC16       = 16'h8005;  // x16+x15+x2+1
  localparam logic [15:0] POLY_CCITT       = 16'h1021;  // x16+x12+x5+1
  localparam logic [15:0] POLY_CRC16_REV   = 16'h4003;  // x16+x14+x+1
  localparam logic [15:0] POLY_CCITT_REV   = 16'h0811;  // x16+x11+x4+1

  // msg[nbits-1] is the first bit sent.
  function automatic logic [15:0] crc_div(input logic [MAX_BITS-1:0] msg,
                                          input int unsigned nbits,
                                          input logic [15:0] poly);
    logic [MAX_BITS+15:0] dividend;
    logic [16:0]          g;
    g        = {1'b1, poly};
    dividend = '0;
    for (int i = 0; i < int'(nbits); i++) dividend[i+16] = msg[i];
    for (int i = int'(nbits) + 15; i >= 16; i--)
      if (dividend[i]) dividend[i-:17] = dividend[i-:17] ^ g;
    return dividend[15:0];
  endfunction

  // Generator programming word: vec[i] = coefficient of x^(i+1).
  function automatic logic [15:0] poly_to_vec(input logic [15:0] poly);
    return {1'b0, poly[15:1]};
  endfunction

endpackage
