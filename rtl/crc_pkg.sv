// crc_pkg: the standard generator polynomials of the CRC family this design
// is meant for (CRC4 to CRC32), shared by the RTL and its testbenches.
//
// Each constant holds the full polynomial, coefficient of x^i in bit i, so a
// degree-n polynomial is n+1 bits wide with bit n set. That is the form the
// generator and checker take on their polynomial port (b). CRC4, both CRC8
// polynomials, CRC10 and CRC16 follow the design's table of standard
// polynomials as given. For CRC16-CCIT (X.25) and CRC32 (Ethernet) this
// package uses the polynomials those standards define, x^16+x^12+x^5+1 and
// the full Ethernet polynomial including its x term. The name CRC8_CCIT_POLY
// for x^8+x^7+x^2+x+1 follows the design's usage.
package crc_pkg;

  localparam logic [4:0]  CRC4_POLY       = 5'b1_1001;             // x^4+x^3+1, telephony
  localparam logic [8:0]  CRC8_POLY       = 9'b1_0000_0111;        // x^8+x^2+x+1, ATM header
  localparam logic [8:0]  CRC8_CCIT_POLY  = 9'b1_1000_0111;        // x^8+x^7+x^2+x+1, 1-wire bus
  localparam logic [10:0] CRC10_POLY      = 11'b110_0011_0011;     // x^10+x^9+x^5+x^4+x+1, ATM AAL
  localparam logic [16:0] CRC16_POLY      = 17'h1_8005;            // x^16+x^15+x^2+1, HDLC/USB
  localparam logic [16:0] CRC16_CCIT_POLY = 17'h1_1021;            // x^16+x^12+x^5+1, X.25/modem
  // x^32+x^26+x^23+x^22+x^16+x^12+x^11+x^10+x^8+x^7+x^5+x^4+x^2+x+1, Ethernet
  localparam logic [32:0] CRC32_POLY      = 33'h1_04C1_1DB7;

endpackage
