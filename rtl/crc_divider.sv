// crc_divider: combinational modulo-2 long division of a DIVIDEND_W-bit
// vector by a (CRC_W+1)-bit generator polynomial; the CRC_W-bit remainder
// comes out.
//
// It is the encoder/checker division written out as hardware: walking from
// the most significant dividend bit down to bit CRC_W, wherever the running
// value has a 1 the polynomial, aligned so that its leading term sits on that
// bit, is XORed in. That clears the bit; after the last step only the low
// CRC_W bits can be non-zero, and they are the remainder. The loop unrolls
// into DIVIDEND_W-CRC_W stages, each an AND-gated XOR of CRC_W+1 bits.
//
// Interface: dividend (coefficient of x^i in bit i), poly (bit CRC_W is the
// leading term and must be 1), rem. Purely combinational, no clock.
// Shared by crc_generator and crc_checker; the unrolled structure is this
// design's choice.
module crc_divider #(
  parameter int unsigned DIVIDEND_W = 16,
  parameter int unsigned CRC_W      = 8
) (
  input  logic [DIVIDEND_W-1:0] dividend,
  input  logic [CRC_W:0]        poly,
  output logic [CRC_W-1:0]      rem
);

  logic [DIVIDEND_W-1:0] work;

  always_comb begin
    work = dividend;
    for (int i = DIVIDEND_W - 1; i >= int'(CRC_W); i--) begin
      if (work[i]) work[i -: CRC_W + 1] = work[i -: CRC_W + 1] ^ poly;
    end
    rem = work[CRC_W-1:0];
  end

endmodule
