// crc_serial: bit-serial CRC unit, the classic shift-register divider built
// from CRC_W flip-flops and modulo-2 adders (XOR gates).
//
// Message bits enter most significant first, one per clock while bit_valid
// is high. The register is shifted left each time; the bit leaving the top,
// XORed with the incoming message bit, is the feedback, and wherever POLY has
// a non-zero coefficient below x^CRC_W the feedback is XORed into that stage.
// Taking the message bit in at the top (rather than at stage 0) means the
// register already holds a(x)*x^CRC_W mod g(x) after the last message bit:
// no CRC_W trailing zeros have to be clocked in. Fed with a whole codeword
// instead, the register ends at c(x)*x^CRC_W mod g(x), which is zero exactly
// when c(x) is a multiple of g(x), so the same unit checks.
//
// Interface and timing: rst_n (asynchronous, active low) and clear
// (synchronous) both zero the register; clear wins over bit_valid. crc shows
// the register, so it holds the remainder of the bits taken so far from the
// clock edge after the last bit; zero is 1 when crc is all zeros.
//
// The shift-register structure and the 16-bit default width follow the
// source design; the polynomial default (CRC16, x^16+x^15+x^2+1), the
// feedback form and the clear/bit_valid control are this design's choices.
module crc_serial #(
  parameter int unsigned          CRC_W = 16,
  parameter logic [CRC_W:0]       POLY  = 17'h1_8005
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              bit_valid,
  input  logic              bit_in,
  output logic [CRC_W-1:0]  crc,
  output logic              zero
);

  logic fb;

  assign fb   = crc[CRC_W-1] ^ bit_in;
  assign zero = (crc == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          crc <= '0;
    else if (clear)      crc <= '0;
    else if (bit_valid)  crc <= {crc[CRC_W-2:0], 1'b0} ^ (fb ? POLY[CRC_W-1:0] : '0);
  end

endmodule
