// crc_checker: CRC receiver check. Divides a received codeword by the
// generator polynomial and flags an error when the remainder is not zero.
//
// The received DATA_W+CRC_W-bit word r(x) is divided as it stands (no zeros
// appended) by g(x) = b with the same XOR-under-the-leading-1 long division
// as the encoder (crc_divider). An error-free codeword is a multiple of g(x)
// and leaves remainder 0; any error pattern that is not itself a multiple of
// g(x) leaves a non-zero remainder.
//
// Interface and timing: r, b and clk in; rem (the remainder) and err
// (rem != 0) out, both registered: one cycle latency, a new word every
// cycle, no reset. b[CRC_W] and b[0] must be 1 (checked by an assertion).
//
// The checker algorithm follows the source design; the registered outputs,
// the err flag as a separate port and the lack of reset are this design's
// choices.
module crc_checker #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned CRC_W  = 8
) (
  input  logic                      clk,
  input  logic [DATA_W+CRC_W-1:0]   r,
  input  logic [CRC_W:0]            b,
  output logic [CRC_W-1:0]          rem,
  output logic                      err
);

  logic [CRC_W-1:0] rem_c;

  crc_divider #(
    .DIVIDEND_W(DATA_W + CRC_W),
    .CRC_W     (CRC_W)
  ) u_div (
    .dividend(r),
    .poly    (b),
    .rem     (rem_c)
  );

  always_ff @(posedge clk) begin
    rem <= rem_c;
    err <= |rem_c;
  end

  a_poly_ends : assert property (@(posedge clk) b[CRC_W] && b[0])
    else $error("crc_checker: polynomial %b lacks its x^%0d or x^0 term", b, CRC_W);

endmodule
