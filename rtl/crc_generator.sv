// crc_generator: CRC encoder. Appends CRC_W check bits to a DATA_W-bit
// message so that the codeword is a multiple of the generator polynomial.
//
// The message a(x) is shifted left by the polynomial degree CRC_W (CRC_W
// zeros appended) and divided by g(x) = b in GF(2) (crc_divider: XOR the
// polynomial in under the highest remaining 1 until no 1 is left above bit
// CRC_W-1). The remainder is the check word x, and the systematic codeword is
// t = {a, x}, i.e. t(x) = a(x)*x^CRC_W + r(x).
//
// Interface and timing: a, b and clk in; x and t out, both registered, so
// they show the result for the a and b present at the previous rising clock
// edge (one cycle latency, a new message every cycle). There is no reset: the
// outputs are valid from the first clock edge on. The polynomial is a port,
// so one instance serves every polynomial of degree CRC_W. b[CRC_W] and b[0]
// must be 1 (a proper generator polynomial); an assertion checks this.
//
// The division algorithm, the port set (a, b, clk, x, t) and the 8-bit
// message with a degree-8 polynomial as default follow the source design;
// registering the outputs and the lack of reset or handshake are this
// design's choices.
module crc_generator #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned CRC_W  = 8
) (
  input  logic                      clk,
  input  logic [DATA_W-1:0]         a,
  input  logic [CRC_W:0]            b,
  output logic [CRC_W-1:0]          x,
  output logic [DATA_W+CRC_W-1:0]   t
);

  logic [CRC_W-1:0] rem;

  crc_divider #(
    .DIVIDEND_W(DATA_W + CRC_W),
    .CRC_W     (CRC_W)
  ) u_div (
    .dividend({a, {CRC_W{1'b0}}}),
    .poly    (b),
    .rem     (rem)
  );

  always_ff @(posedge clk) begin
    x <= rem;
    t <= {a, rem};
  end

  // A generator polynomial has a non-zero leading and constant coefficient.
  a_poly_ends : assert property (@(posedge clk) b[CRC_W] && b[0])
    else $error("crc_generator: polynomial %b lacks its x^%0d or x^0 term", b, CRC_W);

endmodule
