// crc_top: both ends of a CRC-protected link plus a bit-serial CRC unit.
//
// Sender: crc_generator computes the check bits of message a under
// polynomial b and drives the transmitted codeword tx_t = {a, tx_x}.
// The link itself is outside this module: the codeword travels over it and
// comes back, possibly corrupted, on rx_r. Receiver: crc_checker divides
// rx_r by the same polynomial and raises rx_err when the remainder rx_rem is
// not zero. Beside them sits crc_serial, the one-bit-per-clock shift-register
// form of the same division, with its own fixed polynomial (SER_POLY) and
// its own ports.
//
// Timing: tx_x/tx_t follow a/b by one clock; rx_rem/rx_err follow rx_r/b by
// one clock. With rx_r looped straight back from tx_t a message is checked
// two clocks after it is applied. The serial unit takes one bit per clock
// with ser_valid and shows its remainder the clock after the last bit.
//
// Defaults: 8-bit messages, degree-8 polynomial (CRC8 class, as in the
// source design's main case) and a 16-bit serial unit for CRC16; the split
// of the link into tx and rx ports is this design's choice.
module crc_top #(
  parameter int unsigned        DATA_W   = 8,
  parameter int unsigned        CRC_W    = 8,
  parameter int unsigned        SER_W    = 16,
  parameter logic [SER_W:0]     SER_POLY = crc_pkg::CRC16_POLY
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // sender
  input  logic [DATA_W-1:0]         a,
  input  logic [CRC_W:0]            b,
  output logic [CRC_W-1:0]          tx_x,
  output logic [DATA_W+CRC_W-1:0]   tx_t,
  // receiver
  input  logic [DATA_W+CRC_W-1:0]   rx_r,
  output logic [CRC_W-1:0]          rx_rem,
  output logic                      rx_err,
  // bit-serial unit
  input  logic                      ser_clear,
  input  logic                      ser_valid,
  input  logic                      ser_bit,
  output logic [SER_W-1:0]          ser_crc,
  output logic                      ser_zero
);

  crc_generator #(
    .DATA_W(DATA_W),
    .CRC_W (CRC_W)
  ) u_gen (
    .clk(clk),
    .a  (a),
    .b  (b),
    .x  (tx_x),
    .t  (tx_t)
  );

  crc_checker #(
    .DATA_W(DATA_W),
    .CRC_W (CRC_W)
  ) u_chk (
    .clk(clk),
    .r  (rx_r),
    .b  (b),
    .rem(rx_rem),
    .err(rx_err)
  );

  crc_serial #(
    .CRC_W(SER_W),
    .POLY (SER_POLY)
  ) u_ser (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (ser_clear),
    .bit_valid(ser_valid),
    .bit_in   (ser_bit),
    .crc      (ser_crc),
    .zero     (ser_zero)
  );

endmodule
