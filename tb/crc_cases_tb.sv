// crc_cases_tb: the design's worked examples and the standard polynomial
// table run end to end through crc_top.
//
// Case 1: CRC4 (x^4+x^3+1), Case 2: CRC8 (x^8+x^2+x+1), Case 3: CRC8-CCIT
// (x^8+x^7+x^2+x+1), each on the messages 10010011 and 11001001, with the
// known check bits and codewords. Each codeword is looped back to the
// checker, clean (must pass) and with one bit flipped (must fail).
// Then every standard polynomial (CRC4, CRC8, CRC8-CCIT, CRC10, CRC16,
// CRC16-CCIT, CRC32) encodes 8-bit messages in a crc_top of matching degree,
// checked against the shift-register reference and looped back the same way.
module crc_cases_tb;
  import crc_ref_pkg::*;
  import crc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // One crc_top per polynomial degree; the serial units sit idle.
  `define CRC_LINK(K) \
    logic [7:0]    a``K;  logic [K:0]    b``K;  logic [K-1:0] x``K;  logic [K+7:0] t``K; \
    logic [K+7:0]  r``K;  logic [K-1:0] rem``K; logic err``K; \
    logic [15:0]   sc``K; logic sz``K; \
    crc_top #(.DATA_W(8), .CRC_W(K)) u``K ( \
      .clk(clk), .rst_n(1'b1), .a(a``K), .b(b``K), .tx_x(x``K), .tx_t(t``K), \
      .rx_r(r``K), .rx_rem(rem``K), .rx_err(err``K), \
      .ser_clear(1'b0), .ser_valid(1'b0), .ser_bit(1'b0), .ser_crc(sc``K), .ser_zero(sz``K));

  `CRC_LINK(4)
  `CRC_LINK(8)
  `CRC_LINK(10)
  `CRC_LINK(16)
  `CRC_LINK(32)

  // Apply one message under one polynomial to the link of degree K, check
  // the check bits against exp_crc, then the clean and a corrupted loop-back.
  `define RUN_CASE(K, MSG, POLY, EXP_CRC, NAME) \
    begin \
      @(negedge clk); a``K = (MSG); b``K = (POLY); \
      @(negedge clk); \
      check({NAME, " crc"}, 64'(x``K), 64'(EXP_CRC)); \
      check({NAME, " codeword"}, 64'(t``K), 64'({(MSG), (K)'(EXP_CRC)})); \
      r``K = t``K; \
      @(negedge clk); \
      check({NAME, " clean"}, 64'(err``K), 0); \
      r``K = t``K ^ ((K+8)'(1) << $urandom_range(K + 7)); \
      @(negedge clk); \
      check({NAME, " flipped"}, 64'(err``K), 1); \
    end

  logic [7:0] m;

  initial begin
    a4 = '0; b4 = CRC4_POLY; r4 = '0;
    a8 = '0; b8 = CRC8_POLY; r8 = '0;
    a10 = '0; b10 = CRC10_POLY; r10 = '0;
    a16 = '0; b16 = CRC16_POLY; r16 = '0;
    a32 = '0; b32 = CRC32_POLY; r32 = '0;

    `RUN_CASE(4, 8'b1001_0011, CRC4_POLY, 4'b0001, "case1 msg1")
    `RUN_CASE(4, 8'b1100_1001, CRC4_POLY, 4'b1001, "case1 msg2")
    `RUN_CASE(8, 8'b1001_0011, CRC8_POLY, 8'b1111_0000, "case2 msg1")
    `RUN_CASE(8, 8'b1100_1001, CRC8_POLY, 8'b0111_0001, "case2 msg2")
    `RUN_CASE(8, 8'b1001_0011, CRC8_CCIT_POLY, 8'b0010_0111, "case3 msg1")
    `RUN_CASE(8, 8'b1100_1001, CRC8_CCIT_POLY, 8'b1010_0100, "case3 msg2")

    for (int n = 0; n < 50; n++) begin
      m = 8'($urandom);
      `RUN_CASE(4,  m, CRC4_POLY,       ref_crc(64'(m), 8, 64'(CRC4_POLY), 4),        "CRC4")
      `RUN_CASE(8,  m, CRC8_POLY,       ref_crc(64'(m), 8, 64'(CRC8_POLY), 8),        "CRC8")
      `RUN_CASE(8,  m, CRC8_CCIT_POLY,  ref_crc(64'(m), 8, 64'(CRC8_CCIT_POLY), 8),   "CRC8-CCIT")
      `RUN_CASE(10, m, CRC10_POLY,      ref_crc(64'(m), 8, 64'(CRC10_POLY), 10),      "CRC10")
      `RUN_CASE(16, m, CRC16_POLY,      ref_crc(64'(m), 8, 64'(CRC16_POLY), 16),      "CRC16")
      `RUN_CASE(16, m, CRC16_CCIT_POLY, ref_crc(64'(m), 8, 64'(CRC16_CCIT_POLY), 16), "CRC16-CCIT")
      `RUN_CASE(32, m, CRC32_POLY,      ref_crc(64'(m), 8, 64'(CRC32_POLY), 32),      "CRC32")
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
