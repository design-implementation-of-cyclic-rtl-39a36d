// crc_generator_tb: self-checking test of the CRC encoder.
//
// Four instances: the default (8-bit message, degree-8 polynomial on the
// port), a CRC4 one, a 16-bit message with CRC16 and an 8-bit message with
// CRC32. It applies the worked examples of the design (messages 10010011 and
// 11001001 under CRC4 x^4+x^3+1, CRC8 x^8+x^2+x+1 and CRC8-CCIT
// x^8+x^7+x^2+x+1, with their known check bits and codewords), then random
// messages under random proper polynomials, comparing with the shift-register
// reference of crc_ref_pkg. It also checks the one-clock latency: a change of
// input must not reach x/t before the next rising edge, and must after it.
module crc_generator_tb;
  import crc_ref_pkg::*;
  import crc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // default instance: DATA_W=8, CRC_W=8
  logic [7:0]  a8;  logic [8:0]  b8;  logic [7:0]  x8;  logic [15:0] t8;
  crc_generator dut8 (.clk(clk), .a(a8), .b(b8), .x(x8), .t(t8));

  logic [7:0]  a4;  logic [4:0]  b4;  logic [3:0]  x4;  logic [11:0] t4;
  crc_generator #(.DATA_W(8), .CRC_W(4)) dut4 (.clk(clk), .a(a4), .b(b4), .x(x4), .t(t4));

  logic [15:0] a16; logic [16:0] b16; logic [15:0] x16; logic [31:0] t16;
  crc_generator #(.DATA_W(16), .CRC_W(16)) dut16 (.clk(clk), .a(a16), .b(b16), .x(x16), .t(t16));

  logic [7:0]  a32; logic [32:0] b32; logic [31:0] x32; logic [39:0] t32;
  crc_generator #(.DATA_W(8), .CRC_W(32)) dut32 (.clk(clk), .a(a32), .b(b32), .x(x32), .t(t32));

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Apply inputs after the falling edge, sample after the next rising edge.
  task automatic step();
    @(posedge clk); #1;
  endtask

  initial begin
    a8 = '0; b8 = CRC8_POLY; a4 = '0; b4 = CRC4_POLY;
    a16 = '0; b16 = CRC16_POLY; a32 = '0; b32 = CRC32_POLY;
    step();

    // worked examples
    a4 = 8'b1001_0011; a8 = 8'b1001_0011; b8 = CRC8_POLY; step();
    check("case1 crc",  64'(x4), 64'b0001);
    check("case1 code", 64'(t4), 64'b1001_0011_0001);
    check("case2 crc",  64'(x8), 64'b1111_0000);
    check("case2 code", 64'(t8), 64'b1001_0011_1111_0000);
    a4 = 8'b1100_1001; a8 = 8'b1100_1001; step();
    check("case1b crc",  64'(x4), 64'b1001);
    check("case1b code", 64'(t4), 64'b1100_1001_1001);
    check("case2b crc",  64'(x8), 64'b0111_0001);
    check("case2b code", 64'(t8), 64'b1100_1001_0111_0001);
    b8 = CRC8_CCIT_POLY; a8 = 8'b1001_0011; step();
    check("case3 crc",  64'(x8), 64'b0010_0111);
    check("case3 code", 64'(t8), 64'b1001_0011_0010_0111);
    a8 = 8'b1100_1001; step();
    check("case3b crc",  64'(x8), 64'b1010_0100);
    check("case3b code", 64'(t8), 64'b1100_1001_1010_0100);

    // latency: a new input is not visible before the clock edge
    @(negedge clk);
    a8 = 8'b1001_0011;
    #2 check("latency hold", 64'(x8), 64'b1010_0100);
    @(posedge clk); #1 check("latency update", 64'(x8), 64'b0010_0111);

    // random messages, random and standard polynomials
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      a8  = 8'($urandom);  b8  = 9'(rand_poly(8));
      a4  = 8'($urandom);  b4  = 5'(rand_poly(4));
      a16 = 16'($urandom); b16 = (n % 2) ? CRC16_CCIT_POLY : 17'(rand_poly(16));
      a32 = 8'($urandom);  b32 = (n % 2) ? CRC32_POLY : 33'(rand_poly(32));
      step();
      check("rand8 crc",   64'(x8),  ref_crc(64'(a8), 8, 64'(b8), 8));
      check("rand8 code",  64'(t8),  {48'd0, a8, 8'(ref_crc(64'(a8), 8, 64'(b8), 8))});
      check("rand4 crc",   64'(x4),  ref_crc(64'(a4), 8, 64'(b4), 4));
      check("rand4 code",  64'(t4),  {52'd0, a4, 4'(ref_crc(64'(a4), 8, 64'(b4), 4))});
      check("rand16 crc",  64'(x16), ref_crc(64'(a16), 16, 64'(b16), 16));
      check("rand16 code", 64'(t16[31:16]), 64'(a16));
      check("rand32 crc",  64'(x32), ref_crc(64'(a32), 8, 64'(b32), 32));
      check("rand32 code", 64'(t32[39:32]), 64'(a32));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
