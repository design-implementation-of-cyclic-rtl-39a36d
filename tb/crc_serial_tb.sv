// crc_serial_tb: self-checking test of the bit-serial shift-register CRC.
//
// Default instance (CRC16, x^16+x^15+x^2+1) and a CRC8-CCIT one. Random
// messages of 1 to 48 bits are shifted in MSB first, with idle cycles
// (bit_valid low) mixed in; after the last bit the register must equal the
// reference m(x)*x^W mod g(x), one bit per clock (the count of clocks with
// bit_valid high is checked against the message length). The message's own
// check bits are then shifted in and the register must read zero (the unit
// used as a checker), and a corrupted codeword must not. clear and rst_n
// must empty the register.
module crc_serial_tb;
  import crc_ref_pkg::*;
  import crc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, clear, valid, bit_in;
  logic [15:0] crc16; logic zero16;
  logic [7:0]  crc8;  logic zero8;
  int          shifted;

  crc_serial dut16 (.clk(clk), .rst_n(rst_n), .clear(clear), .bit_valid(valid),
                    .bit_in(bit_in), .crc(crc16), .zero(zero16));
  crc_serial #(.CRC_W(8), .POLY(CRC8_CCIT_POLY)) dut8 (
                    .clk(clk), .rst_n(rst_n), .clear(clear), .bit_valid(valid),
                    .bit_in(bit_in), .crc(crc8), .zero(zero8));

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // bits taken since the last clear
  always_ff @(posedge clk) begin
    if (clear)      shifted <= 0;
    else if (valid) shifted <= shifted + 1;
  end

  task automatic shift_bits(logic [63:0] v, int n);
    for (int i = n - 1; i >= 0; i--) begin
      while ($urandom_range(3) == 0) begin
        @(negedge clk); valid = 1'b0;
      end
      @(negedge clk); valid = 1'b1; bit_in = v[i];
    end
    @(negedge clk); valid = 1'b0;
  endtask

  task automatic do_clear();
    @(negedge clk); clear = 1'b1; valid = 1'b1; bit_in = 1'b1;
    @(negedge clk); clear = 1'b0; valid = 1'b0;
  endtask

  logic [63:0] msg, r16, r8;
  int len;

  initial begin
    rst_n = 1'b0; clear = 1'b0; valid = 1'b0; bit_in = 1'b0;
    #12 check("reset16", 64'(crc16), 0); check("reset8", 64'(crc8), 0);
    rst_n = 1'b1;

    for (int n = 0; n < 200; n++) begin
      len = $urandom_range(48, 1);
      msg = {$urandom, $urandom} & low_mask(len);
      do_clear();
      check("clear16", 64'(crc16), 0);
      check("clear8", 64'(crc8), 0);
      shift_bits(msg, len);
      r16 = ref_crc(msg, len, 64'(CRC16_POLY), 16);
      r8  = ref_crc(msg, len, 64'(CRC8_CCIT_POLY), 8);
      check("crc16", 64'(crc16), r16);
      check("crc8", 64'(crc8), r8);
      check("bit count", 64'(shifted), 64'(len));
      // append the check bits: the two units use different polynomials,
      // so run the CRC16 codeword now and the CRC8 one after a clear
      shift_bits(r16, 16);
      check("codeword16 zero", 64'(zero16), 1);
      do_clear();
      shift_bits(msg, len);
      shift_bits(r8, 8);
      check("codeword8 zero", 64'(zero8), 1);
      // a single flipped bit is seen
      do_clear();
      shift_bits(msg ^ (64'd1 << $urandom_range(len - 1)), len);
      shift_bits(r16, 16);
      check("corrupt16 seen", 64'(zero16), 0);
    end

    // asynchronous reset in the middle of a message
    shift_bits(64'hDEAD, 16);
    #2 rst_n = 1'b0;
    #1 check("async reset", 64'(crc16), 0);
    rst_n = 1'b1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
