// crc_checker_tb: self-checking test of the CRC receiver check.
//
// Default instance (8-bit message, degree-8 polynomial) and a CRC4 one.
// Codewords are built here from the shift-register reference, so the test
// does not lean on the encoder. It checks: the worked-example codewords give
// remainder 0 and no error; every single-bit error is flagged; every burst no
// longer than the polynomial degree is flagged; random error patterns give
// the reference remainder; an error pattern that is itself a multiple of
// g(x) goes undetected (remainder 0), as the code predicts. One-clock
// latency is checked as for the encoder.
module crc_checker_tb;
  import crc_ref_pkg::*;
  import crc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] r8; logic [8:0] b8; logic [7:0] rem8; logic err8;
  crc_checker dut8 (.clk(clk), .r(r8), .b(b8), .rem(rem8), .err(err8));

  logic [11:0] r4; logic [4:0] b4; logic [3:0] rem4; logic err4;
  crc_checker #(.DATA_W(8), .CRC_W(4)) dut4 (.clk(clk), .r(r4), .b(b4), .rem(rem4), .err(err4));

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic step();
    @(posedge clk); #1;
  endtask

  function automatic logic [15:0] code8(logic [7:0] m, logic [8:0] g);
    return {m, 8'(ref_crc(64'(m), 8, 64'(g), 8))};
  endfunction

  function automatic logic [11:0] code4(logic [7:0] m, logic [4:0] g);
    return {m, 4'(ref_crc(64'(m), 8, 64'(g), 4))};
  endfunction

  logic [15:0] c8, e8;
  logic [11:0] c4, e4;
  logic [7:0]  m;

  initial begin
    b8 = CRC8_CCIT_POLY; b4 = CRC4_POLY; r8 = '0; r4 = '0;
    step();

    // worked-example codewords are clean
    r4 = 12'b1001_0011_0001; r8 = 16'b1001_0011_1111_0000; b8 = CRC8_POLY; step();
    check("case1 rem", 64'(rem4), 0); check("case1 err", 64'(err4), 0);
    check("case2 rem", 64'(rem8), 0); check("case2 err", 64'(err8), 0);
    r4 = 12'b1100_1001_1001; r8 = 16'b1100_1001_0111_0001; step();
    check("case1b err", 64'(err4), 0); check("case2b err", 64'(err8), 0);
    b8 = CRC8_CCIT_POLY; r8 = 16'b1001_0011_0010_0111; step();
    check("case3 err", 64'(err8), 0);
    r8 = 16'b1100_1001_1010_0100; step();
    check("case3b err", 64'(err8), 0);
    // a corrupted example codeword
    r8 = 16'b1100_1001_1010_0101; step();
    check("case3b flip err", 64'(err8), 1);
    check("case3b flip rem", 64'(rem8), 1);

    // latency
    @(negedge clk);
    r8 = 16'b1100_1001_1010_0100;
    #2 check("latency hold", 64'(err8), 1);
    @(posedge clk); #1 check("latency update", 64'(err8), 0);

    // every single-bit and every burst error up to the degree is detected
    for (int n = 0; n < 40; n++) begin
      m = 8'($urandom);
      b8 = 9'(rand_poly(8)); b4 = 5'(rand_poly(4));
      c8 = code8(m, b8); c4 = code4(m, b4);
      for (int pos = 0; pos < 16; pos++) begin
        for (int len = 1; len <= 8 && pos + len <= 16; len++) begin
          e8 = '0;
          for (int j = 0; j < len; j++) e8[pos+j] = (j == 0 || j == len - 1) ? 1'b1 : 1'($urandom);
          e4 = '0;
          if (pos + len <= 12 && len <= 4) e4 = 12'(e8);
          @(negedge clk);
          r8 = c8 ^ e8; r4 = c4 ^ e4;
          step();
          check("burst8 err", 64'(err8), 1);
          check("burst8 rem", 64'(rem8), ref_mod(64'(r8), 16, 64'(b8), 8));
          check("burst4 err", 64'(err4), 64'(e4 != 0));
        end
      end
    end

    // random error patterns, and undetectable ones (multiples of g)
    for (int n = 0; n < 300; n++) begin
      m = 8'($urandom);
      b8 = 9'(rand_poly(8)); b4 = 5'(rand_poly(4));
      c8 = code8(m, b8); c4 = code4(m, b4);
      if (n % 3 == 0) begin
        // e(x) = q(x) g(x) with q of degree < 8: passes the check unseen
        e8 = '0;
        m = 8'($urandom) | 8'd1;
        for (int j = 0; j < 8; j++) if (m[j]) e8 = e8 ^ (16'(b8) << j);
        e4 = '0;
        for (int j = 0; j < 8; j++) if (m[j]) e4 = e4 ^ (12'(b4) << j);
      end else begin
        e8 = 16'($urandom); e4 = 12'($urandom);
      end
      @(negedge clk);
      r8 = c8 ^ e8; r4 = c4 ^ e4;
      step();
      check("rand8 rem", 64'(rem8), ref_mod(64'(r8), 16, 64'(b8), 8));
      check("rand8 err", 64'(err8), 64'(ref_mod(64'(r8), 16, 64'(b8), 8) != 0));
      check("rand4 rem", 64'(rem4), ref_mod(64'(r4), 12, 64'(b4), 4));
      check("rand4 err", 64'(err4), 64'(ref_mod(64'(r4), 12, 64'(b4), 4) != 0));
      if (n % 3 == 0) begin
        check("undetectable8", 64'(err8), 0);
        check("undetectable4", 64'(err4), 0);
      end
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
