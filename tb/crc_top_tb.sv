// crc_top_tb: end-to-end test of the CRC link at the default sizes (8-bit
// messages, degree-8 polynomial, 16-bit serial unit); no parameter is
// overridden.
//
// The testbench plays the transmission channel: each cycle it takes the
// transmitted codeword tx_t, XORs an error pattern into it and drives the
// result back on rx_r, so a stream of one message per clock flows through
// encoder, channel and checker. Messages go in bursts, each under one
// polynomial (CRC8, CRC8-CCIT or a random proper one); the polynomial changes
// between bursts after the last codeword of the burst has been checked.
// Error patterns are: none, a random single bit, a burst no longer than the
// degree, random bits, and a multiple of g(x) (which the code cannot see).
// Every result is compared with the shift-register reference; the cycle
// count checks one message per clock and two clocks from message to verdict.
// Meanwhile the serial unit encodes random 8-to-40-bit messages under CRC16
// and then checks them, clean and with one flipped bit.
//
// Each mechanism is counted and must occur: clean pass, detected error,
// undetectable error, polynomial switch, serial encode, serial clean check,
// serial detected error.
module crc_top_tb;
  import crc_ref_pkg::*;
  import crc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n;
  logic [7:0]  a;
  logic [8:0]  b;
  logic [7:0]  tx_x, rx_rem;
  logic [15:0] tx_t, rx_r;
  logic        rx_err;
  logic        ser_clear, ser_valid, ser_bit, ser_zero;
  logic [15:0] ser_crc;

  crc_top dut (
    .clk(clk), .rst_n(rst_n),
    .a(a), .b(b), .tx_x(tx_x), .tx_t(tx_t),
    .rx_r(rx_r), .rx_rem(rx_rem), .rx_err(rx_err),
    .ser_clear(ser_clear), .ser_valid(ser_valid), .ser_bit(ser_bit),
    .ser_crc(ser_crc), .ser_zero(ser_zero)
  );

  typedef enum int {CLEAN, DETECTED, UNDETECTABLE, POLY_SWITCH,
                    SER_ENCODE, SER_CLEAN, SER_DETECTED, N_EVENTS} event_e;
  int count [N_EVENTS];

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [15:0] make_error(int kind, logic [8:0] g);
    logic [15:0] e = '0;
    int pos, len;
    logic [7:0] q;
    case (kind)
      0: e = '0;
      1: e[$urandom_range(15)] = 1'b1;
      2: begin
        len = $urandom_range(8, 1);
        pos = $urandom_range(16 - len);
        for (int j = 0; j < len; j++) e[pos+j] = (j == 0 || j == len - 1) ? 1'b1 : 1'($urandom);
      end
      3: e = 16'($urandom);
      default: begin
        q = 8'($urandom) | 8'd1;
        for (int j = 0; j < 8; j++) if (q[j]) e = e ^ (16'(g) << j);
      end
    endcase
    return e;
  endfunction

  // ---------------- parallel link ----------------
  logic [7:0]  msgs [32];
  logic [15:0] errs [32];
  logic [15:0] expected_code;
  logic [7:0]  r_exp;
  int          burst_len;

  task automatic run_link();
    logic [8:0] polys [3];
    polys[0] = CRC8_POLY; polys[1] = CRC8_CCIT_POLY;
    for (int burst = 0; burst < 60; burst++) begin
      polys[2] = 9'(rand_poly(8));
      burst_len = $urandom_range(20, 4);
      for (int i = 0; i < burst_len; i++) begin
        msgs[i] = 8'($urandom);
        errs[i] = make_error($urandom_range(4), polys[burst % 3]);
      end
      // cycle i: feed message i, pass the codeword of message i-1 through the
      // channel, and read the verdict on message i-2
      for (int i = 0; i < burst_len + 2; i++) begin
        @(negedge clk);
        if (i == 0) begin
          if (burst > 0 && b != polys[burst % 3]) count[POLY_SWITCH]++;
          b = polys[burst % 3];
        end
        if (i < burst_len) a = msgs[i];
        if (i >= 1 && i <= burst_len) begin
          expected_code = {msgs[i-1], 8'(ref_crc(64'(msgs[i-1]), 8, 64'(b), 8))};
          check("tx codeword", 64'(tx_t), 64'(expected_code));
          check("tx crc", 64'(tx_x), 64'(expected_code[7:0]));
          rx_r = tx_t ^ errs[i-1];
        end
        if (i >= 2) begin
          expected_code = {msgs[i-2], 8'(ref_crc(64'(msgs[i-2]), 8, 64'(b), 8))} ^ errs[i-2];
          r_exp = 8'(ref_mod(64'(expected_code), 16, 64'(b), 8));
          check("rx rem", 64'(rx_rem), 64'(r_exp));
          check("rx err", 64'(rx_err), 64'(r_exp != 0));
          if (errs[i-2] == 0)   count[CLEAN]++;
          else if (r_exp != 0)  count[DETECTED]++;
          else begin
            count[UNDETECTABLE]++;
            check("undetectable", 64'(rx_err), 0);
          end
        end
      end
    end
  endtask

  // ---------------- serial unit ----------------
  task automatic ser_shift(logic [63:0] v, int n);
    for (int i = n - 1; i >= 0; i--) begin
      @(negedge clk); ser_valid = 1'b1; ser_bit = v[i];
    end
    @(negedge clk); ser_valid = 1'b0;
  endtask

  task automatic ser_clr();
    @(negedge clk); ser_clear = 1'b1;
    @(negedge clk); ser_clear = 1'b0;
  endtask

  task automatic run_serial();
    logic [63:0] m, r;
    int len;
    for (int n = 0; n < 60; n++) begin
      len = $urandom_range(40, 8);
      m = {$urandom, $urandom} & low_mask(len);
      ser_clr();
      ser_shift(m, len);
      r = ref_crc(m, len, 64'(CRC16_POLY), 16);
      check("serial crc", 64'(ser_crc), r);
      count[SER_ENCODE]++;
      ser_shift(r, 16);
      check("serial clean", 64'(ser_zero), 1);
      if (ser_zero) count[SER_CLEAN]++;
      ser_clr();
      ser_shift(m ^ (64'd1 << $urandom_range(len - 1)), len);
      ser_shift(r, 16);
      check("serial detect", 64'(ser_zero), 0);
      if (!ser_zero) count[SER_DETECTED]++;
    end
  endtask

  // ---------------- latency of one message ----------------
  task automatic run_latency();
    int cyc;
    @(negedge clk);
    b = CRC8_CCIT_POLY; a = 8'b1100_1001;
    cyc = 0;
    // loop the channel back directly (no error) and count clocks to the verdict
    @(posedge clk); #1 cyc++;
    check("lat tx", 64'(tx_t), 64'b1100_1001_1010_0100);
    rx_r = tx_t;
    @(posedge clk); #1 cyc++;
    check("lat rx", 64'(rx_err), 0);
    check("lat clocks", 64'(cyc), 2);
  endtask

  initial begin
    for (int k = 0; k < N_EVENTS; k++) count[k] = 0;
    rst_n = 1'b0; a = '0; b = CRC8_POLY; rx_r = '0;
    ser_clear = 1'b0; ser_valid = 1'b0; ser_bit = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    run_latency();
    fork
      run_link();
      run_serial();
    join

    for (int k = 0; k < N_EVENTS; k++) begin
      checks++;
      if (count[k] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", event_e'(k));
      end else begin
        $display("mechanism %s: %0d", event_e'(k), count[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
