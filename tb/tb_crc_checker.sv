// tb_crc_checker: self-checking testbench for the CRC checker.
//
// Received words are built in the testbench: a random 72-bit message followed
// by its check bits from long division (crc_ref_pkg), optionally with bits
// flipped. The checker's remainder must equal the long-division remainder of
// the whole received word, and error must be high exactly when that remainder
// is non-zero. Covered: clean words (remainder 0), single-bit errors in every
// position, random multi-bit errors and bursts up to 8 bits long (always
// detected by an 8-bit generator with a non-zero constant term). A second
// checker with g(x) = x^4 + x + 1 is given the hand-worked codeword
// 11010110111110 and a corrupted copy. Latency: done exactly MSG_W + 1 clocks
// after the start cycle.
`timescale 1ns/1ps
module tb_crc_checker;
  import crc_ref_pkg::*;

  localparam int unsigned MW = 72;
  localparam int unsigned NW = MW + 8;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic          start;
  logic [NW-1:0] rx;
  logic          busy, done, error;
  logic [7:0]    rem;
  crc_checker dut (.clk(clk), .rst_n(rst_n), .start(start), .rx(rx),
                   .busy(busy), .done(done), .rem(rem), .error(error));

  logic          start4;
  logic [13:0]   rx4;
  logic          busy4, done4, error4;
  logic [3:0]    rem4;
  crc_checker #(.MSG_W(10), .CRC_W(4), .POLY(4'b0011)) dut4 (
    .clk(clk), .rst_n(rst_n), .start(start4), .rx(rx4),
    .busy(busy4), .done(done4), .rem(rem4), .error(error4));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [NW-1:0] make_codeword(logic [MW-1:0] m);
    make_codeword = {m, 8'(crc_of(word_t'(m), MW, 32'hD5, 8))};
  endfunction

  task automatic run_check(logic [NW-1:0] w, string what);
    int unsigned cyc;
    rem_t exp_rem;
    rx = w; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 1000) begin
      @(posedge clk); #1;
      cyc++;
    end
    exp_rem = poly_mod(word_t'(w), NW, 32'hD5, 8);
    check({what, " latency"}, 128'(cyc), 128'(MW + 1));
    check({what, " rem"}, 128'(rem), 128'(exp_rem));
    check({what, " error"}, 128'(error), 128'(exp_rem != 0));
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NW-1:0] cw;
    rst_n = 1'b0;
    start = 1'b0; rx = '0; start4 = 1'b0; rx4 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // clean codewords
    cw = {72'("123456789"), 8'hBC};
    run_check(cw, "clean 123456789");
    check("clean 123456789 no error", 128'(error), 0);
    for (int t = 0; t < 20; t++) begin
      run_check(make_codeword(MW'(rand_word(MW))), "clean");
      check("clean no error", 128'(error), 0);
    end

    // every single-bit error is detected
    cw = make_codeword(MW'(rand_word(MW)));
    for (int b = 0; b < int'(NW); b++) begin
      run_check(cw ^ (NW'(1) << b), "single");
      check("single detected", 128'(error), 1);
    end

    // bursts of length 1..8 are detected
    for (int t = 0; t < 40; t++) begin
      int unsigned len, pos;
      logic [NW-1:0] mask;
      len = 1 + ($urandom() % 8);
      pos = $urandom() % (NW - len + 1);
      mask = '0;
      mask[pos] = 1'b1;
      mask[pos + len - 1] = 1'b1;
      for (int unsigned i = pos + 1; i + 1 < pos + len; i++) mask[i] = 1'($urandom());
      run_check(make_codeword(MW'(rand_word(MW))) ^ mask, "burst");
      check("burst detected", 128'(error), 1);
    end

    // random multi-bit errors: compared with the reference remainder
    for (int t = 0; t < 40; t++) begin
      run_check(make_codeword(MW'(rand_word(MW))) ^ NW'(rand_word(NW)), "random");
    end

    // 4-bit hand-worked example
    rx4 = 14'b11010110111110; start4 = 1'b1;
    @(posedge clk); #1; start4 = 1'b0;
    repeat (10) @(posedge clk);
    #1;
    check("4-bit done", 128'(done4), 1);
    check("4-bit clean rem", 128'(rem4), 0);
    check("4-bit clean error", 128'(error4), 0);
    rx4 = 14'b11010110111110 ^ 14'b00000100000000; start4 = 1'b1;
    @(posedge clk); #1; start4 = 1'b0;
    repeat (10) @(posedge clk);
    #1;
    check("4-bit corrupt rem", 128'(rem4),
          128'(poly_mod(word_t'(14'b11010010111110), 14, 32'h3, 4)));
    check("4-bit corrupt error", 128'(error4), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
