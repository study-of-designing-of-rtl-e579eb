// tb_crc_codec_top: end-to-end testbench for the CRC encoder -> channel -> checker
// chain, at the default parameters (72-bit messages, 8-bit CRC with
// g(x) = x^8+x^7+x^6+x^4+x^2+1).
//
// Each transfer encodes a message, applies an error mask in the channel and
// checks the received word. Expected check bits and remainders come from long
// division in crc_ref_pkg. Error patterns cover the classes a CRC is chosen to
// detect: none, single-bit, double-bit, odd-weight (this generator has x+1 as a
// factor, so every odd-weight pattern is caught) and bursts up to 8 bits, plus
// random patterns. Every class must occur at least once; a class that
// never occurred counts as a failure. The timing is checked too: enc_done at
// MSG_W + 1 clocks after start, chk_done MSG_W + 1 clocks after that.
`timescale 1ns/1ps
module tb_crc_codec_top;
  import crc_ref_pkg::*;

  localparam int unsigned MW = 72;
  localparam int unsigned NW = MW + 8;

  typedef enum int {
    K_CLEAN, K_SINGLE, K_DOUBLE, K_ODD, K_BURST, K_RANDOM, K_NUM
  } kind_e;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int seen[K_NUM];
  int detected = 0;
  int passed_clean = 0;

  logic          start;
  logic [MW-1:0] msg;
  logic [NW-1:0] err_mask;
  logic          busy, enc_done, chk_done, error;
  logic [7:0]    crc, rem;
  logic [NW-1:0] codeword;

  crc_codec_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .msg(msg), .err_mask(err_mask),
    .busy(busy), .enc_done(enc_done), .crc(crc), .codeword(codeword),
    .chk_done(chk_done), .rem(rem), .error(error));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [NW-1:0] make_mask(kind_e k);
    logic [NW-1:0] m;
    int unsigned a, b, len, pos, w;
    m = '0;
    case (k)
      K_CLEAN: m = '0;
      K_SINGLE: begin a = $urandom() % NW; m[a] = 1'b1; end
      K_DOUBLE: begin
        a = $urandom() % NW;
        do b = $urandom() % NW; while (b == a);
        m[a] = 1'b1; m[b] = 1'b1;
      end
      K_ODD: begin
        w = 1 + 2 * ($urandom() % 10);  // 1, 3, ..., 19 bits
        while ($countones(m) < int'(w)) begin a = $urandom() % NW; m[a] = 1'b1; end
      end
      K_BURST: begin
        len = 2 + ($urandom() % 7);     // 2..8
        pos = $urandom() % (NW - len + 1);
        m[pos] = 1'b1; m[pos + len - 1] = 1'b1;
        for (int unsigned i = pos + 1; i + 1 < pos + len; i++) m[i] = 1'($urandom());
      end
      default: m = NW'(rand_word(NW));
    endcase
    make_mask = m;
  endfunction

  task automatic transfer(logic [MW-1:0] m, kind_e k);
    int unsigned cyc;
    logic [7:0] exp_crc;
    logic [NW-1:0] mask;
    logic [NW-1:0] rx_exp;
    rem_t exp_rem;
    mask = make_mask(k);
    exp_crc = 8'(crc_of(word_t'(m), MW, 32'hD5, 8));
    msg = m; err_mask = mask; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cyc = 1;
    while (!enc_done && cyc < 1000) begin @(posedge clk); #1; cyc++; end
    check("encode latency", 128'(cyc), 128'(MW + 1));
    check("check bits", 128'(crc), 128'(exp_crc));
    check("codeword", 128'(codeword), 128'({m, exp_crc}));
    cyc = 0;
    while (!chk_done && cyc < 1000) begin @(posedge clk); #1; cyc++; end
    check("check latency", 128'(cyc), 128'(MW + 1));
    rx_exp = {m, exp_crc} ^ mask;
    exp_rem = poly_mod(word_t'(rx_exp), NW, 32'hD5, 8);
    check("remainder", 128'(rem), 128'(exp_rem));
    check("error flag", 128'(error), 128'(exp_rem != 0));
    if (k == K_CLEAN) check("clean passes", 128'(error), 0);
    if (k inside {K_SINGLE, K_ODD, K_BURST}) check("guaranteed detection", 128'(error), 1);
    seen[k]++;
    if (error) detected++; else passed_clean++;
    @(posedge clk); #1;
    check("idle after transfer", 128'(busy), 0);
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    start = 1'b0; msg = '0; err_mask = '0;
    foreach (seen[i]) seen[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    transfer("123456789", K_CLEAN);
    check("DVB-S2 CRC-8 of 123456789", 128'(crc), 128'hBC);

    for (int t = 0; t < 300; t++) begin
      transfer(MW'(rand_word(MW)), kind_e'(t % int'(K_NUM)));
    end

    for (int k = 0; k < int'(K_NUM); k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL error class %s never exercised", kind_e'(k));
      end
      $display("error class %-8s: %0d transfers", kind_e'(k), seen[k]);
    end
    checks++;
    if (detected == 0 || passed_clean == 0) begin
      failures++;
      $display("FAIL detected=%0d undetected=%0d", detected, passed_clean);
    end
    $display("errors flagged: %0d, words accepted: %0d", detected, passed_clean);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
