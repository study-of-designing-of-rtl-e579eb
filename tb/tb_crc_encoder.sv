// tb_crc_encoder: self-checking testbench for the CRC encoder.
//
// The default encoder (72-bit message, x^8+x^7+x^6+x^4+x^2+1) is given the
// ASCII string "123456789" (72 bits, published CRC-8 check value 0xBC), an
// all-zero message and random messages; a second encoder with a 10-bit message
// and g(x) = x^4 + x + 1 is given the hand-worked example 1101011011, whose
// check bits are 1110. Expected values come from long division in
// crc_ref_pkg. Each run also checks the latency: done must rise exactly
// MSG_W + 1 clocks after the start cycle, with busy high in between, and the
// codeword must be the message followed by the check bits. Back-to-back starts
// (start in the done cycle) are exercised.
`timescale 1ns/1ps
module tb_crc_encoder;
  import crc_ref_pkg::*;

  localparam int unsigned MW = 72;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic              start;
  logic [MW-1:0]     msg;
  logic              busy, done;
  logic [7:0]        crc;
  logic [MW+7:0]     cw;
  crc_encoder dut (.clk(clk), .rst_n(rst_n), .start(start), .msg(msg),
                   .busy(busy), .done(done), .crc(crc), .codeword(cw));

  logic          start4;
  logic [9:0]    msg4;
  logic          busy4, done4;
  logic [3:0]    crc4;
  logic [13:0]   cw4;
  crc_encoder #(.MSG_W(10), .CRC_W(4), .POLY(4'b0011)) dut4 (
    .clk(clk), .rst_n(rst_n), .start(start4), .msg(msg4),
    .busy(busy4), .done(done4), .crc(crc4), .codeword(cw4));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Start one encode (start held for one cycle) and wait for done, counting clocks.
  task automatic encode(logic [MW-1:0] m);
    int unsigned cyc;
    msg = m; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 1000) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low while encoding"); end
      @(posedge clk); #1;
      cyc++;
    end
    check("latency", 128'(cyc), 128'(MW + 1));
    check("crc", 128'(crc), 128'(crc_of(word_t'(m), MW, 32'hD5, 8)));
    check("codeword", 128'(cw), 128'({m, 8'(crc_of(word_t'(m), MW, 32'hD5, 8))}));
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    start = 1'b0; msg = '0; start4 = 1'b0; msg4 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check("idle after reset", 128'({busy, done}), 0);

    encode("123456789");
    check("check value 123456789", 128'(crc), 128'h00BC);
    // done is a single-cycle pulse; the result holds afterwards
    @(posedge clk); #1;
    check("done pulse", 128'(done), 0);
    check("crc held", 128'(crc), 128'h00BC);

    encode('0);
    check("zero message", 128'(crc), 0);

    for (int t = 0; t < 50; t++) begin
      encode(MW'(rand_word(MW)));
    end

    // start accepted in the done cycle
    msg = MW'(rand_word(MW)); start = 1'b1;
    @(posedge clk); #1; start = 1'b0;
    while (!done) @(posedge clk);
    #1;
    begin
      logic [MW-1:0] m2;
      m2 = MW'(rand_word(MW));
      msg = m2; start = 1'b1;
      @(posedge clk); #1; start = 1'b0;
      check("restart from done", 128'(busy), 1);
      while (!done) @(posedge clk);
      #1 check("crc after restart", 128'(crc), 128'(crc_of(word_t'(m2), MW, 32'hD5, 8)));
    end

    // 4-bit hand-worked example
    msg4 = 10'b1101011011; start4 = 1'b1;
    @(posedge clk); #1; start4 = 1'b0;
    repeat (10) @(posedge clk);
    #1;
    check("4-bit done after 11 clocks", 128'(done4), 1);
    check("4-bit check bits", 128'(crc4), 128'b1110);
    check("4-bit codeword", 128'(cw4), 128'b11010110111110);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
