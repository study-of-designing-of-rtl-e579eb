// tb_crc_lfsr: self-checking testbench for the bit-serial CRC divider.
//
// Two dividers are tested: the default 8-bit one (x^8+x^7+x^6+x^4+x^2+1) and a
// 4-bit one with g(x) = x^4 + x + 1. After every shifted bit the register must
// equal (bits so far * x^W) mod g(x), computed by long division in
// crc_ref_pkg. Fixed vectors: the ASCII string "123456789" gives 0xBC with the
// 8-bit generator (the published check value of that CRC-8), and message
// 1101011011 gives remainder 1110 with x^4 + x + 1 (the classic hand-worked
// division). A 32-bit divider with the Ethernet generator is checked the same
// way. Also checked: shift_en low holds the register, clear empties it.
`timescale 1ns/1ps
module tb_crc_lfsr;
  import crc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // 8-bit divider, default parameters.
  logic       clr8, en8, din8;
  logic [7:0] crc8;
  crc_lfsr dut8 (.clk(clk), .rst_n(rst_n), .clear(clr8), .shift_en(en8),
                 .din(din8), .crc(crc8));

  // 4-bit divider, g(x) = x^4 + x + 1.
  logic       clr4, en4, din4;
  logic [3:0] crc4;
  crc_lfsr #(.CRC_W(4), .POLY(4'b0011)) dut4 (.clk(clk), .rst_n(rst_n),
                 .clear(clr4), .shift_en(en4), .din(din4), .crc(crc4));

  // 32-bit divider with the Ethernet generator 04C11DB7, to show the same
  // RTL works for other degrees.
  logic        en32, din32;
  logic [31:0] crc32;
  crc_lfsr #(.CRC_W(32), .POLY(32'h04C1_1DB7)) dut32 (.clk(clk), .rst_n(rst_n),
                 .clear(1'b0), .shift_en(en32), .din(din32), .crc(crc32));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Shift n bits of msg (MSB first) into the 8-bit divider, checking each step.
  task automatic feed8(word_t msg, int unsigned n);
    word_t prefix;
    prefix = '0;
    for (int i = int'(n) - 1; i >= 0; i--) begin
      din8 = msg[i];
      en8  = 1'b1;
      prefix = (prefix << 1) | word_t'(msg[i]);
      @(posedge clk); #1;
      check("step8", 32'(crc8), 32'(crc_of(prefix, n - i, 32'hD5, 8)));
    end
    en8 = 1'b0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t m;
    logic [7:0] held;
    rst_n = 1'b0;
    {clr8, en8, din8, clr4, en4, din4, en32, din32} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check("reset8", 32'(crc8), 0);
    check("reset4", 32'(crc4), 0);

    // "123456789" -> 0xBC
    m = '0;
    m[71:0] = "123456789";
    feed8(m, 72);
    check("check value 123456789", 32'(crc8), 32'hBC);

    // hold with shift_en low
    held = crc8;
    din8 = 1'b1;
    repeat (3) @(posedge clk);
    #1 check("hold", 32'(crc8), 32'(held));

    // clear has priority over shift_en
    clr8 = 1'b1; en8 = 1'b1;
    @(posedge clk); #1;
    clr8 = 1'b0; en8 = 1'b0;
    check("clear", 32'(crc8), 0);

    // random messages of random length
    for (int t = 0; t < 40; t++) begin
      int unsigned n;
      n = 1 + ($urandom() % 64);
      clr8 = 1'b1;
      @(posedge clk); #1;
      clr8 = 1'b0;
      feed8(rand_word(n), n);
    end

    // 4-bit divider: 1101011011 mod (x^4+x+1) after appending 4 zeros = 1110
    begin
      logic [9:0] bits4;
      bits4 = 10'b1101011011;
      for (int i = 9; i >= 0; i--) begin
        din4 = bits4[i]; en4 = 1'b1;
        @(posedge clk); #1;
      end
      en4 = 1'b0;
      check("worked example 4-bit", 32'(crc4), 32'b1110);
    end

    // 32-bit divider: "123456789" with zero start value and no final
    // inversion gives 89A1897F (the complement of the POSIX cksum check value
    // 765E7680); also compared with long division.
    m = '0;
    m[71:0] = "123456789";
    for (int i = 71; i >= 0; i--) begin
      din32 = m[i]; en32 = 1'b1;
      @(posedge clk); #1;
    end
    en32 = 1'b0;
    check("32-bit check value", crc32, 32'h89A1_897F);
    check("32-bit long division", crc32, crc_of(m, 72, 32'h04C1_1DB7, 32));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
