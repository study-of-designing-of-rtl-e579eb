// crc_lfsr: bit-serial CRC divider (modulo-2 division by a generator polynomial).
//
// This is the shift-register divider of the 8-bit CRC generator: CRC_W stages
// in a row, stage i holding the coefficient of x^i. The top stage (x^(CRC_W-1))
// is XORed with the incoming message bit; that sum is the feedback. It enters
// stage 0 and is XORed into the input of every stage i whose generator
// coefficient g[i] is 1. With the default polynomial x^8+x^7+x^6+x^4+x^2+1
// there are XOR taps in front of the stages x^2, x^4, x^6 and x^7, plus the
// input XOR: eight stages and five XOR gates, as in the reference circuit.
//
// Because the message enters at the x^CRC_W end, no zeros need to be shifted in
// after the message: once all message bits (most significant first) have been
// shifted, the stages hold the remainder of m(x)*x^CRC_W divided by g(x),
// i.e. the CRC check bits.
//
// Interface and timing: one message bit per clock while shift_en is high; crc
// shows the register contents (registered output). clear empties the register
// synchronously and has priority over shift_en; rst_n clears it asynchronously.
// The stage structure and polynomial follow the reference circuit; the clear
// input, the reset and the zero initial value are this design's choice.
module crc_lfsr #(
  parameter int unsigned               CRC_W = crc_pkg::CRC_W_DEFAULT,
  parameter logic [CRC_W-1:0]          POLY  = crc_pkg::POLY_DVB_S2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             shift_en,
  input  logic             din,
  output logic [CRC_W-1:0] crc
);

  logic [CRC_W-1:0] stage_q;
  logic [CRC_W-1:0] stage_d;
  logic             feedback;

  // Feedback: top stage XOR input data.
  assign feedback = stage_q[CRC_W-1] ^ din;

  always_comb begin
    stage_d[0] = feedback;
    for (int unsigned i = 1; i < CRC_W; i++) begin
      stage_d[i] = stage_q[i-1] ^ (POLY[i] & feedback);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_q <= '0;
    end else if (clear) begin
      stage_q <= '0;
    end else if (shift_en) begin
      stage_q <= stage_d;
    end
  end

  assign crc = stage_q;

  // A generator polynomial needs a non-zero constant term.
  initial begin
    assert (POLY[0] == 1'b1)
      else $error("crc_lfsr: POLY must have a non-zero x^0 coefficient");
  end

endmodule
