// crc_codec_top: CRC encoder and checker joined through a model of the channel.
//
// The sender side (crc_encoder) appends CRC_W check bits to a MSG_W-bit message.
// The codeword then passes a channel, modelled here as an XOR with the input
// err_mask: every 1 in err_mask flips that codeword bit, giving single-bit,
// multi-bit or burst errors on demand (all zeros is an error-free channel). The
// receiver side (crc_checker) divides the received word by the same generator
// and flags an error when the remainder is non-zero.
//
// Interface and timing:
//   start, msg - start an encode; accepted when the encoder is not busy.
//   enc_done   - one-cycle pulse MSG_W + 1 clocks after start; codeword and crc
//                are valid from then on.
//   err_mask   - sampled in the enc_done cycle, when the checker takes the
//                received word codeword ^ err_mask.
//   chk_done   - one-cycle pulse MSG_W + 1 clocks after enc_done, i.e.
//                2*(MSG_W + 1) clocks after start; rem and error valid from then.
//   busy       - high while either side is working.
// The encoder, checker and generator polynomial follow the CRC encoder/decoder
// pair being modelled; the error-mask channel and the automatic hand-over from
// encoder to checker are this design's choices.
module crc_codec_top #(
  parameter int unsigned      MSG_W = crc_pkg::MSG_W_DEFAULT,
  parameter int unsigned      CRC_W = crc_pkg::CRC_W_DEFAULT,
  parameter logic [CRC_W-1:0] POLY  = crc_pkg::POLY_DVB_S2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [MSG_W-1:0]       msg,
  input  logic [MSG_W+CRC_W-1:0] err_mask,
  output logic                   busy,
  output logic                   enc_done,
  output logic [CRC_W-1:0]       crc,
  output logic [MSG_W+CRC_W-1:0] codeword,
  output logic                   chk_done,
  output logic [CRC_W-1:0]       rem,
  output logic                   error
);

  logic                   enc_busy;
  logic                   chk_busy;
  logic [MSG_W+CRC_W-1:0] rx_word;

  crc_encoder #(
    .MSG_W (MSG_W),
    .CRC_W (CRC_W),
    .POLY  (POLY)
  ) u_enc (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .msg      (msg),
    .busy     (enc_busy),
    .done     (enc_done),
    .crc      (crc),
    .codeword (codeword)
  );

  // Channel: flip the codeword bits selected by err_mask.
  assign rx_word = codeword ^ err_mask;

  crc_checker #(
    .MSG_W (MSG_W),
    .CRC_W (CRC_W),
    .POLY  (POLY)
  ) u_chk (
    .clk   (clk),
    .rst_n (rst_n),
    .start (enc_done),
    .rx    (rx_word),
    .busy  (chk_busy),
    .done  (chk_done),
    .rem   (rem),
    .error (error)
  );

  assign busy = enc_busy || chk_busy || enc_done;

endmodule
