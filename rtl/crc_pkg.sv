// crc_pkg: constants and types shared by the CRC divider, encoder and checker.
//
// The generator polynomial is stored without its leading term: for a
// degree-W polynomial g(x) = x^W + g[W-1] x^(W-1) + ... + g[0], the constant
// holds g[W-1:0]. The default is the 8-bit generator of DVB-S2,
// x^8 + x^7 + x^6 + x^4 + x^2 + 1, i.e. 8'b1101_0101 = 8'hD5. Bit 0 must be 1
// (a generator needs a non-zero constant term).
//
// The encoder and checker share one small sequencer state type: idle, shifting
// the message through the divider, and a one-cycle "done" state.
package crc_pkg;

  // Degree of the default generator polynomial (number of check bits).
  localparam int unsigned CRC_W_DEFAULT = 8;

  // x^8 + x^7 + x^6 + x^4 + x^2 + 1 with the x^8 term implied.
  localparam logic [CRC_W_DEFAULT-1:0] POLY_DVB_S2 = 8'hD5;

  // Message length used by default: the 72 header bits that the DVB-S2
  // baseband-header CRC-8 protects.
  localparam int unsigned MSG_W_DEFAULT = 72;

  typedef enum logic [1:0] {
    SEQ_IDLE  = 2'd0,
    SEQ_SHIFT = 2'd1,
    SEQ_DONE  = 2'd2
  } seq_state_e;

endpackage
