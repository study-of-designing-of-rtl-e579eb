// crc_encoder: CRC encoder (check-bit generator) for a parallel message word.
//
// On start the message word is captured and then shifted, most significant bit
// first, through the bit-serial divider crc_lfsr, one bit per clock. After
// MSG_W shifts the divider holds the remainder of m(x)*x^CRC_W divided by the
// generator g(x); these are the check bits. The codeword is the message with
// the check bits concatenated after it, {msg, crc}, so that the codeword
// polynomial is divisible by g(x). This is the same result as the long
// division with CRC_W appended zeros; the divider gets it in MSG_W clocks
// instead of MSG_W + CRC_W.
//
// Interface and timing:
//   start  - accepted when the encoder is not busy; msg is sampled in that cycle.
//   busy   - high from the cycle after start until done.
//   done   - one-cycle pulse, MSG_W + 1 clocks after the start cycle.
//   crc, codeword - valid from done until the next accepted start.
// The parallel message port, the start/done handshake and the reset are this
// design's choices; the divider and the codeword layout follow the encoder
// algorithm (compute the check bits, concatenate them with the message bits).
module crc_encoder #(
  parameter int unsigned      MSG_W = crc_pkg::MSG_W_DEFAULT,
  parameter int unsigned      CRC_W = crc_pkg::CRC_W_DEFAULT,
  parameter logic [CRC_W-1:0] POLY  = crc_pkg::POLY_DVB_S2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [MSG_W-1:0]       msg,
  output logic                   busy,
  output logic                   done,
  output logic [CRC_W-1:0]       crc,
  output logic [MSG_W+CRC_W-1:0] codeword
);

  import crc_pkg::*;

  localparam int unsigned CNT_W = (MSG_W > 1) ? $clog2(MSG_W) : 1;

  seq_state_e       state_q;
  logic [MSG_W-1:0] msg_q;    // message as captured, for the codeword
  logic [MSG_W-1:0] shift_q;  // message bits still to be shifted, MSB first
  logic [CNT_W-1:0] cnt_q;    // bits shifted so far
  logic             accept;
  logic             shifting;

  assign accept   = start && (state_q != SEQ_SHIFT);
  assign shifting = (state_q == SEQ_SHIFT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= SEQ_IDLE;
      msg_q   <= '0;
      shift_q <= '0;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        SEQ_IDLE, SEQ_DONE: begin
          if (accept) begin
            state_q <= SEQ_SHIFT;
            msg_q   <= msg;
            shift_q <= msg;
            cnt_q   <= '0;
          end else begin
            state_q <= SEQ_IDLE;
          end
        end
        SEQ_SHIFT: begin
          shift_q <= shift_q << 1;
          cnt_q   <= cnt_q + 1'b1;
          if (cnt_q == CNT_W'(MSG_W - 1)) begin
            state_q <= SEQ_DONE;
          end
        end
        default: state_q <= SEQ_IDLE;
      endcase
    end
  end

  crc_lfsr #(
    .CRC_W (CRC_W),
    .POLY  (POLY)
  ) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (accept),
    .shift_en (shifting),
    .din      (shift_q[MSG_W-1]),
    .crc      (crc)
  );

  assign busy     = shifting;
  assign done     = (state_q == SEQ_DONE);
  assign codeword = {msg_q, crc};

endmodule
