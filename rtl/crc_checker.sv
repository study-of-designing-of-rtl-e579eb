// crc_checker: CRC checker (decoder) for a received codeword.
//
// The received word r = {message part, check part} is divided by the generator
// g(x); a zero remainder means no error was detected. The message part is
// shifted, most significant bit first, through the bit-serial divider crc_lfsr,
// which leaves (m'(x) * x^CRC_W) mod g(x). Since r(x) = m'(x)*x^CRC_W + c'(x)
// and the check part c' already has fewer than CRC_W+1 coefficients, the
// remainder of the whole received word is that value XOR c'. So rem is exactly
// r(x) mod g(x), as the checker algorithm defines it, computed in MSG_W clocks.
//
// Interface and timing:
//   start - accepted when the checker is not busy; rx is sampled in that cycle.
//   busy  - high from the cycle after start until done.
//   done  - one-cycle pulse, MSG_W + 1 clocks after the start cycle.
//   rem, error - valid from done until the next accepted start; error = (rem != 0).
// The port layout and handshake are this design's choices; the division and the
// zero-remainder test follow the checker algorithm.
module crc_checker #(
  parameter int unsigned      MSG_W = crc_pkg::MSG_W_DEFAULT,
  parameter int unsigned      CRC_W = crc_pkg::CRC_W_DEFAULT,
  parameter logic [CRC_W-1:0] POLY  = crc_pkg::POLY_DVB_S2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [MSG_W+CRC_W-1:0] rx,
  output logic                   busy,
  output logic                   done,
  output logic [CRC_W-1:0]       rem,
  output logic                   error
);

  import crc_pkg::*;

  localparam int unsigned CNT_W = (MSG_W > 1) ? $clog2(MSG_W) : 1;

  seq_state_e       state_q;
  logic [MSG_W-1:0] shift_q;  // received message bits still to be shifted
  logic [CRC_W-1:0] chk_q;    // received check bits
  logic [CNT_W-1:0] cnt_q;
  logic [CRC_W-1:0] div_crc;
  logic             accept;
  logic             shifting;

  assign accept   = start && (state_q != SEQ_SHIFT);
  assign shifting = (state_q == SEQ_SHIFT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= SEQ_IDLE;
      shift_q <= '0;
      chk_q   <= '0;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        SEQ_IDLE, SEQ_DONE: begin
          if (accept) begin
            state_q <= SEQ_SHIFT;
            shift_q <= rx[MSG_W+CRC_W-1:CRC_W];
            chk_q   <= rx[CRC_W-1:0];
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
    .crc      (div_crc)
  );

  assign busy  = shifting;
  assign done  = (state_q == SEQ_DONE);
  assign rem   = div_crc ^ chk_q;
  assign error = |rem;

endmodule
