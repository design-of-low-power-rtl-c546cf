// Sender and receiver of LSB-pair image steganography driven by the
// low-power three-parallel LFSR.
//
// Each side has its own lfsr3_retimed used as a pseudo-random number
// generator: after reset (or a flush with fb_en low) the key is shifted in
// through u, then u is held at 0 and the LFSR runs free, giving three
// pseudo-random bits per clock. Starting both sides from the same key gives
// both the same bit stream.
//   * Sender: three stego_pair_embed lanes. Lane j embeds msg_in[j] into the
//     pixel pair (cover_a[j], cover_b[j]), randomized with the sender's LFSR
//     output bit j of the same clock.
//   * Receiver: three stego_pair_extract lanes. Lane j recovers msg_out[j]
//     from (rx_a[j], rx_b[j]) with the receiver's LFSR output bit j.
// The pixel pairs arrive already chosen: the selection of carrier pixels is
// outside this design. The embed and extract lanes are combinational, so a
// pair entering at clock c uses the LFSR bits on tx_prn / rx_prn during
// clock c. The LFSR outputs and their flops' gated clocks are brought out.
// Which pixel of a pair is modified, the use of the LFSR bits as a message
// randomizer and the key loading through u are this design's choices.
module lfsr_stego_top
  import lfsr_pkg::*;
#(
  parameter int unsigned PIX_W        = 8,
  parameter bit          CLOCK_GATING = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  // sender
  input  logic             tx_fb_en,
  input  lane_t            tx_u,
  input  logic [PIX_W-1:0] cover_a [LANES],
  input  logic [PIX_W-1:0] cover_b [LANES],
  input  lane_t            msg_in,
  output logic [PIX_W-1:0] stego_a [LANES],
  output logic [PIX_W-1:0] stego_b [LANES],
  output lane_t            changed,
  output lane_t            tx_prn,
  output logic [N_FF-1:0]  tx_gclk,
  // receiver
  input  logic             rx_fb_en,
  input  lane_t            rx_u,
  input  logic [PIX_W-1:0] rx_a [LANES],
  input  logic [PIX_W-1:0] rx_b [LANES],
  output lane_t            msg_out,
  output lane_t            rx_prn,
  output logic [N_FF-1:0]  rx_gclk
);

  lfsr3_retimed #(.CLOCK_GATING(CLOCK_GATING)) u_tx_lfsr (
    .clk(clk), .rst_n(rst_n), .fb_en(tx_fb_en), .u(tx_u), .y(tx_prn),
    .gclk(tx_gclk));

  lfsr3_retimed #(.CLOCK_GATING(CLOCK_GATING)) u_rx_lfsr (
    .clk(clk), .rst_n(rst_n), .fb_en(rx_fb_en), .u(rx_u), .y(rx_prn),
    .gclk(rx_gclk));

  for (genvar j = 0; j < LANES; j++) begin : g_lane
    stego_pair_embed #(.PIX_W(PIX_W)) u_embed (
      .pix_a(cover_a[j]), .pix_b(cover_b[j]), .msg(msg_in[j]), .prn(tx_prn[j]),
      .stego_a(stego_a[j]), .stego_b(stego_b[j]), .changed(changed[j]));
    stego_pair_extract #(.PIX_W(PIX_W)) u_extract (
      .pix_a(rx_a[j]), .pix_b(rx_b[j]), .prn(rx_prn[j]), .msg(msg_out[j]));
  end

endmodule
