// Embeds one message bit in a pair of cover pixels (LSB-pair steganography).
//
// The message is carried by the XOR of the least significant bits of the two
// pixels, not by a single LSB: the pair encodes bit m when
// lsb(a) ^ lsb(b) == m. Before embedding, the message bit is randomized by
// XOR with one pseudo-random bit, so m = msg ^ prn. If the pair already
// encodes m, both pixels pass unchanged; otherwise the LSB of the first pixel
// is inverted, which changes its gray value by exactly one.
//
// Interface: pix_a, pix_b (PIX_W-bit gray values), msg, prn; stego_a,
// stego_b, and changed (1 when an LSB was inverted). Purely combinational.
// The XOR-of-two-LSBs rule comes from the source design; the randomizer as
// a plain XOR and the choice of the first pixel to modify are this design's.
module stego_pair_embed #(
  parameter int unsigned PIX_W = 8
) (
  input  logic [PIX_W-1:0] pix_a,
  input  logic [PIX_W-1:0] pix_b,
  input  logic             msg,
  input  logic             prn,
  output logic [PIX_W-1:0] stego_a,
  output logic [PIX_W-1:0] stego_b,
  output logic             changed
);

  logic m;

  always_comb begin
    m       = msg ^ prn;
    changed = (pix_a[0] ^ pix_b[0]) != m;
    stego_a = {pix_a[PIX_W-1:1], pix_a[0] ^ changed};
    stego_b = pix_b;
  end

endmodule
