// Recovers one message bit from a pair of stego pixels.
//
// The pair carries the randomized bit as the XOR of the two least
// significant bits; XOR with the receiver's pseudo-random bit, which equals
// the sender's when both generators start from the same key, undoes the
// randomizer: msg = lsb(a) ^ lsb(b) ^ prn.
//
// Interface: pix_a, pix_b (PIX_W-bit gray values, only the LSBs are used),
// prn; msg. Purely combinational. The LSB-pair rule follows the source
// design; the randomizer as a plain XOR is this design's choice.
module stego_pair_extract #(
  parameter int unsigned PIX_W = 8
) (
  input  logic [PIX_W-1:0] pix_a,
  input  logic [PIX_W-1:0] pix_b,
  input  logic             prn,
  output logic             msg
);

  assign msg = pix_a[0] ^ pix_b[0] ^ prn;

endmodule
