// pkt_encoder: SECDED encoding of one packet for a link.
//
// The 114-bit packet is split into seven parts, each protected on its own so that a single
// error in every part can be corrected: the 34-bit head as two 17-bit halves, each a
// Hamming(23,17) word, and the 80-bit payload as five 16-bit slices, each a Hamming(22,16)
// word, 156 bits in all. Code word layout (this design's choice): head half 0 in bits 22:0,
// head half 1 in 45:23, payload slice k in bits 46+22k+21 : 46+22k.
// An all-zero packet (V = 0, idle link) encodes to all zeros. Combinational.
module pkt_encoder
  import noc_pkg::*;
(
  input  pkt_t pkt,
  output enc_t enc
);
  logic [PKT_W-1:0] raw;
  assign raw = pkt;

  for (genvar h = 0; h < 2; h++) begin : g_head
    secded_enc #(.K(17)) u_enc (.data(raw[17*h +: 17]), .code(enc[23*h +: 23]));
  end
  for (genvar p = 0; p < 5; p++) begin : g_pay
    secded_enc #(.K(16)) u_enc (.data(raw[HEAD_W + 16*p +: 16]), .code(enc[46 + 22*p +: 22]));
  end
endmodule
