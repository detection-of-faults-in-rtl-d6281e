// pkt_decoder: SECDED decoding of one 156-bit link word (see pkt_encoder for the layout).
//
// Each of the seven parts is decoded on its own: a single error in a part is corrected, two
// errors in a part are flagged. `sec` is set when any part was corrected, `ded` when any part
// holds an uncorrectable double error (the receiver then asks for a retransmission). `syn`
// concatenates the seven 6-bit syndromes so that a repeated error pattern can be recognised.
// Combinational.
module pkt_decoder
  import noc_pkg::*;
(
  input  enc_t                      enc,
  output pkt_t                      pkt,
  output logic                      sec,
  output logic                      ded,
  output logic [NPARTS*SYN_W-1:0]   syn
);
  logic [PKT_W-1:0]  raw;
  logic [NPARTS-1:0] sec_p, ded_p;

  for (genvar h = 0; h < 2; h++) begin : g_head
    secded_dec #(.K(17)) u_dec (
      .code(enc[23*h +: 23]), .data(raw[17*h +: 17]),
      .sec(sec_p[h]), .ded(ded_p[h]), .syn(syn[SYN_W*h +: SYN_W]));
  end
  for (genvar p = 0; p < 5; p++) begin : g_pay
    secded_dec #(.K(16)) u_dec (
      .code(enc[46 + 22*p +: 22]), .data(raw[HEAD_W + 16*p +: 16]),
      .sec(sec_p[2+p]), .ded(ded_p[2+p]), .syn(syn[SYN_W*(2+p) +: SYN_W]));
  end

  assign pkt = raw;
  assign sec = |sec_p;
  assign ded = |ded_p;
endmodule
