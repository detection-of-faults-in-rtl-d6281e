// crc_in_unit: checksum check of a packet after the input register and its decoder.
//
// The CRC generator is x^8 + 1, so the checksum is the XOR of all 8-bit slices of the head
// and the 72 payload data bits; it needs no shift register, only parity trees. The unit gives
// the head and data partial sums separately: the data part is passed on with the packet
// through the crossbar, where the output side combines it with the partial sum of the
// updated head (crc_out_unit). `err` flags a mismatch with the stored checksum of a valid
// packet. Combinational.
module crc_in_unit
  import noc_pkg::*;
(
  input  pkt_t             pkt,
  output logic [CRC_W-1:0] head_part,
  output logic [CRC_W-1:0] data_part,
  output logic             err
);
  assign head_part = crc_head(pkt);
  assign data_part = crc_data(pkt);
  assign err       = pkt.v && ((head_part ^ data_part) != pkt.crc);
endmodule
