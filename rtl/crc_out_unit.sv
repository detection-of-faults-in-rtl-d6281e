// crc_out_unit: checksum regeneration and check at a crossbar output.
//
// The router changes the head of each packet (hop count, relative addresses), so the checksum
// must be rebuilt. The new checksum is the data partial sum computed at the input (carried
// through the crossbar beside the packet) XOR the partial sum of the new head; the data bits
// that actually leave the crossbar are not used for it. The same packet is then checked from
// its own bits: a mismatch means the packet was altered between the input CRC unit and the
// output, i.e. in the crossbar. Combinational.
module crc_out_unit
  import noc_pkg::*;
(
  input  pkt_t             pkt_in,     // packet after the crossbar, head already updated
  input  logic [CRC_W-1:0] data_part,  // data partial sum from the input CRC unit
  output pkt_t             pkt_out,    // packet with regenerated checksum
  output logic             err         // output check failed
);
  always_comb begin
    pkt_out     = pkt_in;
    pkt_out.crc = data_part ^ crc_head(pkt_in);
    err         = pkt_in.v && ((crc_head(pkt_out) ^ crc_data(pkt_out)) != pkt_out.crc);
  end
endmodule
