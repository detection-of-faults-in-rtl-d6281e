// output_port: one mesh output of the fault-tolerant deflection router.
//
// A packet leaving the crossbar first gets its head updated for the hop it is about to make:
// the hop count is incremented (saturating), and the relative destination and source
// offsets move one step against direction DIR. On a boundary loopback output (edge = 1) the
// packet returns to the same router, so only the hop count changes (this design's choice).
// The crc_out_unit then rebuilds the checksum and checks the packet; the packet is SECDED
// encoded and driven on the link.
//
// Retransmission: RB holds the last word driven on the link, idle words included. When the
// downstream raises arq, the 2-to-1 multiplexer drives RB again instead of a new packet; the
// router does not offer this output a new packet in that cycle. Combinational from the
// crossbar to the link; RB is the only register.
module output_port
  import noc_pkg::*;
#(
  parameter int unsigned DIR = 0   // 0 = N, 1 = E, 2 = S, 3 = W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             edge_loop,  // output is looped back into the same router
  input  pkt_t             xb_pkt,     // from the crossbar (v = 0: nothing to send)
  input  logic [CRC_W-1:0] xb_dpart,   // data partial checksum from the input CRC unit
  input  logic             arq_in,     // downstream requests a retransmission
  output enc_t             link_out,
  output logic             crc_err,    // output CRC check failed
  output logic             retx        // retransmission driven this cycle
);
  pkt_t upd, fin;
  enc_t enc, rb_q;

  always_comb begin
    logic dec;
    upd = xb_pkt;
    dec = (DIR == P_N) || (DIR == P_E);   // N and E reduce the remaining offset
    if (xb_pkt.v) begin
      upd.hc = (xb_pkt.hc == '1) ? xb_pkt.hc : xb_pkt.hc + 1'b1;
      if (!edge_loop) begin
        if (DIR == P_N || DIR == P_S) begin
          upd.da_y = sm_step(xb_pkt.da_y, dec);
          upd.sa_y = sm_step(xb_pkt.sa_y, dec);
        end else begin
          upd.da_x = sm_step(xb_pkt.da_x, dec);
          upd.sa_x = sm_step(xb_pkt.sa_x, dec);
        end
      end
    end
  end

  crc_out_unit u_crc (.pkt_in(upd), .data_part(xb_dpart), .pkt_out(fin), .err(crc_err));
  pkt_encoder  u_enc (.pkt(xb_pkt.v ? fin : '0), .enc(enc));

  assign link_out = arq_in ? rb_q : enc;
  assign retx     = arq_in;

  always_ff @(posedge clk) begin
    if (!rst_n) rb_q <= '0;
    else        rb_q <= link_out;
  end

  a_no_new_on_retx: assert property (@(posedge clk) disable iff (!rst_n) arq_in |-> !xb_pkt.v);
endmodule
