// input_port: one mesh input of the fault-tolerant deflection router.
//
// Structure: the input register R latches the 156-bit link word; a SECDED packet decoder
// follows it, so that errors on the link and in R are corrected (one per part) or detected
// (two in a part). Behind it sits a hold buffer of HD packets. R plus the hold buffer form
// the input buffer: HD = 1 gives the two entries of an inner port, HD = 2 the three entries of
// a boundary (loopback) port.
//
// Each cycle the port offers one candidate to the router: the oldest held packet, else the
// decoded packet in R. A candidate that is not granted an output stays in (or moves to) the
// hold buffer. When the hold buffer is full, fault_to (registered) tells the upstream router
// not to use its output towards this port in the next cycle; R then keeps its packet.
//
// Hybrid ARQ/FEC: a double error in R raises arq in the same cycle (combinational from R);
// the upstream answers by resending the last word from its retransmission buffer, which R
// takes in at the end of that cycle. If the resent word shows the same non-zero syndromes,
// the error is not transient: the link is declared permanently faulty (perm, sticky), the
// word is dropped and the port ignores the link from then on. perm is raised already in the
// detecting cycle, so the upstream offers no new word on the link that is being given up. Which syndrome pattern counts
// as "the same error", and dropping the word, are this design's choices; the document only
// says the link is then tested. Reset clears everything; an idle link carries all zeros.
module input_port
  import noc_pkg::*;
#(
  parameter int unsigned HD = 1   // hold entries behind the input register
) (
  input  logic clk,
  input  logic rst_n,
  input  enc_t link_in,
  output logic arq,          // to upstream: resend your last word on this link
  output logic fault_to,     // to upstream: do not send on this link next cycle
  output logic perm,         // to upstream: this link is permanently faulty
  output logic cand_valid,
  output pkt_t cand_pkt,
  input  logic grant,        // candidate leaves the router this cycle
  output logic ev_sec,
  output logic ev_hold,
  output logic ev_perm,
  output logic ev_drop
);
  localparam int unsigned CW = $clog2(HD + 1);

  enc_t                    r_q;
  logic                    r_used_q;     // packet in R already taken over
  logic                    retx_q;       // R holds a retransmitted word
  logic [NPARTS*SYN_W-1:0] last_syn_q;
  logic                    fault_to_q, perm_q;
  logic                    r_new_q;      // R was loaded in the previous cycle
  pkt_t                    hq_q [HD];
  logic [CW-1:0]           cnt_q;

  pkt_t                    r_pkt;
  logic                    r_sec, r_ded;
  logic [NPARTS*SYN_W-1:0] r_syn;

  pkt_decoder u_dec (.enc(r_q), .pkt(r_pkt), .sec(r_sec), .ded(r_ded), .syn(r_syn));

  logic perm_hit, r_ok, pop, r_granted, r_pending, push;
  logic [CW-1:0] cnt_pop;

  always_comb begin
    perm_hit  = !perm_q && r_ded && retx_q && (r_syn == last_syn_q);
    arq       = !perm_q && r_ded && !perm_hit;
    r_ok      = !perm_q && !r_ded && r_pkt.v && !r_used_q;
    cand_valid = (cnt_q != '0) || r_ok;
    cand_pkt   = (cnt_q != '0) ? hq_q[0] : r_pkt;
    pop       = (cnt_q != '0) && grant;
    r_granted = (cnt_q == '0) && r_ok && grant;
    r_pending = r_ok && !r_granted;
    cnt_pop   = cnt_q - CW'(pop);
    push      = r_pending && (cnt_pop < CW'(HD));
  end

  assign fault_to = fault_to_q;
  assign perm     = perm_q || perm_hit;  // raised in the detecting cycle so no new word is sent
  assign ev_sec   = r_new_q && r_sec && !r_ded && !perm_q;
  assign ev_hold  = push;
  assign ev_perm  = perm_hit;
  assign ev_drop  = perm_hit && r_pkt.v;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_q        <= '0;
      r_used_q   <= 1'b0;
      r_new_q    <= 1'b0;
      retx_q     <= 1'b0;
      last_syn_q <= '0;
      fault_to_q <= 1'b0;
      perm_q     <= 1'b0;
      cnt_q      <= '0;
      for (int i = 0; i < HD; i++) hq_q[i] <= '0;
    end else begin
      logic [CW-1:0] n;
      // hold buffer: shift out the head on a grant, append the packet of R if it waits
      if (pop) for (int i = 0; i < HD - 1; i++) hq_q[i] <= hq_q[i+1];
      n = cnt_pop;
      if (push) begin
        hq_q[int'(n)] <= r_pkt;
        n = n + 1'b1;
      end
      cnt_q      <= n;
      fault_to_q <= (n == CW'(HD));
      retx_q     <= arq;
      if (arq) last_syn_q <= r_syn;
      if (perm_hit) perm_q <= 1'b1;
      // input register
      r_new_q <= 1'b0;
      if (perm_q || perm_hit) begin
        r_q      <= '0;
        r_used_q <= 1'b0;
      end else if (!fault_to_q || r_ded) begin
        r_q      <= link_in;
        r_used_q <= 1'b0;
        r_new_q  <= 1'b1;
      end else begin
        r_used_q <= r_used_q || push || r_granted;
      end
    end
  end

  // While fault_to is low the upstream may send, so R must be free by the end of the cycle.
  a_r_consumed: assert property (@(posedge clk) disable iff (!rst_n)
    (!fault_to_q && r_pending) |-> push);
endmodule
