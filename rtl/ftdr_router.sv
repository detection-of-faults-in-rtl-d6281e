// ftdr_router: bufferless fault-tolerant deflection router with link-level error control.
//
// One router of a 2-D mesh with four mesh ports (N, E, S, W) and a local port. Every packet
// that arrives is sent on in the next cycle through some output: towards its destination if
// possible, else deflected (route_alloc). The only storage is the input register of each
// input port, a small hold buffer behind it (used only when links are disabled), and a
// retransmission buffer per output.
//
// Fault handling:
//  * Link transients: words travel SECDED-encoded. The decoder after each input register
//    corrects one error per part; a double error raises arq towards the upstream router,
//    which resends the word from its retransmission buffer in the next cycle (hybrid ARQ/FEC).
//  * Output disabling: a mesh output is not offered to new packets while its downstream
//    requests a retransmission (arq_in), asks to pause (fault_in = its fault_to) or has
//    declared the link permanently faulty (perm_in). If four packets then compete for fewer
//    outputs, the lowest-priority one waits in its hold buffer, and a full hold buffer
//    raises fault_to towards its own upstream, so the pause travels back hop by hop.
//  * Permanent link faults: a retransmission with the same double-error syndrome marks the
//    input link faulty for good (perm_out); the upstream stops using it.
//  * Crossbar faults: CRC checks (generator x^8+1) at every mesh input and output locate
//    errors made inside the switch; xbar_diag marks faulty crossbar connections, which the
//    allocator avoids from then on.
// Timing: inputs registered, everything else combinational up to the link, i.e. one cycle
// per hop. arq_out is combinational from the input registers; fault_to, perm and stress are
// registered. The hold depth of each input is a parameter: 1 (two entries in all) inside
// the mesh, 2 (three entries) on boundary loopback ports. xbar_flip is a fault-injection
// input that inverts payload data bit 0 of a packet at crossbar output j; tie it to 0 in use.
module ftdr_router
  import noc_pkg::*;
#(
  parameter int unsigned HD_N = 1,
  parameter int unsigned HD_E = 1,
  parameter int unsigned HD_S = 1,
  parameter int unsigned HD_W = 1,
  parameter int unsigned XBAR_THRESH = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NDIR-1:0]     edge_loop,   // output d is looped back to input d
  // mesh links, index = side of this router
  input  enc_t                link_in   [NDIR],
  output enc_t                link_out  [NDIR],
  output logic [NDIR-1:0]     arq_out,     // to the router feeding input d
  output logic [NDIR-1:0]     fault_out,
  output logic [NDIR-1:0]     perm_out,
  input  logic [NDIR-1:0]     arq_in,      // from the router fed by output d
  input  logic [NDIR-1:0]     fault_in,
  input  logic [NDIR-1:0]     perm_in,
  input  logic [STRESS_W-1:0] stress_in [NDIR],
  output logic [STRESS_W-1:0] stress_out,
  // local port
  input  logic                inj_valid,
  input  sm_t                 inj_da_x,
  input  sm_t                 inj_da_y,
  input  logic [DATA_W-1:0]   inj_data,
  output logic                inj_ready,
  output logic                ej_valid,
  output pkt_t                ej_pkt,
  // fault injection and status
  input  logic [NDIR-1:0]     xbar_flip,
  output logic [NDIR-1:0]     conn_ok   [5],
  output ev_t                 ev
);
  localparam int unsigned HD [NDIR] = '{HD_N, HD_E, HD_S, HD_W};

  logic                cand_valid [5];
  pkt_t                cand_pkt   [5];
  logic                grant      [5];
  logic [2:0]          sel        [5];
  logic                productive [5];
  logic [CRC_W-1:0]    hpart      [5];
  logic [CRC_W-1:0]    dpart      [5];
  logic [4:0]          in_err;
  logic [NDIR-1:0]     ev_sec, ev_hold, ev_perm, ev_drop, out_err, out_retx;
  logic [STRESS_W-1:0] stress_eff [NDIR];
  logic [NDIR-1:0]     out_en;
  pkt_t                xb_pkt     [NDIR];
  logic [CRC_W-1:0]    xb_dpart   [NDIR];
  logic [2:0]          xb_src     [NDIR];
  logic [NDIR-1:0]     xb_valid;
  logic                xbar_new_perm;

  // ---------------------------------------------------------------- inputs
  for (genvar d = 0; d < NDIR; d++) begin : g_in
    input_port #(.HD(HD[d])) u_in (
      .clk, .rst_n, .link_in(link_in[d]),
      .arq(arq_out[d]), .fault_to(fault_out[d]), .perm(perm_out[d]),
      .cand_valid(cand_valid[d]), .cand_pkt(cand_pkt[d]), .grant(grant[d]),
      .ev_sec(ev_sec[d]), .ev_hold(ev_hold[d]), .ev_perm(ev_perm[d]), .ev_drop(ev_drop[d]));
  end

  // local injection: a new packet with hop count 0 and source offset 0
  always_comb begin
    cand_valid[P_L]    = inj_valid;
    cand_pkt[P_L]      = '0;
    cand_pkt[P_L].v    = inj_valid;
    cand_pkt[P_L].da_x = inj_da_x;
    cand_pkt[P_L].da_y = inj_da_y;
    cand_pkt[P_L].data = inj_data;
  end

  for (genvar c = 0; c < 5; c++) begin : g_crc
    logic err;
    crc_in_unit u_crc (.pkt(cand_pkt[c]), .head_part(hpart[c]), .data_part(dpart[c]), .err(err));
    // the local connection has no CRC check
    assign in_err[c] = (c < 4) ? (err && cand_valid[c]) : 1'b0;
  end

  // ---------------------------------------------------------------- allocation
  for (genvar d = 0; d < NDIR; d++) begin : g_en
    assign out_en[d]     = !arq_in[d] && !fault_in[d] && !perm_in[d];
    assign stress_eff[d] = edge_loop[d] ? stress_out : stress_in[d];
  end

  route_alloc u_alloc (
    .cand_valid, .cand_pkt, .out_en, .conn_ok, .stress(stress_eff),
    .grant, .sel, .productive);

  for (genvar d = 0; d < NDIR; d++) begin : g_grant_unused
    // hpart is recomputed at the outputs for the updated head
    logic unused;
    assign unused = ^hpart[d];
  end

  // ---------------------------------------------------------------- crossbar
  always_comb begin
    for (int j = 0; j < NDIR; j++) begin
      xb_pkt[j]   = '0;
      xb_dpart[j] = '0;
      xb_src[j]   = '0;
      xb_valid[j] = 1'b0;
      for (int c = 0; c < 5; c++) begin
        if (grant[c] && sel[c] == 3'(j)) begin
          xb_pkt[j]   = cand_pkt[c];
          xb_dpart[j] = dpart[c];
          xb_src[j]   = 3'(c);
          xb_valid[j] = 1'b1;
        end
      end
      xb_pkt[j].data[0] = xb_pkt[j].data[0] ^ (xbar_flip[j] && xb_valid[j]);
    end
    ej_valid = 1'b0;
    ej_pkt   = '0;
    for (int c = 0; c < 5; c++) begin
      if (grant[c] && sel[c] == 3'(P_L)) begin
        ej_valid = 1'b1;
        ej_pkt   = cand_pkt[c];
      end
    end
  end

  assign inj_ready = grant[P_L];

  // ---------------------------------------------------------------- outputs
  for (genvar d = 0; d < NDIR; d++) begin : g_out
    output_port #(.DIR(d)) u_out (
      .clk, .rst_n, .edge_loop(edge_loop[d]),
      .xb_pkt(xb_pkt[d]), .xb_dpart(xb_dpart[d]), .arq_in(arq_in[d]),
      .link_out(link_out[d]), .crc_err(out_err[d]), .retx(out_retx[d]));
  end

  xbar_diag #(.THRESH(XBAR_THRESH)) u_diag (
    .clk, .rst_n, .out_valid(xb_valid), .out_src(xb_src), .out_err(out_err),
    .in_err, .conn_ok, .new_perm(xbar_new_perm));

  // ---------------------------------------------------------------- stress
  logic [2:0] n_proc;
  always_comb begin
    n_proc = '0;
    for (int c = 0; c < 5; c++) n_proc = n_proc + 3'(grant[c]);
  end
  stress_counter #(.WIN(4)) u_stress (.clk, .rst_n, .processed(n_proc), .stress(stress_out));

  // ---------------------------------------------------------------- events
  always_comb begin
    ev            = '0;
    ev.sec        = ev_sec;
    ev.arq        = arq_out;
    ev.retx       = out_retx;
    ev.hold       = ev_hold;
    ev.fault_to   = fault_out;
    ev.perm_link  = ev_perm;
    ev.drop       = ev_drop;
    ev.crc_in_err = in_err[3:0];
    ev.xbar_err   = out_err & xb_valid;
    ev.xbar_perm  = xbar_new_perm;
    ev.eject      = ej_valid;
    ev.inject     = grant[P_L];
    ev.loopback   = |(xb_valid & edge_loop);
    for (int c = 0; c < 5; c++)
      if (grant[c] && !productive[c]) ev.deflect = ev.deflect + 1'b1;
  end
endmodule
