// noc_mesh: COLS x ROWS 2-D mesh of fault-tolerant deflection routers (8 x 8 by default).
//
// Router (x, y) has index y*COLS + x; x grows to the East, y to the North. Neighbouring
// routers are joined by a pair of 156-bit SECDED-encoded links plus the control wires of
// each link: arq and fault_to (downstream -> upstream, per word), perm (permanent link fault)
// and the stress value of the downstream router. As in a Nostrum mesh, an output on the
// boundary is not left open but wired back into the input on the same side of the same
// router, which acts as an extra packet buffer; such inputs get a hold depth of 2 (three
// entries with the input register), the others 1.
//
// Each node's processing element is outside this module: it injects packets through
// inj_* (relative destination offsets in sign-magnitude, 72 data bits; inj_ready = taken
// this cycle) and receives packets on ej_*, which it must accept in the cycle they appear.
// link_err (XORed onto every link word on its way to the next input register) and xbar_flip
// are fault-injection inputs for test; tie them to zero in use. Latency: one cycle per hop,
// plus one cycle per retransmission.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned COLS = 8,
  parameter int unsigned ROWS = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              inj_valid [ROWS*COLS],
  input  sm_t               inj_da_x  [ROWS*COLS],
  input  sm_t               inj_da_y  [ROWS*COLS],
  input  logic [DATA_W-1:0] inj_data  [ROWS*COLS],
  output logic              inj_ready [ROWS*COLS],
  output logic              ej_valid  [ROWS*COLS],
  output pkt_t              ej_pkt    [ROWS*COLS],
  input  enc_t              link_err  [ROWS*COLS][NDIR],  // XOR pattern per output link
  input  logic [NDIR-1:0]   xbar_flip [ROWS*COLS],
  output logic [NDIR-1:0]   link_perm [ROWS*COLS],        // input link diagnosed faulty
  output logic [NDIR-1:0]   xbar_ok   [ROWS*COLS][5],     // crossbar connection healthy
  output ev_t               ev        [ROWS*COLS]
);
  localparam int unsigned N = ROWS * COLS;

  enc_t                link_o  [N][NDIR];
  enc_t                link_i  [N][NDIR];
  logic [NDIR-1:0]     arq_o   [N];
  logic [NDIR-1:0]     fault_o [N];
  logic [NDIR-1:0]     perm_o  [N];
  logic [NDIR-1:0]     arq_i   [N];
  logic [NDIR-1:0]     fault_i [N];
  logic [NDIR-1:0]     perm_i  [N];
  logic [STRESS_W-1:0] stress  [N];
  logic [STRESS_W-1:0] stress_i[N][NDIR];

  for (genvar y = 0; y < ROWS; y++) begin : g_y
    for (genvar x = 0; x < COLS; x++) begin : g_x
      localparam int unsigned ID = y * COLS + x;
      // neighbour through each side, or the router itself on a boundary
      localparam int unsigned NB_N = (y == ROWS - 1) ? ID : ID + COLS;
      localparam int unsigned NB_S = (y == 0)        ? ID : ID - COLS;
      localparam int unsigned NB_E = (x == COLS - 1) ? ID : ID + 1;
      localparam int unsigned NB_W = (x == 0)        ? ID : ID - 1;
      localparam logic [NDIR-1:0] EDGE = {x == 0, y == 0, x == COLS - 1, y == ROWS - 1};
      localparam int unsigned NB [NDIR] = '{NB_N, NB_E, NB_S, NB_W};

      for (genvar d = 0; d < NDIR; d++) begin : g_d
        // side of the neighbour that faces this router (own side on a loopback)
        localparam int unsigned OD = EDGE[d] ? d : (d + 2) % 4;
        assign link_i[ID][d]   = link_o[NB[d]][OD] ^ link_err[NB[d]][OD];
        assign arq_i[ID][d]    = arq_o[NB[d]][OD];
        assign fault_i[ID][d]  = fault_o[NB[d]][OD];
        assign perm_i[ID][d]   = perm_o[NB[d]][OD];
        assign stress_i[ID][d] = stress[NB[d]];
      end

      ftdr_router #(
        .HD_N(EDGE[P_N] ? 2 : 1), .HD_E(EDGE[P_E] ? 2 : 1),
        .HD_S(EDGE[P_S] ? 2 : 1), .HD_W(EDGE[P_W] ? 2 : 1)
      ) u_r (
        .clk, .rst_n, .edge_loop(EDGE),
        .link_in(link_i[ID]), .link_out(link_o[ID]),
        .arq_out(arq_o[ID]), .fault_out(fault_o[ID]), .perm_out(perm_o[ID]),
        .arq_in(arq_i[ID]), .fault_in(fault_i[ID]), .perm_in(perm_i[ID]),
        .stress_in(stress_i[ID]), .stress_out(stress[ID]),
        .inj_valid(inj_valid[ID]), .inj_da_x(inj_da_x[ID]), .inj_da_y(inj_da_y[ID]),
        .inj_data(inj_data[ID]), .inj_ready(inj_ready[ID]),
        .ej_valid(ej_valid[ID]), .ej_pkt(ej_pkt[ID]),
        .xbar_flip(xbar_flip[ID]), .conn_ok(xbar_ok[ID]), .ev(ev[ID]));

      assign link_perm[ID] = perm_o[ID];
    end
  end
endmodule
