// route_alloc: output allocation of the bufferless deflection router.
//
// Candidates are the packets at the four mesh inputs (index 0..3 = N, E, S, W) and the local
// injection (index 4). Mesh packets are served one after the other from the highest hop
// count down (ties: lower index first); the local packet always comes last, so a node only
// injects when an output is left over.
// For each packet: at its destination (both offsets zero) it takes the local output if that
// is still free. Otherwise it takes a free productive port (towards the destination, judged
// from the sign bits of the offsets), the less stressed one if there are two. If none is
// free it is deflected to the free port with the smallest stress value. A port is free when
// no earlier packet has it, the link is enabled (out_en) and the crossbar connection from
// the packet's input to it is not diagnosed faulty. A packet that finds no port is not
// granted and waits in its input's hold buffer. Ties in stress go to the lower port index.
// Purely combinational.
module route_alloc
  import noc_pkg::*;
(
  input  logic                cand_valid [5],
  input  pkt_t                cand_pkt   [5],
  input  logic [NDIR-1:0]     out_en,            // link usable this cycle
  input  logic [NDIR-1:0]     conn_ok    [5],    // crossbar connection input -> output healthy
  input  logic [STRESS_W-1:0] stress     [NDIR], // stress value seen through each output
  output logic                grant      [5],
  output logic [2:0]          sel        [5],    // granted output (4 = local ejection)
  output logic                productive [5]     // granted port brings it closer / ejects
);
  always_comb begin
    logic [4:0] taken;
    logic [3:0] done;
    logic [3:0] prod, free;
    logic       got, found;
    int         best, c;
    pkt_t       p;
    taken = '0;
    done  = '0;
    prod  = '0;
    free  = '0;
    got   = 1'b0;
    best  = 0;
    p     = '0;
    for (int k = 0; k < 5; k++) begin
      grant[k]      = 1'b0;
      sel[k]        = 3'd0;
      productive[k] = 1'b0;
    end
    for (int r = 0; r < 5; r++) begin
      found = 1'b0;
      c = 4;
      if (r < 4) begin
        // highest hop count among the mesh packets not yet served
        for (int i = 0; i < 4; i++) begin
          if (cand_valid[i] && !done[i] &&
              (!found || cand_pkt[i].hc > cand_pkt[c].hc)) begin
            found = 1'b1;
            c = i;
          end
        end
        if (found) done[c] = 1'b1;
      end else begin
        found = cand_valid[4];
      end
      if (found) begin
        p = cand_pkt[c];
        prod[P_N] = sm_pos(p.da_y);
        prod[P_S] = sm_neg(p.da_y);
        prod[P_E] = sm_pos(p.da_x);
        prod[P_W] = sm_neg(p.da_x);
        free = out_en & ~taken[3:0] & conn_ok[c];
        got  = 1'b0;
        best = 0;
        if (sm_zero(p.da_x) && sm_zero(p.da_y) && !taken[P_L]) begin
          got = 1'b1;
          best = P_L;
          productive[c] = 1'b1;
        end
        if (!got) begin
          for (int j = 0; j < 4; j++) begin
            if (prod[j] && free[j] && (!got || stress[j] < stress[best])) begin
              got = 1'b1;
              best = j;
            end
          end
          if (got) productive[c] = 1'b1;
        end
        if (!got) begin
          for (int j = 0; j < 4; j++) begin
            if (free[j] && (!got || stress[j] < stress[best])) begin
              got = 1'b1;
              best = j;
            end
          end
        end
        if (got) begin
          grant[c]    = 1'b1;
          sel[c]      = 3'(best);
          taken[best] = 1'b1;
        end
      end
    end
  end
endmodule
