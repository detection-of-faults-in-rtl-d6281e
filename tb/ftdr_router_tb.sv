// ftdr_router_tb: one router with its four mesh neighbours modelled here. The neighbours
// send random SECDED-encoded packets (each tagged with a serial number), the node injects
// randomly, and the neighbours randomly request retransmissions (arq) or pause a link
// (fault_to). Checked: a retransmitted output repeats the previous word; every packet that
// entered leaves exactly once, with hop count + 1, with its relative destination moved one
// step in the direction it left (ejected packets have both offsets zero), and with a valid
// checksum; while all outputs are enabled no mesh packet is refused; the oldest packet is routed
// towards its destination when all outputs are free. Neighbours obey fault_to.
module ftdr_router_tb;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;
  localparam int RUN = 1500, MAXP = 20000;

  enc_t                link_in  [NDIR];
  enc_t                link_out [NDIR];
  logic [NDIR-1:0]     arq_out, fault_out, perm_out;
  logic [NDIR-1:0]     arq_in = '0, fault_in = '0, perm_in = '0;
  logic [STRESS_W-1:0] stress_in [NDIR];
  logic [STRESS_W-1:0] stress_out;
  logic                inj_valid = 1'b0, inj_ready, ej_valid;
  sm_t                 inj_da_x = '0, inj_da_y = '0;
  logic [DATA_W-1:0]   inj_data = '0;
  pkt_t                ej_pkt;
  logic [NDIR-1:0]     xbar_flip = '0;
  logic [NDIR-1:0]     conn_ok [5];
  ev_t                 ev;

  ftdr_router dut (.clk, .rst_n, .edge_loop(4'b0000), .link_in, .link_out, .arq_out,
    .fault_out, .perm_out, .arq_in, .fault_in, .perm_in, .stress_in, .stress_out,
    .inj_valid, .inj_da_x, .inj_da_y, .inj_data, .inj_ready, .ej_valid, .ej_pkt,
    .xbar_flip, .conn_ok, .ev);

  pkt_t tx [NDIR];
  enc_t tx_enc [NDIR];
  pkt_t rx [NDIR];
  logic rx_s [NDIR], rx_d [NDIR];
  logic [NPARTS*SYN_W-1:0] rx_y [NDIR];
  enc_t prev_out [NDIR];
  for (genvar d = 0; d < NDIR; d++) begin : g_nb
    pkt_encoder u_e (.pkt(tx[d]), .enc(tx_enc[d]));
    pkt_decoder u_d (.enc(link_out[d]), .pkt(rx[d]), .sec(rx_s[d]), .ded(rx_d[d]), .syn(rx_y[d]));
    // a neighbour pausing this router's input sends nothing
    assign link_in[d] = fault_out[d] ? '0 : tx_enc[d];
  end

  int   next_id = 0, n_in = 0, n_out = 0, n_defl = 0, n_hold = 0, n_retx = 0, n_ej = 0;
  bit   seen [MAXP];
  bit   known [MAXP];
  int   inj_id = MAXP / 2;
  pkt_t orig [MAXP];

  function automatic logic [7:0] ref_crc(input pkt_t p);
    logic [105:0] m;
    logic [7:0] c;
    m = {p.data, p[33:0]};
    c = '0;
    for (int i = 0; i < 106; i++) if (m[i]) c[i % 8] = !c[i % 8];
    return c;
  endfunction
  function automatic int from_sm(input sm_t v);
    return v[5] ? -int'(v[4:0]) : int'(v[4:0]);
  endfunction
  function automatic sm_t to_sm(input int v);
    return (v < 0) ? {1'b1, 5'(-v)} : {1'b0, 5'(v)};
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  task automatic leave(input pkt_t p, input int d);
    int id;
    pkt_t o;
    id = int'(p.data[31:0]);
    check(id < MAXP && known[id] && !seen[id], "unknown or duplicate packet");
    if (failures < 4 && !(id < MAXP && known[id] && !seen[id])) $display("id=%0d d=%0d pkt=%h", id, d, p);
    if (id < MAXP && known[id] && !seen[id]) begin
      seen[id] = 1;
      o = orig[id];
      n_out++;
      if (d == 4) begin
        check(p == o, "ejected packet altered");
        check(o.da_x[4:0] == 0 && o.da_y[4:0] == 0, "ejected before its destination");
      end else begin
        check(p.hc == o.hc + 9'd1, "hop count not incremented");
        check(p.crc == ref_crc(p), "checksum not rebuilt");
        check(p.data == o.data, "data altered");
        case (d)
          P_N: check(from_sm(p.da_y) == from_sm(o.da_y) - 1 && p.da_x == o.da_x, "N offset");
          P_S: check(from_sm(p.da_y) == from_sm(o.da_y) + 1 && p.da_x == o.da_x, "S offset");
          P_E: check(from_sm(p.da_x) == from_sm(o.da_x) - 1 && p.da_y == o.da_y, "E offset");
          default: check(from_sm(p.da_x) == from_sm(o.da_x) + 1 && p.da_y == o.da_y, "W offset");
        endcase
      end
    end
  endtask

  function automatic pkt_t make(input int id);
    pkt_t p;
    p = '0;
    p.v = 1'b1;
    p.hc = 9'($urandom_range(40));
    p.da_x = to_sm($urandom_range(6) - 3);
    p.da_y = to_sm($urandom_range(6) - 3);
    p.sa_x = to_sm($urandom_range(6) - 3);
    p.data = {40'($urandom), 32'(id)};
    p.crc = ref_crc(p);
    return p;
  endfunction

  initial begin
    for (int d = 0; d < NDIR; d++) begin tx[d] = '0; stress_in[d] = '0; end
    for (int i = 0; i < MAXP; i++) begin known[i] = 0; seen[i] = 0; end
    repeat (RUN + 400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc == 2) rst_n <= 1'b1;
    if (rst_n) begin
      if (inj_valid && inj_ready) begin
        orig[inj_id] = '0;
        orig[inj_id].v = 1'b1;
        orig[inj_id].da_x = inj_da_x;
        orig[inj_id].da_y = inj_da_y;
        orig[inj_id].data = inj_data;
        known[inj_id] = 1;
        inj_id++;
        n_in++;
      end
      // ---------- outputs of this cycle
      for (int d = 0; d < NDIR; d++) begin
        if (arq_in[d]) begin
          check(link_out[d] == prev_out[d], "retransmission is not the previous word");
          n_retx++;
        end else if (rx[d].v) leave(rx[d], d);
        check(!rx_d[d] && !rx_s[d], "output word not a clean code word");
        prev_out[d] <= link_out[d];
      end
      if (ej_valid) begin leave(ej_pkt, 4); n_ej++; end
      if (arq_in == '0 && fault_in == '0)
        for (int d = 0; d < NDIR; d++)
          check(!dut.cand_valid[d] || dut.grant[d], "packet refused with all outputs enabled");
      n_defl += int'(ev.deflect);
      n_hold += $countones(ev.hold);
      // ---------- new stimulus: neighbours send unless paused
      for (int d = 0; d < NDIR; d++) begin
        if (!fault_out[d]) begin
          if (cyc < RUN && $urandom_range(99) < 60) begin
            pkt_t p;
            p = make(next_id);
            tx[d] <= p;
            orig[next_id] = p;
            known[next_id] = 1;
            next_id++;
            n_in++;
          end else tx[d] <= '0;
        end
        stress_in[d] <= STRESS_W'($urandom_range(20));
      end
      arq_in   <= (cyc < RUN && $urandom_range(9) == 0) ? 4'(1 << $urandom_range(3)) : '0;
      fault_in <= (cyc < RUN && $urandom_range(9) == 0) ? 4'(1 << $urandom_range(3)) : '0;
      if (!inj_valid || inj_ready) begin
        inj_valid <= cyc < RUN && $urandom_range(1) == 0;
        inj_da_x  <= to_sm($urandom_range(4) - 2);
        inj_da_y  <= to_sm($urandom_range(4) - 2);
        inj_data  <= {40'($urandom), 32'(inj_id)};
      end
    end
    if (cyc == RUN + 100) begin
      check(n_out == n_in, "packets lost");
      check(n_defl > 0 && n_hold > 0 && n_retx > 0 && n_ej > 0, "a mechanism never happened");
      $display("in=%0d out=%0d eject=%0d deflect=%0d hold=%0d retx=%0d", n_in, n_out, n_ej, n_defl, n_hold, n_retx);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
