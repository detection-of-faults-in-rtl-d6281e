// noc_mesh_tb: end-to-end test of the 8 x 8 mesh at its default size.
//
// Every node injects packets to random destinations. Each packet carries a serial number in
// its data, so every delivery can be checked against what was sent: delivered at the right
// node, data intact (bit 0 excepted, which the crossbar fault injection may flip), source
// offset pointing back to the sender, and the checksum matching unless the packet crossed
// the faulty crossbar output. Faults injected on the way:
//   * random single-bit errors on links (must be corrected),
//   * random double errors in one part of a word for one cycle (must be retransmitted),
//   * a permanent double error on one link (must be diagnosed, the link avoided),
//   * a permanent fault at one crossbar output (must be diagnosed by the CRC units).
// At the end all packets must have arrived, except those dropped at the permanent link
// fault, and every mechanism must have happened at least once.
module noc_mesh_tb;
  import noc_pkg::*;

  localparam int COLS = 8, ROWS = 8, N = COLS * ROWS;
  localparam int INJ_CYCLES = 1200, MAX_CYCLES = 4000, MAXP = 40000;
  localparam int PERM_NODE = 27, PERM_DIR = P_E;   // link (3,3) -> (4,3)
  localparam int XB_NODE = 45, XB_DIR = P_S;       // crossbar output S of (5,5)

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  logic              inj_valid [N];
  sm_t               inj_da_x  [N];
  sm_t               inj_da_y  [N];
  logic [DATA_W-1:0] inj_data  [N];
  logic              inj_ready [N];
  logic              ej_valid  [N];
  pkt_t              ej_pkt    [N];
  enc_t              link_err  [N][NDIR];
  logic [NDIR-1:0]   xbar_flip [N];
  logic [NDIR-1:0]   link_perm [N];
  logic [NDIR-1:0]   xbar_ok   [N][5];
  ev_t               ev        [N];

  noc_mesh dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  int next_id = 0, injected = 0, delivered = 0, dropped = 0, crc_bad = 0;
  int n_sec = 0, n_arq = 0, n_retx = 0, n_hold = 0, n_fault_to = 0, n_perm = 0, n_drop = 0;
  int n_xerr = 0, n_xperm = 0, n_defl = 0, n_ej = 0, n_inj = 0, n_loop = 0, n_crcin = 0;
  int max_lat = 0;
  logic [DATA_W-1:0] sent_data [MAXP];
  int                sent_dst  [MAXP];
  int                sent_src  [MAXP];
  int                sent_cyc  [MAXP];
  bit                got       [MAXP];

  function automatic sm_t to_sm(input int v);
    return (v < 0) ? {1'b1, 5'(-v)} : {1'b0, 5'(v)};
  endfunction
  function automatic int from_sm(input sm_t v);
    return v[5] ? -int'(v[4:0]) : int'(v[4:0]);
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  task automatic new_packet(input int k);
    int sx, sy, tx, ty;
    sx = k % COLS; sy = k / COLS;
    do begin
      tx = $urandom_range(COLS - 1);
      ty = $urandom_range(ROWS - 1);
    end while (tx == sx && ty == sy);
    inj_valid[k] = 1'b1;
    inj_da_x[k]  = to_sm(tx - sx);
    inj_da_y[k]  = to_sm(ty - sy);
    inj_data[k]  = {32'(next_id), 8'(k), 32'($urandom)};
    sent_data[next_id] = inj_data[k];
    sent_src[next_id]  = k;
    sent_dst[next_id]  = tx + COLS * ty;
    got[next_id]       = 1'b0;
    sent_cyc[next_id]  = -1;
    next_id++;
  endtask

  task automatic report();
    $display("injected=%0d delivered=%0d dropped=%0d crc_flagged=%0d max_latency=%0d cycles=%0d",
             injected, delivered, dropped, crc_bad, max_lat, cyc);
    $display("events: sec=%0d arq=%0d retx=%0d hold=%0d fault_to=%0d perm_link=%0d drop=%0d",
             n_sec, n_arq, n_retx, n_hold, n_fault_to, n_perm, n_drop);
    $display("        crc_in_err=%0d xbar_err=%0d xbar_perm=%0d deflect=%0d eject=%0d inject=%0d loopback=%0d",
             n_crcin, n_xerr, n_xperm, n_defl, n_ej, n_inj, n_loop);
    for (int i = 0; i < next_id && i < MAXP; i++)
      if (!got[i] && sent_cyc[i] >= 0 && failures < 30) $display("missing id %0d src %0d dst %0d", i, sent_src[i], sent_dst[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (MAX_CYCLES + 10) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) begin
      inj_valid[k] = 1'b0; inj_da_x[k] = '0; inj_da_y[k] = '0; inj_data[k] = '0;
      xbar_flip[k] = '0;
      for (int d = 0; d < NDIR; d++) link_err[k][d] = '0;
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc == 3) rst_n <= 1'b1;
    if (rst_n) begin
      // ---------------- deliveries and events of the cycle that just ended
      for (int k = 0; k < N; k++) begin
        if (ej_valid[k]) begin
          int id;
          pkt_t p;
          p  = ej_pkt[k];
          id = int'(p.data[71:40]);
          delivered++;
          check(id < next_id && !got[id], "unknown or duplicate packet");
          if (id < next_id && !got[id]) begin
            got[id] = 1'b1;
            check(sent_dst[id] == k, "delivered at the wrong node");
            check(p.data[71:1] == sent_data[id][71:1], "payload corrupted");
            check(from_sm(p.sa_x) == (sent_src[id] % COLS) - (k % COLS) &&
                  from_sm(p.sa_y) == (sent_src[id] / COLS) - (k / COLS), "source offset wrong");
            if (cyc - sent_cyc[id] > max_lat) max_lat = cyc - sent_cyc[id];
          end
          if ((crc_head(p) ^ crc_data(p)) != p.crc) crc_bad++;
        end
        if (inj_valid[k] && inj_ready[k]) begin
          sent_cyc[int'(inj_data[k][71:40])] = cyc;
          injected++;
          inj_valid[k] = 1'b0;
        end
        n_sec      += $countones(ev[k].sec);
        n_arq      += $countones(ev[k].arq);
        n_retx     += $countones(ev[k].retx);
        n_hold     += $countones(ev[k].hold);
        n_fault_to += $countones(ev[k].fault_to);
        n_perm     += $countones(ev[k].perm_link);
        n_drop     += $countones(ev[k].drop);
        n_crcin    += $countones(ev[k].crc_in_err);
        n_xerr     += $countones(ev[k].xbar_err);
        n_xperm    += int'(ev[k].xbar_perm);
        n_defl     += int'(ev[k].deflect);
        n_ej       += int'(ev[k].eject);
        n_inj      += int'(ev[k].inject);
        n_loop     += int'(ev[k].loopback);
      end
      // ---------------- new stimulus
      for (int k = 0; k < N; k++) begin
        if (!inj_valid[k] && cyc < INJ_CYCLES && next_id < MAXP - N && $urandom_range(99) < 35)
          new_packet(k);
        for (int d = 0; d < NDIR; d++) begin
          link_err[k][d] = '0;
          if ($urandom_range(999) < 4) link_err[k][d][$urandom_range(ENC_W - 1)] = 1'b1;
          else if ($urandom_range(999) < 2) begin
            int part, a;
            part = 46 + 22 * $urandom_range(4);   // one payload part
            a = $urandom_range(20);
            link_err[k][d][part + a] = 1'b1;
            link_err[k][d][part + a + 1] = 1'b1;
          end
        end
      end
      if (cyc >= 200) begin
        link_err[PERM_NODE][PERM_DIR] = '0;
        link_err[PERM_NODE][PERM_DIR][5] = 1'b1;
        link_err[PERM_NODE][PERM_DIR][9] = 1'b1;
        xbar_flip[XB_NODE][XB_DIR] = 1'b1;
      end
      // ---------------- end of test
      if (cyc > INJ_CYCLES && delivered + n_drop >= injected) begin
        dropped = n_drop;
        check(delivered + dropped == injected, "packets lost");
        check(link_perm[PERM_NODE + 1][P_W], "permanent link fault not diagnosed");
        check(xbar_ok[XB_NODE][0][XB_DIR] == 1'b0 || xbar_ok[XB_NODE][1][XB_DIR] == 1'b0 ||
              xbar_ok[XB_NODE][2][XB_DIR] == 1'b0 || xbar_ok[XB_NODE][3][XB_DIR] == 1'b0 ||
              xbar_ok[XB_NODE][4][XB_DIR] == 1'b0, "crossbar fault not diagnosed");
        check(n_sec > 0, "no single error corrected");
        check(n_arq > 0 && n_retx > 0, "no retransmission");
        check(n_hold > 0, "no packet held");
        check(n_fault_to > 0, "no fault_to back-pressure");
        check(n_perm > 0, "no permanent link fault");
        check(n_xerr > 0 && n_xperm > 0, "no crossbar fault diagnosis");
        check(n_crcin > 0, "no input CRC mismatch");
        check(n_defl > 0, "no deflection");
        check(n_loop > 0, "no boundary loopback");
        check(n_ej == delivered && n_inj == injected, "event counts disagree");
        report();
        $finish;
      end
    end
  end
endmodule
