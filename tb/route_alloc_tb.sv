// route_alloc_tb: the deflection allocator against rules checked here independently.
// Random cycles (all five candidates random, random link enables) check that no output is
// given twice, that only enabled and healthy ports are given, that no packet is refused
// while a usable port is left, that the oldest packet gets a productive port when all
// ports are usable, and that the local packet is only taken when a port is left over.
// Single-packet cycles check the port choice exactly: the least-stressed usable productive
// port, else (deflection) the least-stressed usable port.
module route_alloc_tb;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = !clk;
  localparam int NVEC = 4000;

  logic                cand_valid [5];
  pkt_t                cand_pkt   [5];
  logic [NDIR-1:0]     out_en;
  logic [NDIR-1:0]     conn_ok    [5];
  logic [STRESS_W-1:0] stress     [NDIR];
  logic                grant      [5];
  logic [2:0]          sel        [5];
  logic                productive [5];

  route_alloc dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [3:0] prod_of(input pkt_t p);
    logic [3:0] m;
    m[P_N] = !p.da_y[5] && p.da_y[4:0] != 0;
    m[P_S] =  p.da_y[5] && p.da_y[4:0] != 0;
    m[P_E] = !p.da_x[5] && p.da_x[4:0] != 0;
    m[P_W] =  p.da_x[5] && p.da_x[4:0] != 0;
    return m;
  endfunction

  initial begin
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) begin
    if (cyc > 0) begin
      logic [4:0] used;
      int nnet, nfree, top, nvalid;
      used = '0; nnet = 0; nvalid = 0; top = -1;
      for (int c = 0; c < 5; c++) if (grant[c]) begin
        check(cand_valid[c], "grant without a packet");
        check(!used[sel[c]], "output given twice");
        used[sel[c]] = 1'b1;
        if (sel[c] != 3'd4) check(out_en[sel[c]] && conn_ok[c][sel[c]], "disabled port given");
        if (c < 4 && sel[c] != 3'd4) nnet++;
      end
      nfree = $countones(out_en);
      for (int c = 0; c < 4; c++) if (cand_valid[c]) begin
        nvalid++;
        if (top < 0 || cand_pkt[c].hc > cand_pkt[top].hc) top = c;
      end
      if (cyc % 2 == 0) begin
        // random cycle, all crossbar connections healthy
        for (int c = 0; c < 4; c++)
          if (cand_valid[c] && !grant[c]) check(nnet >= nfree, "packet refused while a port was free");
        if (out_en == 4'hF && top >= 0 && !(cand_pkt[top].da_x[4:0] == 0 && cand_pkt[top].da_y[4:0] == 0))
          check(grant[top] && sel[top] != 3'd4 && prod_of(cand_pkt[top])[sel[top]], "oldest packet not routed productively");
        if (cand_valid[4]) begin
          int left;
          left = nfree - nnet;
          if (cand_pkt[4].da_x[4:0] != 0 || cand_pkt[4].da_y[4:0] != 0)
            check(grant[4] == (left > 0), "local injection rule");
        end
      end else begin
        // one packet at input 0
        logic [3:0] pr, us;
        int best;
        pr = prod_of(cand_pkt[0]);
        us = out_en & conn_ok[0];
        best = -1;
        if ((pr & us) != 0) begin
          for (int j = 0; j < 4; j++) if (pr[j] && us[j] && (best < 0 || stress[j] < stress[best])) best = j;
        end else begin
          for (int j = 0; j < 4; j++) if (us[j] && (best < 0 || stress[j] < stress[best])) best = j;
        end
        if (best < 0) check(!grant[0], "granted with no usable port");
        else begin
          check(grant[0] && int'(sel[0]) == best && productive[0] == ((pr & us) != 0), "port choice");
        end
      end
    end
    if (cyc == NVEC) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    cyc <= cyc + 1;
    for (int c = 0; c < 5; c++) begin
      pkt_t p;
      p = {$urandom, $urandom, $urandom, $urandom};
      p.v = 1'b1;
      p.da_x[4:0] = 5'($urandom_range(3));
      p.da_y[4:0] = 5'($urandom_range(3));
      if (cyc % 2 == 0 && (p.da_x[4:0] == 0 && p.da_y[4:0] == 0)) p.da_x[4:0] = 5'd2;
      cand_pkt[c]   <= p;
      cand_valid[c] <= (cyc % 2 == 0) ? (c == 0) : ($urandom_range(3) != 0);
      conn_ok[c]    <= (cyc % 2 == 0) ? 4'($urandom | $urandom) : 4'hF;
    end
    out_en <= ($urandom_range(3) == 0) ? 4'hF : 4'($urandom | $urandom);
    for (int j = 0; j < 4; j++) stress[j] <= STRESS_W'($urandom_range(20));
  end
endmodule
