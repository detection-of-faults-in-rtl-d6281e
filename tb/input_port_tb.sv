// input_port_tb: one input port driven by a model of its upstream router.
// The upstream sends random packets, some with a single-bit error (must be corrected), some
// with a double error in one part (the port must raise arq in the next cycle; the upstream
// then resends the word). It obeys fault_to by sending nothing. The router side grants
// randomly, so packets wait in the hold buffer. Every packet must come out once, in order,
// intact. At the end the link gets a stuck double error: the port must declare it
// permanently faulty after one retransmission and drop that packet.
module input_port_tb;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  pkt_t exp_q [$];
  pkt_t last_pkt = '0;
  enc_t last_err = '0;
  bit   last_dbl = 0, stuck = 0, new_dbl = 0;
  int   cyc = 0, n_sec = 0, n_arq = 0, n_hold = 0, n_ft = 0, n_out = 0, n_drop = 0;
  enc_t stuck_err;
  logic arq, fault_to, perm, cand_valid, grant = 1'b0;
  pkt_t cand_pkt;
  logic ev_sec, ev_hold, ev_perm, ev_drop;
  pkt_t tx_pkt = '0;
  enc_t tx_enc;

  enc_t link_in;
  enc_t new_err = '0, rb = '0;
  logic [1:0] mode;   // what the upstream drives: 0 nothing, 1 new word, 2 resend

  input_port #(.HD(1)) dut (.*);
  pkt_encoder u_tx (.pkt(tx_pkt), .enc(tx_enc));

  // upstream output multiplexer: reacts to arq / fault_to / perm in the same cycle
  always_comb begin
    if (perm)          mode = 2'd0;
    else if (arq)      mode = 2'd2;
    else if (fault_to) mode = 2'd0;
    else               mode = 2'd1;
    case (mode)
      2'd1:    link_in = tx_enc ^ new_err;
      2'd2:    link_in = rb ^ (stuck ? stuck_err : '0);
      default: link_in = '0;
    endcase
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  initial begin
    stuck_err = '0;
    stuck_err[50] = 1'b1;
    stuck_err[51] = 1'b1;
    repeat (3200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc == 2) rst_n <= 1'b1;
    if (rst_n) begin
      // ---- outputs of this cycle
      if (!stuck) check(arq == last_dbl, "arq does not match a double error");
      if (cand_valid && grant) begin
        n_out++;
        check(exp_q.size() > 0 && cand_pkt == exp_q[0], "wrong packet offered");
        if (failures < 4 && exp_q.size() > 0 && cand_pkt != exp_q[0]) $display("got %h exp %h q=%0d", cand_pkt, exp_q[0], exp_q.size());
        if (exp_q.size() > 0) void'(exp_q.pop_front());
      end
      n_sec  += int'(ev_sec);
      n_arq  += int'(arq);
      n_hold += int'(ev_hold);
      n_ft   += int'(fault_to);
      n_drop += int'(ev_drop);
      // ---- what the upstream sent in this cycle, then its next new word
      if (mode == 2'd2) begin
        last_dbl = stuck;
        if (!stuck && last_pkt.v) exp_q.push_back(last_pkt);
      end else if (mode == 2'd1) begin
        pkt_t p;
        enc_t e;
        int r, k;
        rb = tx_enc;
        last_pkt = tx_pkt;
        last_dbl = new_dbl;
        if (!new_dbl && tx_pkt.v) exp_q.push_back(tx_pkt);
        p = {$urandom, $urandom, $urandom, $urandom};
        p.v = (cyc < 2000) && ($urandom_range(99) < 70);
        if (!p.v) p = '0;
        e = '0;
        r = $urandom_range(99);
        new_dbl = 0;
        if (cyc >= 2000) stuck = 1;
        if (stuck) begin
          e = stuck_err;
          new_dbl = 1;
        end else if (r < 8) begin
          e[$urandom_range(ENC_W - 1)] = 1'b1;
        end else if (r < 16) begin
          k = 46 + 22 * $urandom_range(4) + $urandom_range(20);
          e[k] = 1'b1;
          e[k + 1] = 1'b1;
          new_dbl = 1;
        end
        tx_pkt  <= p;
        new_err <= e;
      end
      grant <= (cyc > 2000) || ($urandom_range(99) < 60);
    end
    if (cyc == 2100) begin
      check(perm, "stuck double error not diagnosed as permanent");
      check(exp_q.size() == 0, "packets missing");
      check(n_sec > 0 && n_arq > 0 && n_hold > 0 && n_ft > 0, "a mechanism never happened");
      $display("out=%0d sec=%0d arq=%0d hold=%0d fault_to=%0d drop=%0d", n_out, n_sec, n_arq, n_hold, n_ft, n_drop);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
