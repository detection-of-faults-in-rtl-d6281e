// pkt_codec_tb: pkt_encoder followed by pkt_decoder. Random packets are encoded and decoded
// clean, with one flipped bit in every one of the seven parts (all must be corrected), and
// with two flipped bits in one random part (must be flagged as a double error). An idle
// word (all zeros) must encode to zeros. Bit ranges of the parts are this test's own list.
module pkt_codec_tb;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = !clk;
  localparam int NVEC = 2000;
  localparam int LO [7] = '{0, 23, 46, 68, 90, 112, 134};
  localparam int WD [7] = '{23, 23, 22, 22, 22, 22, 22};

  pkt_t pkt;
  enc_t enc, m1, m2;
  pkt_t q0, q1, q2;
  logic s0, s1, s2, x0, x1, x2;
  logic [NPARTS*SYN_W-1:0] y0, y1, y2;

  pkt_encoder u_enc (.pkt(pkt), .enc(enc));
  pkt_decoder u_d0 (.enc(enc),      .pkt(q0), .sec(s0), .ded(x0), .syn(y0));
  pkt_decoder u_d1 (.enc(enc ^ m1), .pkt(q1), .sec(s1), .ded(x1), .syn(y1));
  pkt_decoder u_d2 (.enc(enc ^ m2), .pkt(q2), .sec(s2), .ded(x2), .syn(y2));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

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
      if (pkt == '0) check(enc == '0, "idle word not all zeros");
      check(q0 == pkt && !s0 && !x0 && y0 == '0, "clean decode");
      check(q1 == pkt && s1 && !x1, "one error per part corrected");
      check(x2, "double error flagged");
    end
    if (cyc == NVEC) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    cyc <= cyc + 1;
    begin
      pkt_t p;
      enc_t a, b;
      int part, i, j;
      p = {$urandom, $urandom, $urandom, $urandom};
      if (cyc == 0) p = '0;
      a = '0;
      for (int k = 0; k < 7; k++) a[LO[k] + $urandom_range(WD[k] - 1)] = 1'b1;
      part = $urandom_range(6);
      i = $urandom_range(WD[part] - 1);
      j = (i + 1 + $urandom_range(WD[part] - 2)) % WD[part];
      b = '0;
      b[LO[part] + i] = 1'b1;
      b[LO[part] + j] = 1'b1;
      pkt <= p;
      m1  <= a;
      m2  <= b;
    end
  end
endmodule
