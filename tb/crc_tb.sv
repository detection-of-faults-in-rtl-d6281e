// crc_tb: crc_in_unit and crc_out_unit. The reference checksum is computed here as the XOR,
// bit position modulo 8, of the head and the 72 data bits (generator x^8 + 1).
// Checked: a packet with a correct checksum passes; any single flipped bit and any burst of
// up to 8 flipped bits is detected; after a head change crc_out_unit produces the reference
// checksum of the new packet; a data bit altered between the two units is detected at the
// output.
module crc_tb;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = !clk;
  localparam int NVEC = 3000;

  pkt_t good, bad, newh, alt;
  logic [CRC_W-1:0] hp, dp, hp_b, dp_b, hp_a, dp_a;
  logic e_good, e_bad, e_alt, e_out_ok, e_out_alt;
  pkt_t o_ok, o_alt;

  crc_in_unit u_g (.pkt(good), .head_part(hp),   .data_part(dp),   .err(e_good));
  crc_in_unit u_b (.pkt(bad),  .head_part(hp_b), .data_part(dp_b), .err(e_bad));
  crc_out_unit u_o1 (.pkt_in(newh), .data_part(dp), .pkt_out(o_ok),  .err(e_out_ok));
  crc_out_unit u_o2 (.pkt_in(alt),  .data_part(dp), .pkt_out(o_alt), .err(e_out_alt));

  function automatic logic [7:0] ref_crc(input pkt_t p);
    logic [105:0] m;
    logic [7:0] c;
    m = {p.data, p[33:0]};
    c = '0;
    for (int i = 0; i < 106; i++) if (m[i]) c[i % 8] = !c[i % 8];
    return c;
  endfunction

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
      check(!e_good, "good packet flagged");
      check(e_bad, "corrupted packet not flagged");
      check(o_ok.crc == ref_crc(newh) && !e_out_ok, "regenerated checksum wrong");
      check(e_out_alt, "crossbar alteration not detected");
    end
    if (cyc == NVEC) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    cyc <= cyc + 1;
    begin
      pkt_t p, b, h, a;
      logic [105:0] err;
      int start, len;
      p = {$urandom, $urandom, $urandom, $urandom};
      p.v = 1'b1;
      p.crc = ref_crc(p);
      // burst of 1..8 bits over head and data (never the checksum itself)
      len = 1 + $urandom_range(7);
      start = 1 + $urandom_range(105 - len);
      err = '0;
      for (int i = 0; i < len; i++) if (i == 0 || i == len - 1 || $urandom_range(1)) err[start + i] = 1'b1;
      b = p;
      {b.data, b[33:0]} = {p.data, p[33:0]} ^ err;
      b.v = 1'b1;
      h = p;
      h.hc = p.hc + 9'd1;
      h.da_x = 6'($urandom);
      h.sa_y = 6'($urandom);
      a = h;
      len = $urandom_range(71);
      a.data[len] = !a.data[len];
      good <= p;
      bad  <= b;
      newh <= h;
      alt  <= a;
    end
  end
endmodule
