// output_port_tb: the East output (DIR = 1) and a loopback South output. Random packets are
// sent through; the link word is decoded and compared with the expected packet worked out
// here with integer arithmetic: hop count + 1, destination and source x offsets - 1 (none
// on the loopback), checksum rebuilt from the head and data. A random arq must make the
// port drive its previous word again. A flipped data bit (crossbar fault) must be flagged.
module output_port_tb;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  pkt_t xb_pkt = '0;
  logic [CRC_W-1:0] xb_dpart = '0;
  logic arq_in = 1'b0, flip = 1'b0;
  enc_t link_e, link_s, prev_e = '0;
  logic err_e, err_s, retx_e, retx_s;
  pkt_t dec_e, dec_s;
  logic s_e, d_e, s_s, d_s;
  logic [NPARTS*SYN_W-1:0] y_e, y_s;
  pkt_t in_e;

  always_comb begin
    in_e = xb_pkt;
    in_e.data[0] = xb_pkt.data[0] ^ flip;
  end

  output_port #(.DIR(1)) dut (.clk, .rst_n, .edge_loop(1'b0), .xb_pkt(in_e), .xb_dpart,
    .arq_in, .link_out(link_e), .crc_err(err_e), .retx(retx_e));
  output_port #(.DIR(2)) dut_s (.clk, .rst_n, .edge_loop(1'b1), .xb_pkt(xb_pkt), .xb_dpart,
    .arq_in(1'b0), .link_out(link_s), .crc_err(err_s), .retx(retx_s));
  pkt_decoder u_de (.enc(link_e), .pkt(dec_e), .sec(s_e), .ded(d_e), .syn(y_e));
  pkt_decoder u_ds (.enc(link_s), .pkt(dec_s), .sec(s_s), .ded(d_s), .syn(y_s));

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
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2200) @(posedge clk);
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
      if (arq_in) begin
        check(link_e == prev_e && retx_e, "retransmission is not the previous word");
      end else if (xb_pkt.v) begin
        pkt_t e;
        e = xb_pkt;
        e.hc = xb_pkt.hc + 9'd1;
        e.da_x = to_sm(from_sm(xb_pkt.da_x) - 1);
        e.sa_x = to_sm(from_sm(xb_pkt.sa_x) - 1);
        e.crc = ref_crc(e);
        if (!flip) check(dec_e == e && !err_e && !d_e && !s_e, "east output packet wrong");
        else check(err_e, "crossbar alteration not flagged");
        e = xb_pkt;
        e.hc = xb_pkt.hc + 9'd1;
        e.crc = ref_crc(e);
        check(dec_s == e && !err_s, "loopback output packet wrong");
      end else begin
        check(link_e == '0, "idle output not zero");
      end
      prev_e <= link_e;
      begin
        pkt_t p;
        logic a;
        p = {$urandom, $urandom, $urandom, $urandom};
        p.v = $urandom_range(3) != 0;
        p.hc = 9'($urandom_range(500));
        p.da_x = to_sm($urandom_range(20) - 10);
        p.da_y = to_sm($urandom_range(20) - 10);
        p.sa_x = to_sm($urandom_range(20) - 10);
        p.sa_y = to_sm($urandom_range(20) - 10);
        a = ($urandom_range(5) == 0);
        arq_in <= a;
        flip   <= ($urandom_range(7) == 0);
        if ($urandom_range(5) == 0 || a) p.v = 1'b0;
        if (!p.v) p = '0;
        xb_pkt   <= p;
        xb_dpart <= ref_crc({8'd0, p.data, 34'd0});
      end
    end
    if (cyc == 2000) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
