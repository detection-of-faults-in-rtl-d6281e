// secded_tb: self-checking test of secded_enc / secded_dec for both code sizes used in the
// packet code, Hamming(23,17) and Hamming(22,16). The reference is independent of the RTL:
// a valid code word must have even overall parity and a zero syndrome computed here bit by
// bit; with one flipped bit the decoder must return the data and report sec; with two
// flipped bits it must report ded. Each cycle a new random word is applied to three decoders
// per size (clean, one error, two errors) and checked at the next clock edge.
module secded_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = !clk;

  localparam int NVEC = 2000;

  logic [16:0] d17;  logic [22:0] c17;  logic [22:0] e17 [3];
  logic [15:0] d16;  logic [21:0] c16;  logic [21:0] e16 [3];
  logic [16:0] q17 [3]; logic s17 [3], x17 [3]; logic [5:0] y17 [3];
  logic [15:0] q16 [3]; logic s16 [3], x16 [3]; logic [5:0] y16 [3];
  logic [22:0] m17 [3];
  logic [21:0] m16 [3];

  secded_enc #(.K(17)) u_e17 (.data(d17), .code(c17));
  secded_enc #(.K(16)) u_e16 (.data(d16), .code(c16));
  for (genvar k = 0; k < 3; k++) begin : g_dec
    assign e17[k] = c17 ^ m17[k];
    assign e16[k] = c16 ^ m16[k];
    secded_dec #(.K(17)) u_d17 (.code(e17[k]), .data(q17[k]), .sec(s17[k]), .ded(x17[k]), .syn(y17[k]));
    secded_dec #(.K(16)) u_d16 (.code(e16[k]), .data(q16[k]), .sec(s16[k]), .ded(x16[k]), .syn(y16[k]));
  end

  function automatic logic [4:0] ref_syn(input logic [22:0] c);
    logic [4:0] s;
    s = '0;
    for (int i = 1; i < 23; i++) if (c[i]) s ^= 5'(i);
    return s;
  endfunction

  function automatic logic [22:0] two_bits(input int n);
    int a, b;
    a = $urandom_range(n - 1);
    b = (a + 1 + $urandom_range(n - 2)) % n;
    return (23'd1 << a) | (23'd1 << b);
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (d17=%h d16=%h)", what, d17, d16);
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
      check(^c17 == 1'b0 && ref_syn(c17) == 0, "k17 code word invalid");
      check(^c16 == 1'b0 && ref_syn({1'b0, c16}) == 0, "k16 code word invalid");
      check(q17[0] == d17 && !s17[0] && !x17[0], "k17 clean decode");
      check(q16[0] == d16 && !s16[0] && !x16[0], "k16 clean decode");
      check(q17[1] == d17 && s17[1] && !x17[1], "k17 single error corrected");
      check(q16[1] == d16 && s16[1] && !x16[1], "k16 single error corrected");
      check(x17[2] && !s17[2], "k17 double error detected");
      check(x16[2] && !s16[2], "k16 double error detected");
    end
    if (cyc == NVEC) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    cyc <= cyc + 1;
    d17 <= (cyc == 0) ? '0 : (cyc == 1) ? '1 : 17'($urandom);
    d16 <= (cyc == 0) ? '0 : (cyc == 1) ? '1 : 16'($urandom);
    m17[0] <= '0;
    m16[0] <= '0;
    m17[1] <= 23'd1 << $urandom_range(22);
    m16[1] <= 22'd1 << $urandom_range(21);
    m17[2] <= two_bits(23);
    m16[2] <= 22'(two_bits(22));
  end
endmodule
