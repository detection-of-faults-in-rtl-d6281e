// secded_dec: extended Hamming (SECDED) decoder matching secded_enc.
//
// Computes the 5-bit Hamming syndrome (the position of a single flipped bit) and the overall
// parity. Overall parity odd: one error, which is corrected (syndrome 0 means the parity bit
// itself was hit). Overall parity even with a non-zero syndrome: two errors, reported on
// `ded` and left uncorrected. `syn` = {overall parity, syndrome} is also brought out, so that
// a retransmitted word can be compared with the one that failed.
// Check masks and the data position map are elaboration-time constants. Purely combinational.
module secded_dec #(
  parameter int unsigned K = 16
) (
  input  logic [K+5:0]  code,
  output logic [K-1:0]  data,
  output logic          sec,   // single error corrected
  output logic          ded,   // double error detected
  output logic [5:0]    syn
);
  localparam int unsigned N = K + 6;

  function automatic int unsigned data_pos(input int unsigned k);
    int unsigned n;
    n = 0;
    for (int unsigned i = 3; i < 64; i++) begin
      if ((i & (i - 1)) != 0) begin
        if (n == k) return i;
        n++;
      end
    end
    return 0;
  endfunction

  function automatic logic [N-1:0] cover_mask(input int unsigned b);
    logic [N-1:0] m;
    m = '0;
    for (int unsigned i = 1; i < N; i++) m[i] = ((i >> b) & 1) == 1;
    return m;
  endfunction

  logic [4:0]   s;
  logic         ov;
  logic [N-1:0] fixed;

  for (genvar b = 0; b < 5; b++) begin : g_syn
    assign s[b] = ^(code & cover_mask(b));
  end

  assign ov  = ^code;
  assign sec = ov;
  assign ded = !ov && (s != 5'd0);
  assign syn = {ov, s};

  // flip the bit the syndrome points at (only when the overall parity shows one error)
  for (genvar i = 0; i < N; i++) begin : g_fix
    assign fixed[i] = code[i] ^ (ov && (s == 5'(i)));
  end
  for (genvar k = 0; k < K; k++) begin : g_data
    assign data[k] = fixed[data_pos(k)];
  end
endmodule
