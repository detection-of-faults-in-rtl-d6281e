// secded_enc: extended Hamming (SECDED) encoder for K data bits.
//
// The code word has K + 5 + 1 bits: positions 1..K+5 form a Hamming code with the five
// check bits at positions 1, 2, 4, 8 and 16 and the data bits, lowest first, at the other
// positions; bit 0 is the overall parity that lets the decoder tell one error from two.
// K = 17 gives the Hamming(23,17) code used for the packet head, K = 16 the Hamming(22,16)
// code used for the payload. The construction (check-bit positions, parity over the whole
// word) is this design's choice; the code sizes follow the design description.
// The position map and the check masks are constants worked out at elaboration, so the
// circuit is plain wiring and XOR trees. Purely combinational.
module secded_enc #(
  parameter int unsigned K = 16
) (
  input  logic [K-1:0]   data,
  output logic [K+5:0]   code
);
  localparam int unsigned N = K + 6;

  // code-word position of data bit k: the (k+1)-th index >= 3 that is not a power of two
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

  // positions covered by check bit b (its own position included)
  function automatic logic [N-1:0] cover_mask(input int unsigned b);
    logic [N-1:0] m;
    m = '0;
    for (int unsigned i = 1; i < N; i++) m[i] = ((i >> b) & 1) == 1;
    return m;
  endfunction

  logic [N-1:0] dw;     // data bits in place, check bits zero
  logic [N-1:0] hw;     // Hamming part complete, overall parity zero

  for (genvar k = 0; k < K; k++) begin : g_place
    assign dw[data_pos(k)] = data[k];
  end
  for (genvar b = 0; b < 5; b++) begin : g_chk
    assign dw[1 << b] = 1'b0;
    assign hw[1 << b] = ^(dw & cover_mask(b));
  end
  for (genvar k = 0; k < K; k++) begin : g_copy
    assign hw[data_pos(k)] = dw[data_pos(k)];
  end
  assign dw[0] = 1'b0;
  assign hw[0] = 1'b0;

  assign code = {hw[N-1:1], ^hw[N-1:1]};
endmodule
