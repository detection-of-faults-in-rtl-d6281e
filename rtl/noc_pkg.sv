// noc_pkg: types and helper functions shared by the fault-tolerant deflection NoC.
//
// Packet (114 bits, unencoded): a 34-bit head { DA, SA, HC, V } and an 80-bit payload whose
// top eight bits hold a CRC checksum (generator x^8+1), leaving 72 data bits. Addresses are
// relative and sign-magnitude: six bits per axis, bit 5 the sign, bits 4:0 the magnitude.
// The field widths and the CRC polynomial follow the design description; the bit order of
// the fields inside the packet is this design's own choice.
// On the links a packet travels SECDED-encoded in 156 bits: the head as two Hamming(23,17)
// words, the payload as five Hamming(22,16) words.
package noc_pkg;

  localparam int unsigned PKT_W   = 114;  // unencoded packet
  localparam int unsigned HEAD_W  = 34;   // V + HC + SA + DA
  localparam int unsigned PAY_W   = 80;   // CRC + data
  localparam int unsigned DATA_W  = 72;   // payload data bits left beside the CRC
  localparam int unsigned CRC_W   = 8;
  localparam int unsigned HC_W    = 9;
  localparam int unsigned AXIS_W  = 6;    // sign + 5-bit magnitude
  localparam int unsigned ENC_W   = 156;  // encoded packet on a link
  localparam int unsigned SYN_W   = 6;    // syndrome bits per SECDED part (5 + overall)
  localparam int unsigned NPARTS  = 7;    // 2 head parts + 5 payload parts
  localparam int unsigned STRESS_W = 5;   // up to 5 packets x 4 cycles = 20

  // Port numbering: the four mesh directions, then the local port.
  localparam int unsigned P_N = 0;
  localparam int unsigned P_E = 1;
  localparam int unsigned P_S = 2;
  localparam int unsigned P_W = 3;
  localparam int unsigned P_L = 4;
  localparam int unsigned NDIR = 4;

  typedef logic [AXIS_W-1:0] sm_t;  // sign-magnitude coordinate offset

  typedef struct packed {
    logic [CRC_W-1:0]  crc;
    logic [DATA_W-1:0] data;
    sm_t               da_y;   // remaining offset to the destination
    sm_t               da_x;
    sm_t               sa_y;   // offset from the current node back to the source
    sm_t               sa_x;
    logic [HC_W-1:0]   hc;     // hop count, also the routing priority
    logic              v;      // valid packet
  } pkt_t;

  typedef logic [ENC_W-1:0] enc_t;

  // Per-router event pulses, used for observation and statistics.
  typedef struct packed {
    logic [3:0] sec;        // single error corrected on input d
    logic [3:0] arq;        // retransmission requested on input d
    logic [3:0] retx;       // retransmission sent on output d
    logic [3:0] hold;       // packet kept in the hold buffer of input d
    logic [3:0] fault_to;   // fault_to asserted towards the upstream of input d
    logic [3:0] perm_link;  // input link d newly diagnosed permanently faulty
    logic [3:0] drop;       // packet dropped on input d (permanent link fault)
    logic [3:0] crc_in_err; // CRC mismatch after decoding on input d
    logic [3:0] xbar_err;   // CRC mismatch at crossbar output d
    logic       xbar_perm;  // a crossbar connection newly diagnosed permanently faulty
    logic [2:0] deflect;    // packets sent to a non-productive port this cycle
    logic       eject;
    logic       inject;
    logic       loopback;   // a packet sent into a boundary loopback
  } ev_t;

  // CRC with g(x) = x^8 + 1 over a 106-bit message: checksum bit j is the XOR of all message
  // bits whose index is j modulo 8. Being linear, it can be split into head and data parts.
  function automatic logic [CRC_W-1:0] crc_fold(input logic [HEAD_W+DATA_W-1:0] m);
    logic [HEAD_W+DATA_W-1:0] mask;
    logic [CRC_W-1:0]         c;
    for (int j = 0; j < CRC_W; j++) begin
      for (int i = 0; i < HEAD_W + DATA_W; i++) mask[i] = (i % CRC_W) == j;
      c[j] = ^(m & mask);
    end
    return c;
  endfunction

  function automatic logic [CRC_W-1:0] crc_head(input pkt_t p);
    return crc_fold({{DATA_W{1'b0}}, p[HEAD_W-1:0]});
  endfunction

  function automatic logic [CRC_W-1:0] crc_data(input pkt_t p);
    return crc_fold({p.data, {HEAD_W{1'b0}}});
  endfunction

  // Add +1 (dec=0) or -1 (dec=1) to a sign-magnitude value; the magnitude saturates at 31.
  function automatic sm_t sm_step(input sm_t a, input logic dec);
    logic       s;
    logic [4:0] m;
    s = a[5];
    m = a[4:0];
    if (m == 5'd0)            return {dec, 5'd1};
    else if (s == dec)        return (m == 5'd31) ? a : {s, m + 5'd1};  // grows away from 0
    else if (m == 5'd1)       return 6'd0;
    else                      return {s, m - 5'd1};
  endfunction

  function automatic logic sm_pos(input sm_t a);  // strictly positive
    return !a[5] && (a[4:0] != 5'd0);
  endfunction

  function automatic logic sm_neg(input sm_t a);  // strictly negative
    return a[5] && (a[4:0] != 5'd0);
  endfunction

  function automatic logic sm_zero(input sm_t a);
    return a[4:0] == 5'd0;
  endfunction

endpackage
