// xbar_diag: fault status of the crossbar connections of one router.
//
// Every packet crossing the router is checked twice: by the CRC unit at its input and by the
// CRC unit at the mesh output it leaves through. A clean input check followed by an output
// mismatch blames the connection input -> output. Such an event is counted per connection;
// THRESH consecutive events mark the connection permanently faulty (sticky), and a clean
// transfer clears the count, so isolated events are treated as transient. The allocator
// then avoids that connection while the rest of the switch stays in use. Connections to the
// local output carry no CRC check. Rows 0..3 are the mesh inputs, row 4 the local input.
// The threshold rule is this design's choice; the document only says that permanent and
// transient faults are told apart. Outputs are registered.
module xbar_diag
  import noc_pkg::*;
#(
  parameter int unsigned THRESH = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NDIR-1:0] out_valid,          // a packet left through mesh output j
  input  logic [2:0]      out_src  [NDIR],    // from which input
  input  logic [NDIR-1:0] out_err,            // output CRC mismatch at j
  input  logic [4:0]      in_err,             // input CRC mismatch per input
  output logic [NDIR-1:0] conn_ok  [5],
  output logic            new_perm            // a connection was newly marked faulty
);
  localparam int unsigned CW = $clog2(THRESH + 1);
  logic [CW-1:0]   cnt_q   [5][NDIR];
  logic [NDIR-1:0] bad_q   [5];

  always_comb begin
    new_perm = 1'b0;
    for (int j = 0; j < NDIR; j++) begin
      if (out_valid[j] && out_err[j] && !in_err[out_src[j]] &&
          !bad_q[out_src[j]][j] && (32'(cnt_q[out_src[j]][j]) + 1 >= THRESH))
        new_perm = 1'b1;
    end
    for (int i = 0; i < 5; i++) conn_ok[i] = ~bad_q[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) begin
        bad_q[i] <= '0;
        for (int j = 0; j < NDIR; j++) cnt_q[i][j] <= '0;
      end
    end else begin
      for (int j = 0; j < NDIR; j++) begin
        if (out_valid[j] && !in_err[out_src[j]]) begin
          if (out_err[j]) begin
            if (32'(cnt_q[out_src[j]][j]) + 1 >= THRESH) bad_q[out_src[j]][j] <= 1'b1;
            else cnt_q[out_src[j]][j] <= cnt_q[out_src[j]][j] + 1'b1;
          end else begin
            cnt_q[out_src[j]][j] <= '0;
          end
        end
      end
    end
  end
endmodule
