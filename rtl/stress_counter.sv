// stress_counter: the stress value of a router, i.e. the number of packets it processed in
// the last WIN cycles (WIN = 4 in the design description). Neighbours use it to pick the
// least loaded port when a packet has to be deflected.
// A WIN-deep shift register of per-cycle counts and a running sum; the output is registered
// and covers the WIN cycles before the current one. Counting injected and ejected packets as
// "processed" is this design's reading.
module stress_counter
  import noc_pkg::*;
#(
  parameter int unsigned WIN = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [2:0]          processed,  // packets handled this cycle (0..5)
  output logic [STRESS_W-1:0] stress
);
  logic [2:0]          hist_q [WIN];
  logic [STRESS_W-1:0] sum_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < WIN; i++) hist_q[i] <= '0;
      sum_q <= '0;
    end else begin
      hist_q[0] <= processed;
      for (int i = 1; i < WIN; i++) hist_q[i] <= hist_q[i-1];
      sum_q <= sum_q + STRESS_W'(processed) - STRESS_W'(hist_q[WIN-1]);
    end
  end

  assign stress = sum_q;
endmodule
