// xbar_diag_tb: crossbar connection diagnosis. A reference table of consecutive error
// counts is kept here: an output CRC error on a packet whose input check was clean counts
// against the connection, a clean transfer resets it, an input error leaves it alone, and
// THRESH consecutive errors mark the connection faulty for good. Errors are made rare on
// most connections and frequent on a few so that both cases occur.
module xbar_diag_tb;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;
  localparam int THRESH = 2;

  logic [NDIR-1:0] out_valid = '0, out_err = '0;
  logic [2:0]      out_src [NDIR];
  logic [4:0]      in_err = '0;
  logic [NDIR-1:0] conn_ok [5];
  logic            new_perm;
  int cnt [5][4];
  bit bad [5][4];
  int n_perm = 0;

  xbar_diag #(.THRESH(THRESH)) dut (.*);

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
    if (cyc == 2) begin
      rst_n <= 1'b1;
      for (int i = 0; i < 5; i++) for (int j = 0; j < 4; j++) begin cnt[i][j] = 0; bad[i][j] = 0; end
    end
    if (rst_n) begin
      // state check
      for (int i = 0; i < 5; i++) for (int j = 0; j < 4; j++) begin
        checks++;
        if (conn_ok[i][j] == bad[i][j]) begin
          failures++;
          if (failures < 10) $display("FAIL @%0d: connection %0d->%0d", cyc, i, j);
        end
      end
      // reference update for the inputs applied in this cycle
      for (int j = 0; j < 4; j++) begin
        int s;
        s = int'(out_src[j]);
        if (out_valid[j] && !in_err[s]) begin
          if (out_err[j]) begin
            cnt[s][j]++;
            if (cnt[s][j] >= THRESH) begin
              if (!bad[s][j]) n_perm++;
              bad[s][j] = 1;
            end
          end else cnt[s][j] = 0;
        end
      end
      // new inputs: each output gets a distinct input
      for (int j = 0; j < 4; j++) begin
        int s;
        s = (j + cyc) % 5;
        out_src[j]   <= 3'(s);
        out_valid[j] <= $urandom_range(3) != 0;
        out_err[j]   <= (s == 2 && j == 1) ? ($urandom_range(1) == 0) : ($urandom_range(30) == 0);
      end
      in_err <= ($urandom_range(5) == 0) ? 5'($urandom) : 5'd0;
    end
    if (cyc == 2000) begin
      checks++;
      if (n_perm == 0) begin failures++; $display("FAIL: no connection was ever diagnosed"); end
      $display("connections diagnosed: %0d", n_perm);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
