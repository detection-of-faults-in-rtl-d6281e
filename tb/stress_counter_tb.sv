// stress_counter_tb: random per-cycle packet counts 0..5; the stress output must equal the
// sum of the counts of the last four cycles, kept here in a separate history.
module stress_counter_tb;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;
  logic [2:0] processed = '0;
  logic [STRESS_W-1:0] stress;
  int hist [4] = '{0, 0, 0, 0};

  stress_counter #(.WIN(4)) dut (.clk, .rst_n, .processed, .stress);

  initial begin
    repeat (1200) @(posedge clk);
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
      checks++;
      if (int'(stress) != hist[0] + hist[1] + hist[2] + hist[3]) begin
        failures++;
        if (failures < 10) $display("FAIL @%0d: stress %0d", cyc, stress);
      end
      hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = int'(processed);
      processed <= (cyc > 900) ? 3'd5 : 3'($urandom_range(5));
    end
    if (cyc == 1000) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
