// Self-checking test of the fabric pipeline: with 3 stages, a random lane and
// valid stream must appear at the output exactly 3 clk edges later; valid
// flags clear on reset.
module tb_fabric_pipe;
  import hoplite_pkg::*;
  localparam int unsigned STAGES = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  lane_t in_data, out_data;
  logic in_valid, out_valid;
  fabric_pipe #(.STAGES(STAGES)) dut (.*);
  int unsigned checks = 0, failures = 0;
  lane_t hist_d [STAGES]; logic hist_v [STAGES];
  initial begin
    in_data = 0; in_valid = 1;
    repeat (4) @(posedge clk);
    @(negedge clk);
    checks++; if (out_valid !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    for (int k = 0; k < 2000; k++) begin
      in_data = {16'($urandom), 32'($urandom)}; in_valid = 1'($urandom);
      for (int s = STAGES - 1; s > 0; s--) begin hist_d[s] = hist_d[s-1]; hist_v[s] = hist_v[s-1]; end
      hist_d[0] = in_data; hist_v[0] = in_valid;
      @(posedge clk); @(negedge clk);
      if (k >= STAGES - 1) begin
        checks++;
        if (out_data !== hist_d[STAGES-1] || out_valid !== hist_v[STAGES-1]) begin
          failures++; if (failures < 10) $display("FAIL k=%0d", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
