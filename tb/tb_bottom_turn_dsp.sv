// Self-checking test of the bottom-turn slice: a random lane on A:B and its
// valid flag must come out on the cascade (PCOUT) exactly two clk edges later
// (A/B register, then P), and the valid flags must clear on reset.
module tb_bottom_turn_dsp;
  import hoplite_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  lane_t ab, pcout;
  logic valid_in, valid_out;
  bottom_turn_dsp dut (.*);
  int unsigned checks = 0, failures = 0;
  lane_t hist_d [2]; logic hist_v [2];
  initial begin
    ab = 0; valid_in = 1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++; if (valid_out !== 1'b0 || pcout !== 48'd0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    for (int k = 0; k < 2000; k++) begin
      ab = {16'($urandom), 32'($urandom)}; valid_in = 1'($urandom);
      hist_d[1] = hist_d[0]; hist_v[1] = hist_v[0];
      hist_d[0] = ab;        hist_v[0] = valid_in;
      @(posedge clk); @(negedge clk);
      if (k >= 1) begin
        checks++;
        if (pcout !== hist_d[1] || valid_out !== hist_v[1]) begin
          failures++; if (failures < 10) $display("FAIL k=%0d %h/%b expected %h/%b", k, pcout, valid_out, hist_d[1], hist_v[1]);
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
