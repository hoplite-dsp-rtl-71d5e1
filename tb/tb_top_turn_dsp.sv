// Self-checking test of the top-turn slice: a random cascade lane and valid flag
// stream must come out on the fabric output P exactly one clk edge later, and the
// valid flag must clear on reset.
module tb_top_turn_dsp;
  import hoplite_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  lane_t pcin, p;
  logic valid_in, valid_out;
  top_turn_dsp dut (.*);
  int unsigned checks = 0, failures = 0;
  lane_t prev_d; logic prev_v;
  initial begin
    pcin = 0; valid_in = 1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++; if (valid_out !== 1'b0 || p !== 48'd0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    for (int k = 0; k < 2000; k++) begin
      pcin = {16'($urandom), 32'($urandom)}; valid_in = 1'($urandom);
      prev_d = pcin; prev_v = valid_in;
      @(posedge clk); @(negedge clk);
      checks++;
      if (p !== prev_d || valid_out !== prev_v) begin
        failures++; if (failures < 10) $display("FAIL k=%0d %h/%b expected %h/%b", k, p, valid_out, prev_d, prev_v);
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
