// Runs random traffic through the other network shapes the design is built
// for, side by side: the 2 x 2 and 8 x 8 networks, and a 4 x 4 network in
// which routers are chained directly on the cascade with no pass-through
// slices (PASS_PER_HOP = 0, three registers on the column return), so that
// neighbouring routers run in opposite sub-cycle phases. Each instance has its
// own traffic source and scoreboard (noc_traffic_check).
module tb_noc_configs;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        done_a, done_b, done_c;
  int unsigned chk_a, chk_b, chk_c, fail_a, fail_b, fail_c;

  noc_traffic_check #(.NX(2), .NY(2), .CYCLES(2000), .INJ_PERMILLE(300)) u_2x2 (
    .clk, .rst, .done(done_a), .checks(chk_a), .failures(fail_a));
  noc_traffic_check #(.NX(8), .NY(8), .CYCLES(2000), .INJ_PERMILLE(200)) u_8x8 (
    .clk, .rst, .done(done_b), .checks(chk_b), .failures(fail_b));
  noc_traffic_check #(.NX(4), .NY(4), .PASS_PER_HOP(0), .COL_RET_REGS(3),
                      .CYCLES(2000), .INJ_PERMILLE(200)) u_4x4_direct (
    .clk, .rst, .done(done_c), .checks(chk_c), .failures(fail_c));

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (done_a && done_b && done_c);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_b + chk_c, fail_a + fail_b + fail_c);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_b + chk_c, fail_a + fail_b + fail_c + 1);
    $finish;
  end
endmodule
