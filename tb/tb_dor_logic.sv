// Self-checking test of the routing decision. All combinations of valid flags
// and of "address matches / does not match" are covered many times by random
// addresses in a small (4 x 4) address space; for each, the outputs are
// compared with a table of expected routes written case by case in the
// testbench.
module tb_dor_logic;
  import hoplite_pkg::*;

  localparam int unsigned XW = 2, YW = 2, MY_X = 2, MY_Y = 1;

  logic w_valid, n_valid, c_valid;
  logic [XW-1:0] w_dx, c_dx;
  logic [YW-1:0] w_dy, n_dy, c_dy;
  opmode_t e_opmode, s_opmode;
  logic e_valid, s_has, s_exit, c_taken;
  router_ev_t ev;

  dor_logic #(.XW(XW), .YW(YW), .MY_X(MY_X), .MY_Y(MY_Y)) dut (.*);

  int unsigned checks = 0, failures = 0;
  int unsigned seen_deflect = 0, seen_turn = 0, seen_inj_e = 0, seen_inj_s = 0, seen_block = 0;

  initial begin
    for (int k = 0; k < 20000; k++) begin
      opmode_t x_e_op, x_s_op;
      logic x_e_valid, x_s_has, x_s_exit, x_taken, x_deflect, x_turn, x_ie, x_is;
      logic [YW-1:0] dy;
      {w_valid, n_valid, c_valid} = 3'($urandom);
      w_dx = XW'($urandom); w_dy = YW'($urandom);
      n_dy = YW'($urandom);
      c_dx = XW'($urandom); c_dy = YW'($urandom);
      #1;
      // expected, case by case
      x_deflect = 0; x_turn = 0; x_ie = 0; x_is = 0;
      x_e_op = OPM_ZERO; x_e_valid = 0; x_s_op = OPM_ZERO; x_s_has = 0; dy = 0;
      if (w_valid) begin
        x_e_op = OPM_PCIN;
        if (w_dx == MY_X && !n_valid) begin
          x_turn = 1;                         // parked, South in second sub-cycle
          x_s_op = OPM_P; x_s_has = 1; dy = w_dy;
        end else begin
          x_e_valid = 1;                      // passes or is deflected
          x_deflect = (w_dx == MY_X);
        end
      end
      if (n_valid) begin
        x_s_op = OPM_AB; x_s_has = 1; dy = n_dy;
      end
      if (c_valid) begin
        if (c_dx != MY_X) begin
          if (!w_valid) begin x_ie = 1; x_e_op = OPM_C; x_e_valid = 1; end
        end else begin
          if (!n_valid && !x_turn) begin x_is = 1; x_s_op = OPM_C; x_s_has = 1; dy = c_dy; end
        end
      end
      x_taken  = x_ie || x_is;
      x_s_exit = x_s_has && (dy == MY_Y);
      seen_deflect += x_deflect; seen_turn += x_turn; seen_inj_e += x_ie; seen_inj_s += x_is;
      seen_block += (c_valid && !x_taken);
      checks++;
      if (e_opmode !== x_e_op || e_valid !== x_e_valid || s_opmode !== x_s_op ||
          s_has !== x_s_has || s_exit !== x_s_exit || c_taken !== x_taken ||
          ev.deflect !== x_deflect || ev.w_turn !== x_turn || ev.inj_e !== x_ie ||
          ev.inj_s !== x_is || ev.inj_block !== (c_valid && !x_taken) ||
          ev.exit_pe !== x_s_exit || ev.n_south !== n_valid ||
          ev.w_east !== (w_valid && !x_turn)) begin
        failures++;
        if (failures < 10)
          $display("FAIL w=%b/%0d/%0d n=%b/%0d c=%b/%0d/%0d: e_op=%b(%b) s_op=%b(%b) ev=%b",
                   w_valid, w_dx, w_dy, n_valid, n_dy, c_valid, c_dx, c_dy,
                   e_opmode, x_e_op, s_opmode, x_s_op, ev);
      end
    end
    checks++;
    if (seen_deflect == 0 || seen_turn == 0 || seen_inj_e == 0 || seen_inj_s == 0 || seen_block == 0) begin
      failures++;
      $display("FAIL: a routing case was never generated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
