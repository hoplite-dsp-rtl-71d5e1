// Self-checking test of one multi-pumped router slice (position 2 on its
// cascade ring, column 1, 4 x 4 address space). The testbench generates the
// sub-cycle phase, and for each router cycle it offers a random West packet
// on PCIN (East sub-cycle), a random North packet on A:B and a random PE
// packet, keeping its own copy of the PE packet held in C. After the E edge it
// checks the East lane (P/PCOUT and e_valid); after the S edge it checks the
// South/PE lane (P, s_valid, pe_out_valid, pe_out_data) and that pe_in_ready
// was offered exactly when C was free. Expected routes come from a
// case-by-case model of Hoplite's rules written in the testbench, and each
// output must appear on the edge the two-sub-cycle schedule gives it.
module tb_hoplite_dsp_router;
  import hoplite_pkg::*;

  localparam int unsigned XW = 2, YW = 2, MY_X = 2, MY_Y = 1;

  logic clk = 0, rst = 1, sub_s = 0;
  always #5 clk = ~clk;

  lane_t pcin, n_data, p, pcout;
  logic w_valid, n_valid, pe_in_valid, pe_in_ready, e_valid, s_valid, pe_out_valid;
  logic [PAYLOAD_W-1:0] pe_in_data, pe_out_data;
  router_ev_t ev;

  hoplite_dsp_router #(.XW(XW), .YW(YW), .MY_X(MY_X), .MY_Y(MY_Y)) dut (.*);

  int unsigned checks = 0, failures = 0;
  int unsigned n_defl = 0, n_turn = 0, n_ie = 0, n_is = 0, n_exit = 0, n_block = 0;

  // testbench copy of the PE register
  logic          m_cv;
  lane_t         m_c;

  function automatic lane_t rpkt();
    return {1'b0, 15'($urandom), 32'($urandom)};
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) sub_s <= rst ? 1'b0 : !sub_s;

  initial begin
    pcin = 0; n_data = 0; w_valid = 0; n_valid = 0; pe_in_valid = 0; pe_in_data = 0;
    m_cv = 0; m_c = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    // sub_s is 0 now: East sub-cycle
    for (int k = 0; k < 4000; k++) begin
      lane_t w, n, e_exp, s_exp;
      logic  wv, nv, turn, inj_e, inj_s, s_has, e_v;
      logic  pv, rdy;
      lane_t pd;
      // ---- East sub-cycle: present W and N ----
      check("phase", sub_s == 1'b0);
      wv = ($urandom_range(99) < 45);
      nv = ($urandom_range(99) < 45);
      w  = rpkt();
      n  = rpkt();
      if ($urandom_range(1)) w[XW-1:0] = XW'(MY_X);      // make turns frequent
      if ($urandom_range(1)) n[XW+YW-1:XW] = YW'(MY_Y);
      pcin = w; w_valid = wv; n_data = n; n_valid = nv;
      pe_in_valid = 0;
      // expected decision
      turn  = wv && (w[XW-1:0] == MY_X) && !nv;
      inj_e = m_cv && (m_c[XW-1:0] != MY_X) && !wv;
      inj_s = m_cv && (m_c[XW-1:0] == MY_X) && !nv && !turn;
      e_v   = (wv && !turn) || inj_e;
      e_exp = wv ? w : (inj_e ? m_c : 48'd0);
      s_has = nv || turn || inj_s;
      s_exp = nv ? n : (turn ? w : (inj_s ? m_c : 48'd0));
      n_defl += (wv && (w[XW-1:0] == MY_X) && nv);
      n_turn += turn; n_ie += inj_e; n_is += inj_s; n_block += (m_cv && !inj_e && !inj_s);
      @(posedge clk);                    // E edge
      @(negedge clk);
      check("East lane valid", e_valid == e_v);
      check("East lane data", pcout == e_exp && p == e_exp);
      check("no South output in East window", !s_valid && !pe_out_valid);
      // ---- South sub-cycle: PE may offer a packet ----
      pcin = rpkt(); n_data = rpkt(); w_valid = 0; n_valid = 0;  // not used in this sub-cycle
      rdy = !m_cv || inj_e || inj_s;
      check("pe_in_ready", pe_in_ready == rdy);
      pv = ($urandom_range(99) < 60);
      pd = rpkt();
      pe_in_valid = pv;
      pe_in_data  = pd[PAYLOAD_W-1:0];
      @(posedge clk);                    // S edge
      if (inj_e || inj_s) m_cv = 0;
      if (rdy && pv) begin m_cv = 1; m_c = pd; end
      @(negedge clk);
      check("South lane data", p == s_exp || !s_has);
      check("South valid", s_valid == (s_has && s_exp[XW+YW-1:XW] != MY_Y));
      check("PE exit", pe_out_valid == (s_has && s_exp[XW+YW-1:XW] == MY_Y));
      if (pe_out_valid) begin
        n_exit++;
        check("PE exit data", pe_out_data == s_exp[PAYLOAD_W-1:0]);
      end
      check("no East output in South window", !e_valid);
    end
    check("all cases seen", n_defl > 0 && n_turn > 0 && n_ie > 0 && n_is > 0 && n_exit > 0 && n_block > 0);
    $display("deflect=%0d turn=%0d inj_e=%0d inj_s=%0d exit=%0d block=%0d", n_defl, n_turn, n_ie, n_is, n_exit, n_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
