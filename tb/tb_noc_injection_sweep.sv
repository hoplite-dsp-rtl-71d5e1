// Injection-rate sweep on the default 16 x 16 network, the traffic
// experiment the design is evaluated with: every PE offers uniformly random
// destinations, a new packet with probability R per router cycle whenever it
// is not already holding one, for R = 0.01, 0.02, 0.05, 0.07, 0.1, 0.2, 0.5
// and 1.0. For each rate the network is reset, run for a fixed window and
// drained. Checked: every packet is delivered exactly once, intact and at the
// router its address names; at the lowest rate the delivered rate matches the
// offered rate; the delivered rate never falls by more than 10% as R rises
// (deflection routing saturates instead of collapsing). The delivered rate
// per PE per router cycle is printed for each R.
module tb_noc_injection_sweep;
  import hoplite_pkg::*;

  localparam int unsigned NX = 16, NY = 16, XW = 4, YW = 4;
  localparam int unsigned WINDOW = 2000;           // clk cycles per rate
  localparam int unsigned MAXP = 1 << 17;
  localparam int unsigned NRATES = 8;
  localparam int unsigned RATE_PERMILLE [NRATES] = '{10, 20, 50, 70, 100, 200, 500, 1000};

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       [NY-1:0][NX-1:0]                pe_in_valid, pe_in_ready, pe_out_valid;
  logic       [NY-1:0][NX-1:0][PAYLOAD_W-1:0] pe_in_data, pe_out_data;
  router_ev_t [NY-1:0][NX-1:0]                ev;

  hoplite_dsp_noc dut (.clk, .rst, .pe_in_valid, .pe_in_data, .pe_in_ready,
                       .pe_out_valid, .pe_out_data, .ev);

  int unsigned checks = 0, failures = 0;
  int unsigned n_sent, n_recv, n_win;
  bit          delivered [MAXP];
  bit          gen_on, measuring;
  int unsigned rate;   // permille per router cycle

  function automatic logic [PAYLOAD_W-1:0] mk_pkt(int unsigned id, int unsigned dx, int unsigned dy);
    logic [PAYLOAD_W-1:0] d;
    d = '0;
    d[XW-1:0] = XW'(dx);
    d[XW+YW-1:XW] = YW'(dy);
    d[XW+YW +: 20] = 20'(id);
    d[PAYLOAD_W-1 -: 8] = 8'(id * 37 + 5);
    return d;
  endfunction

  // a new packet is considered once per router cycle: on edges where the
  // router is ready to take one (all routers share one phase by default)
  always @(posedge clk) begin
    if (!rst) begin
      for (int c = 0; c < NY; c++)
        for (int i = 0; i < NX; i++) begin
          if (pe_in_valid[c][i] && pe_in_ready[c][i]) pe_in_valid[c][i] <= 1'b0;
          if (pe_out_valid[c][i]) begin
            logic [PAYLOAD_W-1:0] d;
            int unsigned id;
            d = pe_out_data[c][i];
            id = int'(d[XW+YW +: 20]);
            n_recv++;
            if (measuring) n_win++;
            checks++;
            if (id >= n_sent || delivered[id] ||
                d !== mk_pkt(id, i, c)) begin
              failures++;
              if (failures < 10) $display("FAIL: packet %0d at (%0d,%0d) data %h", id, c, i, d);
            end else delivered[id] = 1'b1;
          end
          if (gen_on && pe_in_ready[c][i] && !(pe_in_valid[c][i]) &&
              $urandom_range(999) < rate && n_sent < MAXP) begin
            pe_in_valid[c][i] <= 1'b1;
            pe_in_data[c][i]  <= mk_pkt(n_sent, $urandom_range(NX-1), $urandom_range(NY-1));
            n_sent++;
          end
        end
    end
  end

  real thr [NRATES];

  initial begin
    pe_in_valid = '0;
    pe_in_data = '0;
    for (int r = 0; r < NRATES; r++) begin
      rst = 1;
      n_sent = 0; n_recv = 0; n_win = 0;
      for (int k = 0; k < MAXP; k++) delivered[k] = 0;
      rate = RATE_PERMILLE[r];
      gen_on = 0; measuring = 0;
      pe_in_valid = '0;
      repeat (3) @(posedge clk);
      rst = 0;
      gen_on = 1;
      repeat (WINDOW / 4) @(posedge clk);           // warm-up
      measuring = 1;
      repeat (WINDOW) @(posedge clk);
      measuring = 0;
      gen_on = 0;
      while (pe_in_valid != '0 || n_recv != n_sent) @(posedge clk);
      thr[r] = real'(n_win) / (real'(WINDOW) / 2.0) / real'(NX * NY);
      $display("R=%0.3f delivered %0.4f packets per PE per router cycle (%0d packets)",
               real'(rate) / 1000.0, thr[r], n_sent);
      for (int k = 0; k < n_sent; k++) begin
        checks++;
        if (!delivered[k]) begin
          failures++;
          if (failures < 10) $display("FAIL: packet %0d lost", k);
        end
      end
      if (r == 0) begin
        checks++;
        if (thr[0] < 0.7 * 0.01 || thr[0] > 1.3 * 0.01) begin
          failures++;
          $display("FAIL: at R=0.01 delivered rate %f does not match the offered rate", thr[0]);
        end
      end else begin
        checks++;
        if (thr[r] < 0.9 * thr[r-1]) begin
          failures++;
          $display("FAIL: delivered rate fell from %f to %f", thr[r-1], thr[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
