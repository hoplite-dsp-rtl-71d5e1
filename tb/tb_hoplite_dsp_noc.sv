// End-to-end test of the Hoplite-DSP network at its default size (16 x 16
// routers, one pass-through slice per hop, two register stages on each return
// wire).
//
// Phase 1 sends single packets through an otherwise empty network and checks
// each one's latency against the closed form for the default layout:
//   latency = 3 + 2*dx_hops + 4*[crosses the column return]
//               + 2*dy_hops + 2*[crosses the row return]   (clk cycles)
// counted from the edge that takes the packet from the source PE to the edge
// at which the destination PE takes it (pe_out_valid high before that edge). Phase 2 drives uniform random traffic from every
// PE at a fixed injection probability, then drains the network. Every packet
// carries a unique id; the scoreboard checks that each is delivered exactly
// once, at the router its address names, with its payload intact. The test
// also counts the routing events (East pass, turn, deflection, North pass,
// injection East and South, blocked injection, delivery) and fails if any of
// them never occurred.
module tb_hoplite_dsp_noc;
  import hoplite_pkg::*;

  localparam int unsigned NX = 16;
  localparam int unsigned NY = 16;
  localparam int unsigned XW = 4;
  localparam int unsigned YW = 4;
  localparam int unsigned MAXP = 40000;
  localparam int unsigned RANDOM_CYCLES = 3000;
  localparam int unsigned INJ_PERMILLE = 300;   // per PE per router cycle

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       [NY-1:0][NX-1:0]                pe_in_valid, pe_in_ready, pe_out_valid;
  logic       [NY-1:0][NX-1:0][PAYLOAD_W-1:0] pe_in_data, pe_out_data;
  router_ev_t [NY-1:0][NX-1:0]                ev;

  hoplite_dsp_noc dut (
    .clk, .rst, .pe_in_valid, .pe_in_data, .pe_in_ready,
    .pe_out_valid, .pe_out_data, .ev
  );

  int unsigned checks = 0, failures = 0;
  longint unsigned cyc = 0;

  // scoreboard
  int unsigned     n_sent = 0, n_recv = 0;
  bit              delivered [MAXP];
  longint unsigned t_sent    [MAXP];
  int unsigned     exp_lat   [MAXP];
  bit              lat_check [MAXP];

  // event counters
  longint unsigned cnt_w_east = 0, cnt_w_turn = 0, cnt_deflect = 0, cnt_n_south = 0;
  longint unsigned cnt_inj_e = 0, cnt_inj_s = 0, cnt_inj_block = 0, cnt_exit = 0;

  // PE traffic state
  bit gen_on = 0;

  function automatic logic [PAYLOAD_W-1:0] mk_pkt(int unsigned id, int unsigned dx, int unsigned dy);
    logic [PAYLOAD_W-1:0] d;
    d = '0;
    d[XW-1:0]       = XW'(dx);
    d[XW+YW-1:XW]   = YW'(dy);
    d[XW+YW +: 20]  = 20'(id);
    d[PAYLOAD_W-1 -: 8] = 8'(id * 37 + 5);   // payload check byte
    return d;
  endfunction

  function automatic int unsigned lone_latency(int unsigned sx, int unsigned sy,
                                               int unsigned dx, int unsigned dy);
    int unsigned hx, hy, wx, wy;
    hx = (dx + NX - sx) % NX;
    hy = (dy + NY - sy) % NY;
    wx = (sx + hx >= NX) ? 1 : 0;
    wy = (sy + hy >= NY) ? 1 : 0;
    return 3 + 2 * hx + 4 * wx + 2 * hy + 2 * wy;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      for (int c = 0; c < NY; c++) begin
        for (int i = 0; i < NX; i++) begin
          // handshake
          if (pe_in_valid[c][i] && pe_in_ready[c][i]) begin
            int unsigned id;
            id = int'(pe_in_data[c][i][XW+YW +: 20]);
            t_sent[id] = cyc;
            pe_in_valid[c][i] <= 1'b0;
          end
          // delivery
          if (pe_out_valid[c][i]) begin
            logic [PAYLOAD_W-1:0] d;
            int unsigned id;
            d  = pe_out_data[c][i];
            id = int'(d[XW+YW +: 20]);
            n_recv++;
            checks++;
            if (id >= n_sent || delivered[id]) begin
              failures++;
              $display("FAIL: unknown or duplicate packet id %0d at (%0d,%0d)", id, c, i);
            end else begin
              delivered[id] = 1'b1;
              if (d !== mk_pkt(id, int'(d[XW-1:0]), int'(d[XW+YW-1:XW])) ||
                  int'(d[XW-1:0]) != i || int'(d[XW+YW-1:XW]) != c) begin
                failures++;
                $display("FAIL: packet %0d delivered at column %0d pos %0d, data %h", id, c, i, d);
              end
              if (lat_check[id]) begin
                checks++;
                if (cyc - t_sent[id] != exp_lat[id]) begin
                  failures++;
                  $display("FAIL: packet %0d latency %0d, expected %0d", id, cyc - t_sent[id], exp_lat[id]);
                end
              end
            end
          end
          // events
          cnt_w_east    += ev[c][i].w_east;
          cnt_w_turn    += ev[c][i].w_turn;
          cnt_deflect   += ev[c][i].deflect;
          cnt_n_south   += ev[c][i].n_south;
          cnt_inj_e     += ev[c][i].inj_e;
          cnt_inj_s     += ev[c][i].inj_s;
          cnt_inj_block += ev[c][i].inj_block;
          cnt_exit      += ev[c][i].exit_pe;
        end
      end
      // random traffic: a PE with no pending packet offers a new one
      if (gen_on) begin
        for (int c = 0; c < NY; c++) begin
          for (int i = 0; i < NX; i++) begin
            if (!pe_in_valid[c][i] && !(pe_in_valid[c][i] && pe_in_ready[c][i]) &&
                ($urandom_range(999) < INJ_PERMILLE / 2) && n_sent < MAXP) begin
              pe_in_valid[c][i] <= 1'b1;
              pe_in_data[c][i]  <= mk_pkt(n_sent, $urandom_range(NX-1), $urandom_range(NY-1));
              n_sent++;
            end
          end
        end
      end
    end
  end

  task automatic send_lone(int unsigned sx, int unsigned sy, int unsigned dx, int unsigned dy);
    int unsigned id;
    id = n_sent;
    n_sent++;
    exp_lat[id]   = lone_latency(sx, sy, dx, dy);
    lat_check[id] = 1'b1;
    @(negedge clk);
    pe_in_data[sy][sx]  = mk_pkt(id, dx, dy);
    pe_in_valid[sy][sx] = 1'b1;
    // wait for delivery
    while (!delivered[id]) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  initial begin
    pe_in_valid = '0;
    pe_in_data  = '0;
    for (int k = 0; k < MAXP; k++) begin
      delivered[k] = 0;
      lat_check[k] = 0;
    end
    repeat (4) @(posedge clk);
    rst = 0;
    // Phase 1: lone packets
    send_lone(0, 0, 0, 0);      // to itself
    send_lone(3, 5, 3, 9);      // South only
    send_lone(2, 1, 7, 1);      // East only
    send_lone(5, 2, 9, 11);     // East then South
    send_lone(14, 3, 1, 3);     // across the column return
    send_lone(6, 13, 6, 2);     // across the row return
    send_lone(12, 15, 4, 0);    // across both returns
    // Phase 2: random traffic
    gen_on = 1;
    repeat (RANDOM_CYCLES) @(posedge clk);
    gen_on = 0;
    // drain: wait until every pending PE packet is in and every packet is out
    while (pe_in_valid != '0 || n_recv != n_sent) @(posedge clk);
    repeat (10) @(posedge clk);
    // every id delivered once
    for (int k = 0; k < n_sent; k++) begin
      checks++;
      if (!delivered[k]) begin
        failures++;
        $display("FAIL: packet %0d never delivered", k);
      end
    end
    // every mechanism exercised
    checks += 8;
    if (cnt_w_east    == 0) begin failures++; $display("FAIL: no East pass"); end
    if (cnt_w_turn    == 0) begin failures++; $display("FAIL: no turn"); end
    if (cnt_deflect   == 0) begin failures++; $display("FAIL: no deflection"); end
    if (cnt_n_south   == 0) begin failures++; $display("FAIL: no North pass"); end
    if (cnt_inj_e     == 0) begin failures++; $display("FAIL: no East injection"); end
    if (cnt_inj_s     == 0) begin failures++; $display("FAIL: no South injection"); end
    if (cnt_inj_block == 0) begin failures++; $display("FAIL: no blocked injection"); end
    if (cnt_exit      == 0) begin failures++; $display("FAIL: no delivery"); end
    $display("packets sent=%0d received=%0d cycles=%0d", n_sent, n_recv, cyc);
    $display("events: w_east=%0d w_turn=%0d deflect=%0d n_south=%0d inj_e=%0d inj_s=%0d inj_block=%0d exit=%0d",
             cnt_w_east, cnt_w_turn, cnt_deflect, cnt_n_south, cnt_inj_e, cnt_inj_s, cnt_inj_block, cnt_exit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, sent=%0d received=%0d", n_sent, n_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
