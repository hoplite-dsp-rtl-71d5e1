// Reusable traffic source and scoreboard around one hoplite_dsp_noc instance
// of a given shape. Every PE offers packets to uniformly random destinations
// with probability INJ_PERMILLE per clk whenever it is not holding one, for
// CYCLES clk cycles; the network is then drained. Each packet carries a
// unique id; the checker counts a failure for a packet delivered twice, at
// the wrong router or corrupted, and for one never delivered. It also counts
// failures for deflections or turns that never happened. done rises when the
// run is over; checks and failures hold the totals.
module noc_traffic_check
  import hoplite_pkg::*;
#(
  parameter int unsigned NX = 4,
  parameter int unsigned NY = 4,
  parameter int unsigned PASS_PER_HOP = 1,
  parameter int unsigned COL_RET_REGS = 2,
  parameter int unsigned CYCLES = 2000,
  parameter int unsigned INJ_PERMILLE = 200
) (
  input  logic        clk,
  input  logic        rst,
  output logic        done,
  output int unsigned checks,
  output int unsigned failures
);
  localparam int unsigned XW = (NX > 1) ? $clog2(NX) : 1;
  localparam int unsigned YW = (NY > 1) ? $clog2(NY) : 1;
  localparam int unsigned MAXP = 1 << 16;

  logic       [NY-1:0][NX-1:0]                pe_in_valid, pe_in_ready, pe_out_valid;
  logic       [NY-1:0][NX-1:0][PAYLOAD_W-1:0] pe_in_data, pe_out_data;
  router_ev_t [NY-1:0][NX-1:0]                ev;

  hoplite_dsp_noc #(.NX(NX), .NY(NY), .PASS_PER_HOP(PASS_PER_HOP), .COL_RET_REGS(COL_RET_REGS)) dut (
    .clk, .rst, .pe_in_valid, .pe_in_data, .pe_in_ready, .pe_out_valid, .pe_out_data, .ev);

  int unsigned n_sent = 0, n_recv = 0, n_defl = 0, n_turn = 0, cyc = 0;
  bit delivered [MAXP];

  function automatic logic [PAYLOAD_W-1:0] mk_pkt(int unsigned id, int unsigned dx, int unsigned dy);
    logic [PAYLOAD_W-1:0] d;
    d = '0;
    d[XW-1:0] = XW'(dx);
    d[XW+YW-1:XW] = YW'(dy);
    d[XW+YW +: 20] = 20'(id);
    d[PAYLOAD_W-1 -: 8] = 8'(id * 37 + 5);
    return d;
  endfunction

  initial begin
    done = 0; checks = 0; failures = 0;
    pe_in_valid = '0; pe_in_data = '0;
    for (int k = 0; k < MAXP; k++) delivered[k] = 0;
  end

  always @(posedge clk) begin
    if (!rst && !done) begin
      cyc++;
      for (int c = 0; c < NY; c++)
        for (int i = 0; i < NX; i++) begin
          if (pe_in_valid[c][i] && pe_in_ready[c][i]) pe_in_valid[c][i] <= 1'b0;
          if (pe_out_valid[c][i]) begin
            logic [PAYLOAD_W-1:0] d;
            int unsigned id;
            d = pe_out_data[c][i];
            id = int'(d[XW+YW +: 20]);
            n_recv++;
            checks++;
            if (id >= n_sent || delivered[id] || d !== mk_pkt(id, i, c)) begin
              failures++;
              if (failures < 10) $display("FAIL %0dx%0d: packet %0d at (%0d,%0d)", NX, NY, id, c, i);
            end else delivered[id] = 1'b1;
          end
          n_defl += ev[c][i].deflect;
          n_turn += ev[c][i].w_turn;
          if (cyc < CYCLES && !pe_in_valid[c][i] && $urandom_range(999) < INJ_PERMILLE && n_sent < MAXP) begin
            pe_in_valid[c][i] <= 1'b1;
            pe_in_data[c][i]  <= mk_pkt(n_sent, $urandom_range(NX-1), $urandom_range(NY-1));
            n_sent++;
          end
        end
      if (cyc > CYCLES && pe_in_valid == '0 && n_recv == n_sent) begin
        for (int k = 0; k < n_sent; k++) begin
          checks++;
          if (!delivered[k]) failures++;
        end
        checks += 2;
        if (n_defl == 0) begin failures++; $display("FAIL %0dx%0d: no deflection", NX, NY); end
        if (n_turn == 0) begin failures++; $display("FAIL %0dx%0d: no turn", NX, NY); end
        $display("%0dx%0d pass-through/hop=%0d: %0d packets, %0d deflections", NX, NY, PASS_PER_HOP, n_sent, n_defl);
        done <= 1'b1;
      end
    end
  end
endmodule
