// Hoplite-DSP network-on-chip: an NX x NY unidirectional torus of deflection
// routers, each folded into one DSP48 slice, laid out along the FPGA's DSP
// columns.
//
// Layout. Each of the NY DSP columns holds one East-bound ring of NX router
// slices chained on the dedicated cascade (PCOUT to PCIN), with PASS_PER_HOP
// pass-through slices between consecutive routers. Cascades only run up a
// column, so the ring is closed by a top-turn slice (cascade to fabric), a
// fabric return wire with COL_RET_REGS registers, and a bottom-turn slice
// (fabric to cascade). The South-bound rings run across the columns on fabric
// wires: router i of column c feeds router i of column c+1, and the last
// column wraps to the first through ROW_RET_REGS registers.
//
// Addressing. A packet's dx is the router's position in its column (0 at the
// bottom) and dy is the column number. Packets travel the cascade ring until
// dx matches, then cross columns until dy matches, and leave on that router's
// PE port; see dor_logic for the deflection rules.
//
// Clocking. Everything runs on clk, the DSP clock; a router handles one
// packet per output every two clk cycles (the PE rate is half of clk). A
// router's East output must reach the next router's PCIN exactly when that
// router resolves its East sub-cycle, so each router's sub-cycle phase is
// offset by the number of clk stages between it and its upstream neighbour.
// The total around a column ring must be even; the parameters are checked at
// elaboration. With the defaults (one pass-through slice per hop) every router
// runs in the same phase.
//
// Interface. Per router (index [column][position]): pe_in_valid/pe_in_data/
// pe_in_ready inject a packet (taken on an edge where valid and ready are
// high); pe_out_valid/pe_out_data deliver one (valid for exactly one clk
// cycle). ev gives per-router event pulses. rst is synchronous.
//
// Follows the document: the torus, the router-to-DSP mapping, the 2x
// multi-pumping, the route / pass-through / corner-turn slices and the
// registered returns of the column layout, the 16x16 size and the 47-bit
// payload. Own choices: the register counts on the return wires, the phase
// alignment, the address encoding and the PE handshake.
module hoplite_dsp_noc
  import hoplite_pkg::*;
#(
  parameter int unsigned NX           = 16,  // routers per DSP column (cascade ring)
  parameter int unsigned NY           = 16,  // DSP columns (fabric ring)
  parameter int unsigned PASS_PER_HOP = 1,   // pass-through slices between routers
  parameter int unsigned COL_RET_REGS = 2,   // fabric registers, column top to bottom
  parameter int unsigned ROW_RET_REGS = 2    // fabric registers, last column to first
) (
  input  logic                                        clk,
  input  logic                                        rst,
  input  logic       [NY-1:0][NX-1:0]                 pe_in_valid,
  input  logic       [NY-1:0][NX-1:0][PAYLOAD_W-1:0]  pe_in_data,
  output logic       [NY-1:0][NX-1:0]                 pe_in_ready,
  output logic       [NY-1:0][NX-1:0]                 pe_out_valid,
  output logic       [NY-1:0][NX-1:0][PAYLOAD_W-1:0]  pe_out_data,
  output router_ev_t [NY-1:0][NX-1:0]                 ev
);

  localparam int unsigned XW = (NX > 1) ? $clog2(NX) : 1;
  localparam int unsigned YW = (NY > 1) ? $clog2(NY) : 1;
  localparam int unsigned HOP_LAT  = PASS_PER_HOP + 1;      // router E edge to next router E edge
  localparam int unsigned WRAP_LAT = 1 + COL_RET_REGS + 2 + 1;  // top-turn, regs, bottom-turn (A:B, P)

  if (NX < 2 || NY < 2) begin : g_bad_size
    $error("hoplite_dsp_noc: NX and NY must be at least 2");
  end
  if (XW + YW > PAYLOAD_W) begin : g_bad_addr
    $error("hoplite_dsp_noc: address does not fit the payload");
  end
  if ((((NX - 1) * HOP_LAT) + WRAP_LAT) % 2 != 0) begin : g_bad_phase
    $error("hoplite_dsp_noc: column ring latency is odd, routers cannot stay in phase");
  end
  if (ROW_RET_REGS % 2 != 0) begin : g_bad_row
    $error("hoplite_dsp_noc: ROW_RET_REGS must be even");
  end

  // Global sub-cycle toggle: 0 = East sub-cycle, 1 = South sub-cycle (phase 0).
  logic sub_s;
  always_ff @(posedge clk) begin
    if (rst) sub_s <= 1'b0;
    else     sub_s <= !sub_s;
  end

  // Router outputs, per column and position
  lane_t [NY-1:0][NX-1:0] r_p, r_pcout;
  logic  [NY-1:0][NX-1:0] r_e_valid, r_s_valid;
  // Router West inputs
  lane_t [NY-1:0][NX-1:0] w_lane;
  logic  [NY-1:0][NX-1:0] w_vld;
  // Router North inputs
  lane_t [NY-1:0][NX-1:0] n_lane;
  logic  [NY-1:0][NX-1:0] n_vld;

  for (genvar c = 0; c < NY; c++) begin : g_col

    // ---- routers ----
    for (genvar i = 0; i < NX; i++) begin : g_rtr
      localparam bit PHASE = bit'((i * HOP_LAT) % 2);

      hoplite_dsp_router #(.XW(XW), .YW(YW), .MY_X(i), .MY_Y(c)) u_router (
        .clk         (clk),
        .rst         (rst),
        .sub_s       (sub_s ^ PHASE),
        .pcin        (w_lane[c][i]),
        .w_valid     (w_vld[c][i]),
        .n_data      (n_lane[c][i]),
        .n_valid     (n_vld[c][i]),
        .pe_in_valid (pe_in_valid[c][i]),
        .pe_in_data  (pe_in_data[c][i]),
        .pe_in_ready (pe_in_ready[c][i]),
        .p           (r_p[c][i]),
        .pcout       (r_pcout[c][i]),
        .e_valid     (r_e_valid[c][i]),
        .s_valid     (r_s_valid[c][i]),
        .pe_out_valid(pe_out_valid[c][i]),
        .pe_out_data (pe_out_data[c][i]),
        .ev          (ev[c][i])
      );
    end

    // ---- cascade between consecutive routers: pass-through slices ----
    for (genvar i = 0; i + 1 < NX; i++) begin : g_hop
      lane_t [PASS_PER_HOP:0] lane;
      logic  [PASS_PER_HOP:0] vld;
      assign lane[0] = r_pcout[c][i];
      assign vld[0]  = r_e_valid[c][i];
      for (genvar k = 0; k < PASS_PER_HOP; k++) begin : g_pass
        lane_t p_unused;
        passthru_dsp u_pass (
          .clk      (clk),
          .rst      (rst),
          .pcin     (lane[k]),
          .valid_in (vld[k]),
          .p        (p_unused),
          .pcout    (lane[k+1]),
          .valid_out(vld[k+1])
        );
      end
      assign w_lane[c][i+1] = lane[PASS_PER_HOP];
      assign w_vld[c][i+1]  = vld[PASS_PER_HOP];
    end

    // ---- column return: top-turn, fabric registers, bottom-turn ----
    lane_t top_p, ret_lane;
    logic  top_v, ret_v;

    top_turn_dsp u_top (
      .clk      (clk),
      .rst      (rst),
      .pcin     (r_pcout[c][NX-1]),
      .valid_in (r_e_valid[c][NX-1]),
      .p        (top_p),
      .valid_out(top_v)
    );

    fabric_pipe #(.STAGES(COL_RET_REGS)) u_col_ret (
      .clk      (clk),
      .rst      (rst),
      .in_data  (top_p),
      .in_valid (top_v),
      .out_data (ret_lane),
      .out_valid(ret_v)
    );

    bottom_turn_dsp u_bottom (
      .clk      (clk),
      .rst      (rst),
      .ab       (ret_lane),
      .valid_in (ret_v),
      .pcout    (w_lane[c][0]),
      .valid_out(w_vld[c][0])
    );

    // ---- South-bound links across columns ----
    if (c > 0) begin : g_row_link
      for (genvar i = 0; i < NX; i++) begin : g_lnk
        assign n_lane[c][i] = r_p[c-1][i];
        assign n_vld[c][i]  = r_s_valid[c-1][i];
      end
    end else begin : g_row_wrap
      for (genvar i = 0; i < NX; i++) begin : g_lnk
        fabric_pipe #(.STAGES(ROW_RET_REGS)) u_row_ret (
          .clk      (clk),
          .rst      (rst),
          .in_data  (r_p[NY-1][i]),
          .in_valid (r_s_valid[NY-1][i]),
          .out_data (n_lane[0][i]),
          .out_valid(n_vld[0][i])
        );
      end
    end
  end

endmodule
