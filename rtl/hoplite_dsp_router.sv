// One Hoplite deflection router folded into a single DSP48 slice.
//
// Port mapping onto the slice: the North input arrives on A:B (captured by the
// A/B registers), the PE input on C (captured by the C register), the West
// input on the cascade PCIN, and the single P register drives both the East
// output (PCOUT, to the next slice of the column) and the shared South/PE
// output (P, to the fabric). The 2:1 East and 3:1 South/PE multiplexers of a
// LUT-based Hoplite switch become the DSP's OPMODE-steered X/Y/Z multiplexers
// and its adder; only the routing decision (dor_logic) and a few flags stay in
// the fabric.
//
// Multi-pumping: the slice runs on clk, twice the PE rate, and one router
// cycle is two clk cycles. sub_s is low in the East sub-cycle and high in the
// South sub-cycle; the router cycle's edges are the E edge (end of the East
// sub-cycle) and the S edge.
//   E edge: P <= East packet (PCIN or C); A:B <= North lane; the South plan
//           (OPMODE, valid, exit) is registered. A West packet that turns is
//           parked in P with e_valid low.
//   S edge: P <= South/PE packet (A:B, parked P, or C); C <= next PE packet.
// So P holds the East packet during the South sub-cycle (e_valid marks it) and
// the South/PE packet during the following East sub-cycle (s_valid or
// pe_out_valid marks it). The downstream slice on the cascade samples PCIN at
// its own E edge, which must fall on this router's S edge; the router to the
// South captures P on its A:B at its E edge. The top level arranges these
// phases.
//
// The valid flags travel on fabric wires beside the lanes, not inside them:
// a parked West packet sits on PCOUT while the East lane is empty. The PE's
// destination fields are kept in fabric flip-flops next to the C register so
// the routing logic can read them. PE handshake: the PE offers pe_in_valid and
// pe_in_data; the packet is taken on a clk edge where pe_in_valid and
// pe_in_ready are both high (only ever an S edge). pe_out_valid is high for one
// clk cycle, with the packet on pe_out_data; the PE samples it at the next edge.
//
// Follows the document: the input/output to DSP port mapping, the East-then-
// South sub-cycle order, the 2x clock. Own choices: the parking of turning
// West packets in P (the document does not say how the West packet survives
// into the second sub-cycle), the out-of-band valid flags, the PE handshake
// and the synchronous reset.
module hoplite_dsp_router
  import hoplite_pkg::*;
#(
  parameter int unsigned XW   = 4,
  parameter int unsigned YW   = 4,
  parameter int unsigned MY_X = 0,
  parameter int unsigned MY_Y = 0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 sub_s,        // 1: South sub-cycle, 0: East sub-cycle
  // West input (cascade) and its valid flag
  input  lane_t                pcin,
  input  logic                 w_valid,
  // North input (fabric) and its valid flag
  input  lane_t                n_data,
  input  logic                 n_valid,
  // PE injection
  input  logic                 pe_in_valid,
  input  logic [PAYLOAD_W-1:0] pe_in_data,
  output logic                 pe_in_ready,
  // outputs: P drives East (pcout) and South/PE (p)
  output lane_t                p,
  output lane_t                pcout,
  output logic                 e_valid,
  output logic                 s_valid,
  output logic                 pe_out_valid,
  output logic [PAYLOAD_W-1:0] pe_out_data,
  output router_ev_t           ev
);

  // fabric state
  logic          c_v;
  logic [XW-1:0] c_dx_q;
  logic [YW-1:0] c_dy_q;
  opmode_t       s_op_q;
  logic          s_has_q, s_exit_q, c_taken_q;
  logic          e_valid_q, s_valid_q, pe_out_valid_q;

  // routing decision, evaluated for the E edge
  opmode_t    e_op, s_op, opmode;
  logic       e_valid_d, s_has_d, s_exit_d, c_taken_d;
  router_ev_t ev_d;

  dor_logic #(.XW(XW), .YW(YW), .MY_X(MY_X), .MY_Y(MY_Y)) u_dor (
    .w_valid (w_valid),
    .w_dx    (pcin[XW-1:0]),
    .w_dy    (pcin[XW+YW-1:XW]),
    .n_valid (n_valid),
    .n_dy    (n_data[XW+YW-1:XW]),
    .c_valid (c_v),
    .c_dx    (c_dx_q),
    .c_dy    (c_dy_q),
    .e_opmode(e_op),
    .e_valid (e_valid_d),
    .s_opmode(s_op),
    .s_has   (s_has_d),
    .s_exit  (s_exit_d),
    .c_taken (c_taken_d),
    .ev      (ev_d)
  );

  assign opmode      = sub_s ? s_op_q : e_op;
  assign pe_in_ready = sub_s && (!c_v || c_taken_q);

  dsp48_mux u_dsp (
    .clk   (clk),
    .rst   (rst),
    .a     (n_data[LANE_W-1:B_W]),
    .b     (n_data[B_W-1:0]),
    .c     ({1'b0, pe_in_data}),
    .pcin  (pcin),
    .opmode(opmode),
    .ceab  (!sub_s),
    .cec   (pe_in_ready),
    .cep   (1'b1),
    .p     (p),
    .pcout (pcout)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      c_v            <= 1'b0;
      c_dx_q         <= '0;
      c_dy_q         <= '0;
      s_op_q         <= OPM_ZERO;
      s_has_q        <= 1'b0;
      s_exit_q       <= 1'b0;
      c_taken_q      <= 1'b0;
      e_valid_q      <= 1'b0;
      s_valid_q      <= 1'b0;
      pe_out_valid_q <= 1'b0;
    end else if (!sub_s) begin
      // E edge
      s_op_q         <= s_op;
      s_has_q        <= s_has_d;
      s_exit_q       <= s_exit_d;
      c_taken_q      <= c_taken_d;
      e_valid_q      <= e_valid_d;
      s_valid_q      <= 1'b0;
      pe_out_valid_q <= 1'b0;
    end else begin
      // S edge
      e_valid_q      <= 1'b0;
      s_valid_q      <= s_has_q && !s_exit_q;
      pe_out_valid_q <= s_has_q && s_exit_q;
      if (pe_in_ready) begin
        c_v    <= pe_in_valid;
        c_dx_q <= pe_in_data[XW-1:0];
        c_dy_q <= pe_in_data[XW+YW-1:XW];
      end
    end
  end

  assign e_valid      = e_valid_q;
  assign s_valid      = s_valid_q;
  assign pe_out_valid = pe_out_valid_q;
  assign pe_out_data  = p[PAYLOAD_W-1:0];
  assign ev           = sub_s ? '0 : ev_d;

  // A packet the routing logic accepted from the PE is never lost or doubled.
  assert property (@(posedge clk) disable iff (rst)
                   !sub_s |-> !(ev_d.inj_e && ev_d.inj_s));
  // The parked West packet and a PE packet never both claim the East lane.
  assert property (@(posedge clk) disable iff (rst)
                   !sub_s && w_valid |-> !ev_d.inj_e);

endmodule
