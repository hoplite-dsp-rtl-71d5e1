// Dimension-ordered routing (DOR) decision of one Hoplite-DSP router.
//
// Hoplite routes a packet East on its ring until its dx matches the router's
// column position, then turns it South until dy matches, where it leaves the
// network on the shared South/PE output. There are no buffers: a packet that
// cannot take the output it wants is deflected. The rules, in priority order:
//   * A North packet can only go South, so it always gets the South output.
//   * A West packet whose dx matches wants South; if a North packet is present
//     it is deflected East and goes round the ring again.
//   * The PE injects only into an output nobody else uses in that cycle.
// Because the router is mapped onto one DSP slice whose single P register
// serves both outputs, a West packet that turns South is parked in P during
// the East sub-cycle (the East lane then carries no valid packet) and moved
// from P to the South output in the second sub-cycle. The East lane is
// therefore occupied whenever a West packet is present, and the PE cannot
// inject East in a cycle in which a West packet turns; that restriction is
// this design's own, the rest follows Hoplite.
//
// Purely combinational. Inputs are the valid flags and address fields of the
// West, North and PE packets; outputs are the OPMODE for the East sub-cycle
// (used at once) and for the South sub-cycle (registered by the router), the
// resulting output valid/exit flags and per-decision event flags.
module dor_logic
  import hoplite_pkg::*;
#(
  parameter int unsigned XW   = 4,
  parameter int unsigned YW   = 4,
  parameter int unsigned MY_X = 0,
  parameter int unsigned MY_Y = 0
) (
  input  logic          w_valid,
  input  logic [XW-1:0] w_dx,
  input  logic [YW-1:0] w_dy,
  input  logic          n_valid,
  input  logic [YW-1:0] n_dy,
  input  logic          c_valid,
  input  logic [XW-1:0] c_dx,
  input  logic [YW-1:0] c_dy,
  output opmode_t       e_opmode,  // East sub-cycle
  output logic          e_valid,   // East lane carries a packet
  output opmode_t       s_opmode,  // South sub-cycle
  output logic          s_has,     // South/PE lane carries a packet
  output logic          s_exit,    // ... and it is for this router's PE
  output logic          c_taken,   // PE packet accepted this cycle
  output router_ev_t    ev
);

  localparam logic [XW-1:0] ME_X = XW'(MY_X);
  localparam logic [YW-1:0] ME_Y = YW'(MY_Y);

  logic w_wants_s, w_turn, w_east, c_wants_e, inj_e, inj_s;
  logic [YW-1:0] s_dy;

  always_comb begin
    w_wants_s = w_valid && (w_dx == ME_X);
    w_turn    = w_wants_s && !n_valid;
    w_east    = w_valid && !w_turn;
    c_wants_e = (c_dx != ME_X);
    // The East lane is busy whenever a West packet is present (passing or parked).
    inj_e     = c_valid && c_wants_e && !w_valid;
    inj_s     = c_valid && !c_wants_e && !n_valid && !w_turn;

    e_opmode  = w_valid ? OPM_PCIN : (inj_e ? OPM_C : OPM_ZERO);
    e_valid   = w_east || inj_e;

    if (n_valid) begin
      s_opmode = OPM_AB;
      s_dy     = n_dy;
    end else if (w_turn) begin
      s_opmode = OPM_P;
      s_dy     = w_dy;
    end else if (inj_s) begin
      s_opmode = OPM_C;
      s_dy     = c_dy;
    end else begin
      s_opmode = OPM_ZERO;
      s_dy     = '0;
    end
    s_has   = n_valid || w_turn || inj_s;
    s_exit  = s_has && (s_dy == ME_Y);
    c_taken = inj_e || inj_s;

    ev.w_east    = w_east;
    ev.w_turn    = w_turn;
    ev.deflect   = w_wants_s && n_valid;
    ev.n_south   = n_valid;
    ev.inj_e     = inj_e;
    ev.inj_s     = inj_s;
    ev.inj_block = c_valid && !c_taken;
    ev.exit_pe   = s_exit;
  end

endmodule
