// Shared types and constants of the Hoplite-DSP network-on-chip.
//
// A packet travels on a 48-bit DSP lane. Bits [46:0] are the payload; bit 47 is
// reserved and always zero, so the DSP adder, which only ever has one non-zero
// operand, can never carry into or out of it. The destination address sits in
// the payload's low bits: dx (position on the East-bound cascade ring) in
// [XW-1:0] and dy (position on the South-bound fabric ring) in [XW+YW-1:XW]; the
// rest is user data. The valid flag of a lane travels beside it on a fabric
// wire, not inside it (see hoplite_dsp_router for why).
//
// The OPMODE encodings are those of the Xilinx DSP48E1 slice: OPMODE[1:0]
// selects the X multiplexer, [3:2] the Y multiplexer and [6:4] the Z multiplexer.
package hoplite_pkg;

  localparam int unsigned LANE_W    = 48;  // DSP48 P / PCIN / PCOUT / C width
  localparam int unsigned PAYLOAD_W = 47;  // payload carried by one router
  localparam int unsigned A_W       = 30;  // DSP48 A port
  localparam int unsigned B_W       = 18;  // DSP48 B port

  typedef logic [LANE_W-1:0] lane_t;
  typedef logic [6:0]        opmode_t;

  // X multiplexer, OPMODE[1:0]
  localparam logic [1:0] X_ZERO = 2'b00;
  localparam logic [1:0] X_M    = 2'b01;  // multiplier output (not modelled)
  localparam logic [1:0] X_P    = 2'b10;
  localparam logic [1:0] X_AB   = 2'b11;
  // Y multiplexer, OPMODE[3:2]
  localparam logic [1:0] Y_ZERO = 2'b00;
  localparam logic [1:0] Y_M    = 2'b01;  // multiplier output (not modelled)
  localparam logic [1:0] Y_ONES = 2'b10;
  localparam logic [1:0] Y_C    = 2'b11;
  // Z multiplexer, OPMODE[6:4]
  localparam logic [2:0] Z_ZERO    = 3'b000;
  localparam logic [2:0] Z_PCIN    = 3'b001;
  localparam logic [2:0] Z_P       = 3'b010;
  localparam logic [2:0] Z_C       = 3'b011;
  localparam logic [2:0] Z_PMACC   = 3'b100;
  localparam logic [2:0] Z_PCIN17  = 3'b101;
  localparam logic [2:0] Z_P17     = 3'b110;

  // The five settings the network uses: each passes exactly one source.
  localparam opmode_t OPM_ZERO = {Z_ZERO, Y_ZERO, X_ZERO};  // drive an empty lane
  localparam opmode_t OPM_PCIN = {Z_PCIN, Y_ZERO, X_ZERO};  // West input (cascade)
  localparam opmode_t OPM_C    = {Z_ZERO, Y_C,    X_ZERO};  // PE input
  localparam opmode_t OPM_AB   = {Z_ZERO, Y_ZERO, X_AB};    // North input (A:B)
  localparam opmode_t OPM_P    = {Z_P,    Y_ZERO, X_ZERO};  // hold / recirculate P

  // Per-router event pulses, one cycle wide, for observation and statistics.
  typedef struct packed {
    logic w_east;     // West packet continues East
    logic w_turn;     // West packet turns South (or exits to the PE)
    logic deflect;    // West packet wanted South but North held it: sent East
    logic n_south;    // North packet continues South (or exits)
    logic inj_e;      // PE packet injected East
    logic inj_s;      // PE packet injected South
    logic inj_block;  // PE packet waiting, no free output this cycle
    logic exit_pe;    // packet delivered to the PE
  } router_ev_t;

endpackage
