// Bottom-turn DSP: the corner-turn slice at the bottom of a DSP column.
//
// It closes the East-bound ring: the lane that left the top of the column
// comes back over general routing on the A:B inputs, is registered by the A/B
// registers and then by P (OPMODE X = A:B), and enters the column's cascade
// on PCOUT. The valid flag follows through two fabric flip-flops so that it
// stays aligned with the lane.
//
// Follows the document's "Bottom-Turn DSPs: A:B to PCOUT". Own choices: the
// A/B registers are enabled (two clk edges of latency, which the top level
// counts when it aligns router phases), and the valid flip-flops.
module bottom_turn_dsp
  import hoplite_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  lane_t ab,
  input  logic  valid_in,
  output lane_t pcout,
  output logic  valid_out
);

  lane_t p_unused;
  logic  valid_q;

  dsp48_mux u_dsp (
    .clk   (clk),
    .rst   (rst),
    .a     (ab[LANE_W-1:B_W]),
    .b     (ab[B_W-1:0]),
    .c     ('0),
    .pcin  ('0),
    .opmode(OPM_AB),
    .ceab  (1'b1),
    .cec   (1'b0),
    .cep   (1'b1),
    .p     (p_unused),
    .pcout (pcout)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_q   <= 1'b0;
      valid_out <= 1'b0;
    end else begin
      valid_q   <= valid_in;
      valid_out <= valid_q;
    end
  end

endmodule
