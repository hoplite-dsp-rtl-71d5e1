// Top-turn DSP: the corner-turn slice at the top of a DSP column.
//
// Cascade links only run up a column, so the East-bound ring must leave the
// column at its top and return to the bottom over general routing. This slice
// takes the cascade on PCIN and puts it on its P output, which the fabric can
// route (OPMODE Z = PCIN). The valid flag is carried beside it by one fabric
// flip-flop.
//
// Follows the document's "Top-Turn DSPs: PCIN to P". Own choices: the valid
// flip-flop. Timing: p and valid_out are pcin and valid_in one clk edge later.
module top_turn_dsp
  import hoplite_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  lane_t pcin,
  input  logic  valid_in,
  output lane_t p,
  output logic  valid_out
);

  lane_t pcout_unused;

  dsp48_mux u_dsp (
    .clk   (clk),
    .rst   (rst),
    .a     ('0),
    .b     ('0),
    .c     ('0),
    .pcin  (pcin),
    .opmode(OPM_PCIN),
    .ceab  (1'b0),
    .cec   (1'b0),
    .cep   (1'b1),
    .p     (p),
    .pcout (pcout_unused)
  );

  always_ff @(posedge clk) begin
    if (rst) valid_out <= 1'b0;
    else     valid_out <= valid_in;
  end

endmodule
