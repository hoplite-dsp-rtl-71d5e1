// Pass-through DSP: a DSP48 slice used as one pipeline stage of the cascade.
//
// In the column layout only some slices are routers; the slices between them
// forward the cascade, PCIN to PCOUT, through their P register (OPMODE Z =
// PCIN, X = Y = 0). This lets the network span a whole DSP column without
// using general routing for the ring, at one clk cycle of latency per slice.
// Because the router DSPs are multi-pumped, a pass-through slice carries
// useful data only in every other clk cycle. The lane's valid flag is carried
// beside it by one fabric flip-flop.
//
// Follows the document's "Pass-thru DSPs: PCOUT to PCIN". Own choices: the
// valid flip-flop beside the slice. Timing: pcout and valid_out are pcin and
// valid_in delayed by one clk edge.
module passthru_dsp
  import hoplite_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  lane_t pcin,
  input  logic  valid_in,
  output lane_t p,
  output lane_t pcout,
  output logic  valid_out
);

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
    .pcout (pcout)
  );

  always_ff @(posedge clk) begin
    if (rst) valid_out <= 1'b0;
    else     valid_out <= valid_in;
  end

endmodule
