// Pipeline registers on a long fabric link of the network.
//
// The returns that close the rings (top of a column back to its bottom, and
// the last DSP column back to the first) are long wires through general
// routing; they are cut into STAGES register stages so the link keeps up with
// the DSP clock. Each stage registers the 48-bit lane and its valid flag.
// STAGES = 0 is a plain wire.
//
// Follows the document's pipelined inter-router links and the registers drawn
// on the return wires of the column layout. Own choices: the stage count (the
// top level needs it even so that the multi-pumped routers stay in phase) and
// the reset of the valid flags only. Timing: out = in delayed by STAGES edges.
module fabric_pipe
  import hoplite_pkg::*;
#(
  parameter int unsigned STAGES = 2
) (
  input  logic  clk,
  input  logic  rst,
  input  lane_t in_data,
  input  logic  in_valid,
  output lane_t out_data,
  output logic  out_valid
);

  if (STAGES == 0) begin : g_wire
    assign out_data  = in_data;
    assign out_valid = in_valid;
  end else begin : g_regs
    lane_t data_q  [STAGES];
    logic  valid_q [STAGES];

    always_ff @(posedge clk) begin
      data_q[0] <= in_data;
      for (int unsigned i = 1; i < STAGES; i++) data_q[i] <= data_q[i-1];
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        for (int unsigned i = 0; i < STAGES; i++) valid_q[i] <= 1'b0;
      end else begin
        valid_q[0] <= in_valid;
        for (int unsigned i = 1; i < STAGES; i++) valid_q[i] <= valid_q[i-1];
      end
    end

    assign out_data  = data_q[STAGES-1];
    assign out_valid = valid_q[STAGES-1];
  end

endmodule
