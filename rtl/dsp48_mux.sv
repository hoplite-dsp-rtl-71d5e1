// Register-transfer model of the part of a Xilinx DSP48E1 slice that the
// Hoplite-DSP network uses.
//
// The slice has input registers on A:B (one clock enable for both, as a single
// 48-bit lane is carried on A:B) and on C, three operand multiplexers X, Y and
// Z steered at run time by OPMODE, a 48-bit ALU and the P output register. P
// is driven both to the fabric (p) and to the dedicated cascade (pcout), so
// pcout of one slice feeds pcin of the next without general routing. The ALU
// is fixed to ALUMODE 0000 (P = Z + X + Y, carry-in 0): with two of the three
// operands forced to zero it becomes a free 48-bit multiplexer, which is the
// whole trick of the design.
//
// Follows the slice diagram: A is 30 bits, B 18, C, PCIN, PCOUT and P 48. The
// OPMODE encoding is the vendor's. Own choices: the pre-adder, the 25x18
// multiplier and the D port are left out (OPMODE X/Y = M reads as zero), the
// other ALUMODE functions are not modelled, and a single synchronous reset
// clears every register. Timing: inputs are registered on the rising edge of
// clk when their enable is high; p changes one edge after the operands it
// adds, with the operand multiplexers combinational in between.
module dsp48_mux
  import hoplite_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic [A_W-1:0]   a,
  input  logic [B_W-1:0]   b,
  input  lane_t            c,
  input  lane_t            pcin,
  input  opmode_t          opmode,
  input  logic             ceab,   // clock enable of the A and B registers
  input  logic             cec,    // clock enable of the C register
  input  logic             cep,    // clock enable of the P register
  output lane_t            p,
  output lane_t            pcout
);

  logic [A_W-1:0] a_q;
  logic [B_W-1:0] b_q;
  lane_t          c_q, p_q;
  lane_t          x, y, z;

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q <= '0;
      b_q <= '0;
      c_q <= '0;
      p_q <= '0;
    end else begin
      if (ceab) begin
        a_q <= a;
        b_q <= b;
      end
      if (cec) c_q <= c;
      if (cep) p_q <= z + x + y;
    end
  end

  always_comb begin
    unique case (opmode[1:0])
      X_P:     x = p_q;
      X_AB:    x = {a_q, b_q};
      default: x = '0;             // X_ZERO, X_M
    endcase
    unique case (opmode[3:2])
      Y_ONES:  y = '1;
      Y_C:     y = c_q;
      default: y = '0;             // Y_ZERO, Y_M
    endcase
    unique case (opmode[6:4])
      Z_PCIN:   z = pcin;
      Z_P,
      Z_PMACC:  z = p_q;
      Z_C:      z = c_q;
      Z_PCIN17: z = lane_t'($signed(pcin) >>> 17);
      Z_P17:    z = lane_t'($signed(p_q) >>> 17);
      default:  z = '0;            // Z_ZERO, reserved
    endcase
  end

  assign p     = p_q;
  assign pcout = p_q;

endmodule
