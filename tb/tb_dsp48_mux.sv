// Self-checking test of the DSP48 slice model. Every cycle it applies random
// A, B, C, PCIN, clock enables and an OPMODE drawn from all encodings, and
// compares P and PCOUT with a model of the input registers, the X/Y/Z
// selection and the adder kept in the testbench. P must follow its operands
// by exactly one clock edge. A synchronous reset is applied now and then.
module tb_dsp48_mux;
  import hoplite_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [A_W-1:0] a;
  logic [B_W-1:0] b;
  lane_t c, pcin, p, pcout;
  opmode_t opmode;
  logic ceab, cec, cep;

  dsp48_mux dut (.clk, .rst, .a, .b, .c, .pcin, .opmode, .ceab, .cec, .cep, .p, .pcout);

  int unsigned checks = 0, failures = 0;
  // model
  logic [A_W-1:0] ma;
  logic [B_W-1:0] mb;
  lane_t mc, mp;
  int unsigned n_sel [8];

  function automatic lane_t rnd48();
    return {16'($urandom), 32'($urandom)};
  endfunction

  function automatic lane_t sel_x(opmode_t o);
    if (o[1:0] == 2'd2) return mp;
    if (o[1:0] == 2'd3) return {ma, mb};
    return 48'd0;
  endfunction
  function automatic lane_t sel_y(opmode_t o);
    if (o[3:2] == 2'd2) return {48{1'b1}};
    if (o[3:2] == 2'd3) return mc;
    return 48'd0;
  endfunction
  function automatic lane_t sel_z(opmode_t o);
    logic signed [47:0] s;
    case (o[6:4])
      3'd1: return pcin;
      3'd2, 3'd4: return mp;
      3'd3: return mc;
      3'd5: begin s = pcin; return s >>> 17; end
      3'd6: begin s = mp; return s >>> 17; end
      default: return 48'd0;
    endcase
  endfunction

  initial begin
    a = 0; b = 0; c = 0; pcin = 0; opmode = 0; ceab = 0; cec = 0; cep = 0;
    ma = 0; mb = 0; mc = 0; mp = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int k = 0; k < 5000; k++) begin
      // new stimulus in the middle of the cycle
      a      = 30'($urandom);
      b      = 18'($urandom);
      c      = rnd48();
      pcin   = rnd48();
      opmode = 7'($urandom);
      ceab   = 1'($urandom);
      cec    = 1'($urandom);
      cep    = ($urandom_range(7) != 0);
      rst    = ($urandom_range(199) == 0);
      n_sel[opmode[6:4]]++;
      @(posedge clk);
      // model update, mirroring the edge
      if (rst) begin
        ma = 0; mb = 0; mc = 0; mp = 0;
      end else begin
        lane_t nx;
        nx = sel_z(opmode) + sel_x(opmode) + sel_y(opmode);
        if (ceab) begin ma = a; mb = b; end
        if (cec) mc = c;
        if (cep) mp = nx;
      end
      @(negedge clk);
      checks++;
      if (p !== mp || pcout !== mp) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d opmode=%b p=%h pcout=%h expected %h", k, opmode, p, pcout, mp);
      end
    end
    // the pure multiplexer settings used by the network
    rst = 0; cep = 1; ceab = 1; cec = 1;
    a = 30'h1234567; b = 18'h2abcd; c = 48'h0000_cafe_f00d; pcin = 48'h0000_0bad_beef;
    opmode = OPM_ZERO; @(posedge clk); @(negedge clk);
    opmode = OPM_AB;   @(posedge clk); @(negedge clk);
    checks++; if (p !== {30'h1234567, 18'h2abcd}) begin failures++; $display("FAIL A:B select %h", p); end
    opmode = OPM_C;    @(posedge clk); @(negedge clk);
    checks++; if (p !== 48'h0000_cafe_f00d) begin failures++; $display("FAIL C select %h", p); end
    opmode = OPM_PCIN; @(posedge clk); @(negedge clk);
    checks++; if (p !== 48'h0000_0bad_beef) begin failures++; $display("FAIL PCIN select %h", p); end
    pcin = 0;
    opmode = OPM_P;    @(posedge clk); @(negedge clk);
    checks++; if (p !== 48'h0000_0bad_beef) begin failures++; $display("FAIL P hold %h", p); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
