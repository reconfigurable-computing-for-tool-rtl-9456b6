// coef_lut: the two-coefficient LUT of the distributed arithmetic 2-C MACs.
//
// A 2-C MAC computes a*C +/- b*S bit-serially. Its LUT is addressed by the
// current bit of a (address bit 0) and of b (address bit 1) and returns the
// matching sum of coefficients: 0, C, +/-S, C +/- S. The table has four
// (n+1)-bit words. SUBTRACT selects the sign of the S coefficient: the MACs
// forming x*C_i and y*C_i need a*C - b*S, those forming y*S_i and x*S_i need
// a*C + b*S. Each table serves two MACs, so it has two read ports.
//
// C and S are cos and sin of the constant rotation step, signed fixed point
// with N-1 fraction bits in N+1 bits (range [-2, 2)). The words are written
// from these two values in one cycle when we is high; this stands for the
// reconfiguration that fixes the LUT contents on an FPGA. Reads are
// combinational, like a distributed LUT memory.
module coef_lut
  import vd_pkg::*;
#(
  parameter int unsigned N        = MR_N_DEFAULT,
  parameter bit          SUBTRACT = 1'b0
) (
  input  logic              clk,
  input  logic              we,
  input  logic signed [N:0] c_coef,
  input  logic signed [N:0] s_coef,
  input  logic [1:0]        addr0,
  input  logic [1:0]        addr1,
  output logic signed [N:0] data0,
  output logic signed [N:0] data1
);

  logic signed [N:0] mem [4];
  logic signed [N:0] s_signed;

  assign s_signed = SUBTRACT ? -s_coef : s_coef;

  always_ff @(posedge clk) begin
    if (we) begin
      mem[0] <= '0;
      mem[1] <= c_coef;
      mem[2] <= s_signed;
      mem[3] <= c_coef + s_signed;
    end
  end

  assign data0 = mem[addr0];
  assign data1 = mem[addr1];

endmodule
