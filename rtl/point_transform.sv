// point_transform: general point transformation p' = p * TR for a 4x4
// homogeneous transformation matrix.
//
// In the general virtual digitising loop every surface point is transformed
// by the matrix of the current trajectory position so that the surface faces
// the tool: the row vector (x, y, z, 1) is post-multiplied by the 4x4
// matrix. For the rigid and affine transforms used to place a surface the
// last column is (0, 0, 0, 1), so the unit evaluates
//   x' = x*m[0][0] + y*m[1][0] + z*m[2][0] + t[0]
//   y' = x*m[0][1] + y*m[1][1] + z*m[2][1] + t[1]
//   z' = x*m[0][2] + y*m[1][2] + z*m[2][2] + t[2]
// with the 3x3 part m as signed fixed point with N-1 fraction bits in N+1 bits
// (the format of the Multi-Rotator coefficients, range [-2, 2)) and the
// translation row t as integers in coordinate units, N+3 bits. The sum of
// the three products is rounded down to coordinate units before t is added.
// Results are N+3 bits; the matrix must not map a point outside that range.
//
// This unit is the configuration of the transformation task for machines
// whose motion is not a plain rotation about one axis; for the lathe the
// Multi-Rotator does this job far more cheaply. The row-vector times matrix
// product is the function of the task; the fully parallel datapath (nine
// multipliers, one register stage), the restriction to affine matrices and
// the number formats are this design's choices.
//
// Timing: one point per cycle. A point is taken when in_valid and in_ready
// are high and appears in the output register in the next cycle with its
// tag; the output holds while out_valid is high and out_ready low.
module point_transform
  import vd_pkg::*;
#(
  parameter int unsigned N     = MR_N_DEFAULT,
  parameter int unsigned TAG_W = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // transformation: 3x3 part and translation row
  input  logic signed [N:0]    m [3][3],
  input  logic signed [N+2:0]  t [3],
  // point input
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [N-1:0]  in_p [3],
  input  logic [TAG_W-1:0]     in_tag,
  // transformed point
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [N+2:0]  out_p [3],
  output logic [TAG_W-1:0]     out_tag
);

  localparam int unsigned PW = 2 * N + 4;   // three N x (N+1) products summed

  logic signed [N+2:0] res [3];

  always_comb begin
    for (int j = 0; j < 3; j++) begin
      logic signed [PW-1:0] acc;
      acc = '0;
      for (int i = 0; i < 3; i++) begin
        acc = acc + PW'(in_p[i]) * PW'(m[i][j]);
      end
      res[j] = (N+3)'(acc >>> (N - 1)) + t[j];
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      for (int j = 0; j < 3; j++) out_p[j] <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_tag <= in_tag;
        for (int j = 0; j < 3; j++) out_p[j] <= res[j];
      end
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_tag));

endmodule
