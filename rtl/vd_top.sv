// vd_top: accelerator for the inner loops of virtual digitising on a
// turning lathe.
//
// Virtual digitising finds the tool centre for one tool position by
// "touching" the digitised surface: every surface point is rotated about the
// lathe axis (X) through a whole round in equal steps, the distance from each
// rotated point to the torus tool along the attack axis (Y) is computed, and
// the smallest distance wins. This top chains the three tasks of that inner
// loop:
//   task 1  point rotation      multi_rotator (SDA Multi-Rotator)
//   task 2  distance to torus   torus_distance
//   task 3  comparison/assign   min_select
// The Multi-Rotator rotates in its own (a, b) plane; here a = y and b = z, so
// it produces y' = y*cos - z*sin, z' = z*cos + y*sin for angles dtheta,
// 2*dtheta, ..., num_rot*dtheta. x is unchanged and travels beside it.
//
// A second configuration serves machines whose motion is not a rotation about
// one axis: with cfg_mode = 1 each point is instead transformed once by a
// general 4x4 matrix (point_transform; 3x3 part cfg_m and translation row
// cfg_t) and goes to the distance unit as rotation number 0. The mode stands
// for loading another configuration into the transformation device; it is
// written with the other configuration and must not change during a pass.
//
// Use: the host (which also chooses the tool, the step and the configuration)
// writes the rotation step constants and rotations per round with cfg_we
// while the unit is idle, sets the tool position and radii on tx, ty, big_r,
// small_r, pulses pass_start for a new tool translation position, and then
// streams the surface points with pt_valid/pt_ready, marking the last with
// pt_last. When the last rotation of the last point has been compared,
// res_valid pulses for one cycle with the minimum distance (res_found = 0 if
// no point could be touched), the index of the winning point (counted from 0
// since pass_start) and its rotation number. Computing the tool centre from
// these, and stepping the tool, is left to the host.
//
// Timing: the Multi-Rotator delivers a rotation every N+1 cycles; the
// distance unit needs about 2*(N+3)+7 cycles per rotated point, so the
// Multi-Rotator stalls (mr_stall) while it waits. A new point is accepted only
// when the Multi-Rotator is idle and its last result has been taken, so that
// the latched x and point index always belong to the rotation in flight.
// Coordinates are N-bit integers; rotated values and the tool parameters are
// N+3 bits wide.
module vd_top
  import vd_pkg::*;
#(
  parameter int unsigned N     = MR_N_DEFAULT,
  parameter int unsigned ROT_W = ROT_W_DEFAULT,
  parameter int unsigned PT_W  = PT_W_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // Multi-Rotator configuration
  input  logic                 cfg_we,
  input  logic signed [N:0]    cfg_cos,
  input  logic signed [N:0]    cfg_sin,
  input  logic [ROT_W-1:0]     cfg_num_rot,
  // general transformation configuration
  input  logic                 cfg_mode,      // 0: Multi-Rotator, 1: matrix
  input  logic signed [N:0]    cfg_m [3][3],  // 3x3 part, N-1 fraction bits
  input  logic signed [N+2:0]  cfg_t [3],     // translation row
  // tool
  input  logic signed [N+2:0]  tx,
  input  logic signed [N+2:0]  ty,
  input  logic signed [N+2:0]  big_r,
  input  logic signed [N+2:0]  small_r,
  // pass control and surface point stream
  input  logic                 pass_start,
  input  logic                 pt_valid,
  output logic                 pt_ready,
  input  logic signed [N-1:0]  pt_x,
  input  logic signed [N-1:0]  pt_y,
  input  logic signed [N-1:0]  pt_z,
  input  logic                 pt_last,
  // result of the pass
  output logic                 res_valid,
  output logic                 res_found,
  output logic signed [N+4:0]  res_dist,
  output logic [PT_W-1:0]      res_point,
  output logic [ROT_W-1:0]     res_rot,
  // status
  output logic                 mr_stall,
  output logic                 min_updated
);

  localparam int unsigned W     = N + 3;
  localparam int unsigned TAG_W = 1 + PT_W + ROT_W;

  typedef struct packed {
    logic             last;
    logic [PT_W-1:0]  point;
    logic [ROT_W-1:0] rot;
  } tag_t;

  logic                 mr_in_ready;
  logic                 mr_out_valid, mr_out_ready, mr_out_last;
  logic signed [W-1:0]  mr_out_a, mr_out_b;
  logic [ROT_W-1:0]     mr_out_idx;
  logic                 pt_fire;

  logic signed [W-1:0]  cur_x;
  logic [PT_W-1:0]      cur_point;
  logic                 cur_last;
  logic [PT_W-1:0]      point_cnt;

  tag_t                 td_in_tag, td_out_tag;
  logic [PT_W+ROT_W-1:0] min_tag;   // {point, rotation} of the minimum
  logic                 td_out_valid, td_out_miss;
  logic signed [W+1:0]  td_out_dist;

  logic                 mode_xf;
  logic signed [N:0]    xf_m [3][3];
  logic signed [W-1:0]  xf_t [3];
  logic                 xf_in_ready, xf_out_valid, xf_out_ready;
  logic signed [N-1:0]  xf_in_p [3];
  logic signed [W-1:0]  xf_out_p [3];
  tag_t                 xf_in_tag, xf_out_tag;
  logic                 mr_out_ready_i;

  assign pt_ready = mode_xf ? xf_in_ready : (mr_in_ready && !mr_out_valid);
  assign pt_fire  = pt_valid && pt_ready;

  // configuration registers of the general transformation
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_xf <= 1'b0;
      for (int i = 0; i < 3; i++) begin
        xf_t[i] <= '0;
        for (int j = 0; j < 3; j++) xf_m[i][j] <= '0;
      end
    end else if (cfg_we) begin
      mode_xf <= cfg_mode;
      xf_m    <= cfg_m;
      xf_t    <= cfg_t;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_x     <= '0;
      cur_point <= '0;
      cur_last  <= 1'b0;
      point_cnt <= '0;
    end else if (pass_start) begin
      point_cnt <= '0;
    end else if (pt_fire) begin
      cur_x     <= W'(pt_x);
      cur_point <= point_cnt;
      cur_last  <= pt_last;
      point_cnt <= point_cnt + 1'b1;
    end
  end

  // task 1: rotation about X, (a, b) = (y, z)
  multi_rotator #(.N(N), .ROT_W(ROT_W)) u_mr (
    .clk, .rst_n,
    .cfg_we, .cfg_cos, .cfg_sin, .cfg_num_rot,
    .in_valid(pt_fire && !mode_xf), .in_ready(mr_in_ready), .in_x(pt_y), .in_y(pt_z),
    .out_valid(mr_out_valid), .out_ready(mr_out_ready_i),
    .out_x(mr_out_a), .out_y(mr_out_b), .out_idx(mr_out_idx), .out_last(mr_out_last),
    .stall(mr_stall));

  // task 1, general configuration: one matrix transform per point
  assign xf_in_p   = '{pt_x, pt_y, pt_z};
  assign xf_in_tag = '{last: pt_last, point: point_cnt, rot: '0};

  point_transform #(.N(N), .TAG_W(TAG_W)) u_xf (
    .clk, .rst_n, .m(xf_m), .t(xf_t),
    .in_valid(pt_valid && mode_xf), .in_ready(xf_in_ready), .in_p(xf_in_p), .in_tag(xf_in_tag),
    .out_valid(xf_out_valid), .out_ready(xf_out_ready), .out_p(xf_out_p), .out_tag(xf_out_tag));

  // the distance unit takes its points from the transformation in use
  logic                td_in_valid;
  logic signed [W-1:0] td_x, td_y, td_z;

  always_comb begin
    if (mode_xf) begin
      td_in_valid = xf_out_valid;
      td_x        = xf_out_p[0];
      td_y        = xf_out_p[1];
      td_z        = xf_out_p[2];
      td_in_tag   = xf_out_tag;
    end else begin
      td_in_valid = mr_out_valid;
      td_x        = cur_x;
      td_y        = mr_out_a;
      td_z        = mr_out_b;
      td_in_tag   = '{last: cur_last && mr_out_last, point: cur_point, rot: mr_out_idx};
    end
  end

  assign mr_out_ready_i = mr_out_ready && !mode_xf;
  assign xf_out_ready   = mr_out_ready && mode_xf;

  // task 2: distance to the torus along Y
  torus_distance #(.W(W), .TAG_W(TAG_W)) u_dist (
    .clk, .rst_n,
    .tx, .ty, .big_r, .small_r,
    .in_valid(td_in_valid), .in_ready(mr_out_ready),
    .in_x(td_x), .in_y(td_y), .in_z(td_z), .in_tag(td_in_tag),
    .out_valid(td_out_valid), .out_dist(td_out_dist), .out_miss(td_out_miss),
    .out_tag(td_out_tag));

  // task 3: keep the minimum
  min_select #(.DW(W + 2), .TAG_W(PT_W + ROT_W)) u_min (
    .clk, .rst_n, .clr(pass_start),
    .in_valid(td_out_valid), .in_dist(td_out_dist), .in_miss(td_out_miss),
    .in_tag({td_out_tag.point, td_out_tag.rot}),
    .found(res_found), .min_dist(res_dist), .min_tag(min_tag), .updated(min_updated));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) res_valid <= 1'b0;
    else        res_valid <= td_out_valid && td_out_tag.last && !pass_start;
  end

  a_cfg_idle: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_we |-> mr_in_ready && !mr_out_valid && !xf_out_valid);

  assign res_point = min_tag[PT_W+ROT_W-1:ROT_W];
  assign res_rot   = min_tag[ROT_W-1:0];

endmodule
