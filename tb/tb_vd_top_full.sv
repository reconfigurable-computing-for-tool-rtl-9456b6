// tb_vd_top_full: one complete operation of the accelerator at its default
// sizes: a single tool translation position over a whole digitised surface
// of 130 x 120 points (2 mm grid), each point rotated through a whole round
// in 4 degree steps (90 rotations per round), 1 404 000 rotations in all.
// The reported minimum distance, winning point and rotation are compared with
// the reference model in vd_ref_pkg, and the number of distance results is
// checked against points x rotations.
module tb_vd_top_full;
  import vd_ref_pkg::*;

  localparam int unsigned ROT_W = 16;
  localparam int unsigned PT_W  = 16;
  localparam int unsigned W     = N + 3;
  localparam int NU = 130;
  localparam int NV = 120;
  localparam int NROT = 90;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                cfg_we = 1'b0;
  logic signed [N:0]   cfg_cos = '0, cfg_sin = '0;
  logic [ROT_W-1:0]    cfg_num_rot = '0;
  logic                cfg_mode = 1'b0;
  logic signed [N:0]   cfg_m [3][3];
  logic signed [W-1:0] cfg_t [3];
  logic signed [W-1:0] tx = '0, ty = '0, big_r = '0, small_r = '0;
  logic                pass_start = 1'b0;
  logic                pt_valid = 1'b0;
  logic                pt_ready;
  logic signed [N-1:0] pt_x = '0, pt_y = '0, pt_z = '0;
  logic                pt_last = 1'b0;
  logic                res_valid, res_found;
  logic signed [W+1:0] res_dist;
  logic [PT_W-1:0]     res_point;
  logic [ROT_W-1:0]    res_rot;
  logic                mr_stall, min_updated;

  int checks = 0;
  int failures = 0;
  longint n_dist = 0, n_stall = 0;

  vd_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (dut.u_dist.out_valid) n_dist <= n_dist + 1;
    if (mr_stall) n_stall <= n_stall + 1;
  end

  initial begin
    #(64'd2_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    tool_t t;
    longint ci, si, x, y, z, a, b, d, best;
    bit miss, found;
    int best_pt, best_rot;
    mr_state_t s;

    t.tx = 130000; t.ty = 100000; t.big_r = 40000; t.small_r = 10000;
    ci = coef($cos(4.0 * PI / 180.0));
    si = coef($sin(4.0 * PI / 180.0));
    found = 0; best = 0; best_pt = 0; best_rot = 0;
    for (int p = 0; p < NU * NV; p++) begin
      surface_point(p / NV, p % NV, NV, x, y, z);
      s = mr_init(y, z);
      for (int r = 1; r <= NROT; r++) begin
        mr_step(s, ci, si, a, b);
        d = torus_dist(t, x, a, b, miss);
        if (!miss && (!found || d < best)) begin
          found = 1; best = d; best_pt = p; best_rot = r;
        end
      end
    end

    for (int j = 0; j < 3; j++) begin
      cfg_t[j] = '0;
      for (int k = 0; k < 3; k++) cfg_m[j][k] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    cfg_we = 1'b1; cfg_cos = (N+1)'(ci); cfg_sin = (N+1)'(si); cfg_num_rot = ROT_W'(NROT);
    tx = W'(t.tx); ty = W'(t.ty); big_r = W'(t.big_r); small_r = W'(t.small_r);
    pass_start = 1'b1;
    @(negedge clk);
    cfg_we = 1'b0; pass_start = 1'b0;
    for (int p = 0; p < NU * NV; p++) begin
      surface_point(p / NV, p % NV, NV, x, y, z);
      pt_valid = 1'b1; pt_x = N'(x); pt_y = N'(y); pt_z = N'(z); pt_last = (p == NU * NV - 1);
      while (!pt_ready) @(negedge clk);
      @(negedge clk);
      pt_valid = 1'b0; pt_last = 1'b0;
    end
    while (!res_valid) @(negedge clk);
    chk(found && res_found, "contact found");
    chk(longint'(res_dist) == best && int'(res_point) == best_pt && int'(res_rot) == best_rot,
        $sformatf("min %0d at point %0d rot %0d, expected %0d at %0d rot %0d",
                  res_dist, res_point, res_rot, best, best_pt, best_rot));
    chk(n_dist == longint'(NU * NV * NROT), $sformatf("distance results %0d", n_dist));
    chk(n_stall > 0, "Multi-Rotator stalls behind the distance unit");
    $display("min %0d at point %0d rotation %0d, %0d stall cycles", res_dist, res_point,
             res_rot, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
