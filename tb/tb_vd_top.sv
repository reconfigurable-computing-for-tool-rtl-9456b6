// tb_vd_top: end-to-end test of the virtual digitising accelerator at its
// default sizes (n = 32). Each pass configures the rotation step, places the
// tool, streams a grid of surface points and compares the reported minimum
// distance, winning point and rotation with the reference model in
// vd_ref_pkg. Passes cover 4 and 5 degree steps (a change of configuration
// between passes), a large torus that touches many points (misses in x
// only), a small torus that also misses in z, and a tool placed away from
// the part (no contact at all). A further pass switches to the general
// matrix configuration (a tilt about X and a shift) and back again. The
// testbench counts how often each
// mechanism happened (Multi-Rotator stalls behind the slower distance unit,
// misses in x and z, minimum updates, configuration changes, empty passes,
// switches between the two transformations)
// and fails if any never did. It also checks that every rotation reached the
// distance unit and, on the first pass, the cycle count of the pass.
module tb_vd_top;
  import vd_ref_pkg::*;

  localparam int unsigned ROT_W = 16;
  localparam int unsigned PT_W  = 16;
  localparam int unsigned W     = N + 3;

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
  longint cyc = 0;
  longint n_stall = 0, n_update = 0, n_dist = 0;
  int n_missx = 0, n_missz = 0, n_hit = 0, n_cfg = 0, n_empty = 0, n_mode = 0;

  vd_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (mr_stall) n_stall <= n_stall + 1;
    if (min_updated) n_update <= n_update + 1;
    if (dut.u_dist.out_valid) n_dist <= n_dist + 1;
  end

  initial begin
    #(200_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic run_pass(input real deg, input int nrot, input tool_t t, input int nu,
                          input int nv, input bit check_cycles);
    longint ci, si, x, y, z, a, b, d, best;
    bit miss, found;
    int best_pt, best_rot, np;
    longint d0, t0, est;
    mr_state_t s;

    ci = coef($cos(deg * PI / 180.0));
    si = coef($sin(deg * PI / 180.0));
    np = nu * nv;
    // reference
    found = 0; best = 0; best_pt = 0; best_rot = 0; est = 0;
    for (int p = 0; p < np; p++) begin
      surface_point(p / nv, p % nv, nv, x, y, z);
      s = mr_init(y, z);
      for (int r = 1; r <= nrot; r++) begin
        mr_step(s, ci, si, a, b);
        d = torus_dist(t, x, a, b, miss);
        // a rotation takes the longer of the Multi-Rotator step (N+1) and
        // the distance unit's work plus its idle cycle
        if (miss) begin
          if (128'(x) - 128'(t.tx) > 128'(t.small_r) || 128'(t.tx) - 128'(x) > 128'(t.small_r)) begin
            n_missx++;
            est += longint'(N) + 1;
          end else begin
            n_missz++;
            est += longint'(W) + 6;
          end
        end else begin
          n_hit++;
          est += 2 * longint'(W) + 7;
          if (!found || d < best) begin
            found = 1; best = d; best_pt = p; best_rot = r;
          end
        end
      end
    end
    // hardware
    @(negedge clk);
    if (cfg_num_rot != ROT_W'(nrot)) n_cfg++;
    if (cfg_mode) n_mode++;
    cfg_we = 1'b1; cfg_mode = 1'b0; cfg_cos = (N+1)'(ci); cfg_sin = (N+1)'(si); cfg_num_rot = ROT_W'(nrot);
    tx = W'(t.tx); ty = W'(t.ty); big_r = W'(t.big_r); small_r = W'(t.small_r);
    pass_start = 1'b1;
    @(negedge clk);
    cfg_we = 1'b0; pass_start = 1'b0;
    d0 = n_dist;
    t0 = cyc;
    for (int p = 0; p < np; p++) begin
      surface_point(p / nv, p % nv, nv, x, y, z);
      pt_valid = 1'b1; pt_x = N'(x); pt_y = N'(y); pt_z = N'(z); pt_last = (p == np - 1);
      while (!pt_ready) @(negedge clk);
      @(negedge clk);
      pt_valid = 1'b0; pt_last = 1'b0;
    end
    while (!res_valid) @(negedge clk);
    chk(res_found == found, $sformatf("found %0d expected %0d", res_found, found));
    if (found)
      chk(longint'(res_dist) == best && int'(res_point) == best_pt && int'(res_rot) == best_rot,
          $sformatf("min %0d at point %0d rot %0d, expected %0d at %0d rot %0d",
                    res_dist, res_point, res_rot, best, best_pt, best_rot));
    else n_empty++;
    chk(n_dist - d0 == longint'(np * nrot),
        $sformatf("distance results %0d expected %0d", n_dist - d0, np * nrot));
    if (check_cycles) begin
      // the hand-over between points and the start of the pass make the
      // count differ slightly from the per-rotation estimate
      chk((cyc - t0) * 100 >= est * 98 && (cyc - t0) * 100 <= est * 102,
          $sformatf("pass cycles %0d, estimate %0d", cyc - t0, est));
      $display("pass cycles %0d, estimate %0d", cyc - t0, est);
    end
    $display("pass %0.1f deg x %0d rotations, %0d points: found %0d dist %0d point %0d rot %0d",
             deg, nrot, np, res_found, res_dist, res_point, res_rot);
  endtask

  // one pass with the general transformation: each point is tilted by deg
  // about X and shifted by (sx, sy, sz), then measured once (rotation 0)
  task automatic run_xf_pass(input real deg, input longint sx, input longint sy,
                             input longint sz, input tool_t t, input int nu, input int nv);
    longint m [3][3];
    longint sh [3];
    longint p [3];
    longint q [3];
    longint d, best;
    logic signed [127:0] acc;
    bit miss, found;
    int best_pt, np;
    longint d0;

    m = '{'{coef(1.0), 0, 0},
          '{0, coef($cos(deg * PI / 180.0)), coef($sin(deg * PI / 180.0))},
          '{0, -coef($sin(deg * PI / 180.0)), coef($cos(deg * PI / 180.0))}};
    sh = '{sx, sy, sz};
    np = nu * nv;
    found = 0; best = 0; best_pt = 0;
    for (int i = 0; i < np; i++) begin
      surface_point(i / nv, i % nv, nv, p[0], p[1], p[2]);
      for (int j = 0; j < 3; j++) begin
        acc = 0;
        for (int k = 0; k < 3; k++) acc += 128'(p[k]) * 128'(m[k][j]);
        q[j] = longint'(acc >>> (N - 1)) + sh[j];
      end
      d = torus_dist(t, q[0], q[1], q[2], miss);
      if (miss) begin
        if (128'(q[0]) - 128'(t.tx) > 128'(t.small_r) || 128'(t.tx) - 128'(q[0]) > 128'(t.small_r))
          n_missx++;
        else n_missz++;
      end else begin
        n_hit++;
        if (!found || d < best) begin
          found = 1; best = d; best_pt = i;
        end
      end
    end
    @(negedge clk);
    if (!cfg_mode) n_mode++;
    cfg_we = 1'b1; cfg_mode = 1'b1;
    for (int j = 0; j < 3; j++) begin
      cfg_t[j] = W'(sh[j]);
      for (int k = 0; k < 3; k++) cfg_m[j][k] = (N+1)'(m[j][k]);
    end
    tx = W'(t.tx); ty = W'(t.ty); big_r = W'(t.big_r); small_r = W'(t.small_r);
    pass_start = 1'b1;
    @(negedge clk);
    cfg_we = 1'b0; pass_start = 1'b0;
    d0 = n_dist;
    for (int i = 0; i < np; i++) begin
      surface_point(i / nv, i % nv, nv, p[0], p[1], p[2]);
      pt_valid = 1'b1; pt_x = N'(p[0]); pt_y = N'(p[1]); pt_z = N'(p[2]); pt_last = (i == np - 1);
      while (!pt_ready) @(negedge clk);
      @(negedge clk);
      pt_valid = 1'b0; pt_last = 1'b0;
    end
    while (!res_valid) @(negedge clk);
    chk(res_found == found, $sformatf("matrix pass found %0d expected %0d", res_found, found));
    if (found)
      chk(longint'(res_dist) == best && int'(res_point) == best_pt && res_rot == '0,
          $sformatf("matrix pass min %0d at point %0d rot %0d, expected %0d at %0d rot 0",
                    res_dist, res_point, res_rot, best, best_pt));
    chk(n_dist - d0 == longint'(np),
        $sformatf("matrix pass distance results %0d expected %0d", n_dist - d0, np));
    $display("matrix pass %0.1f deg, %0d points: found %0d dist %0d point %0d",
             deg, np, res_found, res_dist, res_point);
  endtask

  initial begin
    tool_t t;
    for (int j = 0; j < 3; j++) begin
      cfg_t[j] = '0;
      for (int k = 0; k < 3; k++) cfg_m[j][k] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    t.tx = 20000; t.ty = 100000; t.big_r = 40000; t.small_r = 10000;
    run_pass(4.0, 90, t, 16, 6, 1'b1);
    t.tx = 12000; t.ty = 60000; t.big_r = 2000; t.small_r = 3000;
    run_pass(5.0, 72, t, 10, 8, 1'b1);
    t.tx = 20000; t.ty = 100000; t.big_r = 40000; t.small_r = 10000;
    run_xf_pass(12.0, 1500, -3000, 2500, t, 16, 6);
    t.tx = 10_000_000;
    run_pass(5.0, 72, t, 3, 4, 1'b0);
    chk(n_stall > 0, "Multi-Rotator stalled");
    chk(n_missx > 0, "miss in x");
    chk(n_missz > 0, "miss in z");
    chk(n_hit > 0, "contacts");
    chk(n_update > 1, "minimum updated");
    chk(n_cfg > 1, "configuration changed");
    chk(n_empty > 0, "pass without contact");
    chk(n_mode > 1, "switch between transformations");
    $display("stall cycles %0d, misses x %0d z %0d, hits %0d, updates %0d, configs %0d, empty %0d, mode switches %0d",
             n_stall, n_missx, n_missz, n_hit, n_update, n_cfg, n_empty, n_mode);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
