// tb_torus_distance: compares the torus distance unit with an integer model
// of D = Ty - y - sqrt((R + sqrt(r^2 - (x-Tx)^2))^2 - z^2) (square roots
// rounded down, computed here by bisection on wide integers), for random
// points around a tool of R = 40000 and r = 10000 units, so that hits, misses
// in x and misses in z all occur. Also checks the tag and the latency of the
// three cases, and compares a few hits with the real-valued formula.
module tb_torus_distance;
  localparam int unsigned W = 35;
  localparam int unsigned TAG_W = 8;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic signed [W-1:0] tx = '0, ty = '0, big_r = '0, small_r = '0;
  logic                in_valid = 1'b0;
  logic                in_ready;
  logic signed [W-1:0] in_x = '0, in_y = '0, in_z = '0;
  logic [TAG_W-1:0]    in_tag = '0;
  logic                out_valid;
  logic signed [W+1:0] out_dist;
  logic                out_miss;
  logic [TAG_W-1:0]    out_tag;

  int checks = 0;
  int failures = 0;
  int n_hit = 0, n_missx = 0, n_missz = 0;

  torus_distance #(.W(W), .TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(10_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] sqrt_floor(input logic [127:0] v);
    logic [127:0] lo = 0, hi = 128'd1 << 64, mid;
    while (hi - lo > 1) begin
      mid = (lo + hi) >> 1;
      if (mid * mid <= v) lo = mid; else hi = mid;
    end
    return lo;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic run(input longint x, input longint y, input longint z, input int tag);
    logic signed [127:0] dx, t1, s, t2, d;
    int kind;   // 0 hit, 1 miss x, 2 miss z
    int lat, exp_lat;
    real rd, tol;
    dx = 128'(x) - 128'(tx);
    t1 = 128'(small_r) * 128'(small_r) - dx * dx;
    d = 0;
    if (t1 < 0) kind = 1;
    else begin
      s  = 128'(big_r) + 128'(sqrt_floor(t1));
      t2 = s * s - 128'(z) * 128'(z);
      if (t2 < 0) kind = 2;
      else begin
        kind = 0;
        d = 128'(ty) - 128'(y) - 128'(sqrt_floor(t2));
      end
    end
    @(negedge clk);
    chk(in_ready, "ready when idle");
    in_valid = 1'b1; in_x = W'(x); in_y = W'(y); in_z = W'(z); in_tag = TAG_W'(tag);
    @(negedge clk);
    in_valid = 1'b0;
    lat = 1;
    while (!out_valid && lat < 1000) begin
      @(negedge clk);
      lat++;
    end
    exp_lat = (kind == 0) ? 2 * int'(W) + 6 : (kind == 1) ? 3 : int'(W) + 5;
    chk(lat == exp_lat, $sformatf("latency %0d expected %0d (kind %0d)", lat, exp_lat, kind));
    chk(out_miss == (kind != 0), $sformatf("miss flag kind %0d", kind));
    chk(int'(out_tag) == (tag & 255), "tag");
    if (kind == 0) begin
      chk(128'(out_dist) == d, $sformatf("dist %0d expected %0d", out_dist, d));
      rd = real'(ty) - real'(y) - $sqrt((real'(big_r) + $sqrt(real'(small_r) ** 2 -
           (real'(x) - real'(tx)) ** 2)) ** 2 - real'(z) ** 2);
      // the inner root is rounded down by up to 1; the outer root magnifies
      // that by s / sqrt(s^2 - z^2)
      tol = 3.0 + 2.0 * real'(s) / ($sqrt(real'(t2)) + 1.0);
      chk((real'(out_dist) - rd) < tol && (rd - real'(out_dist)) < tol, $sformatf("real model %f vs %0d", rd, out_dist));
      n_hit++;
    end else if (kind == 1) n_missx++;
    else n_missz++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cfg = 0; cfg < 3; cfg++) begin
      tx = W'(longint'($urandom_range(0, 200000)) - 64'sd100000);
      ty = W'(longint'($urandom_range(0, 400000)));
      big_r = W'(64'sd40000);
      small_r = W'(64'sd10000 + longint'(cfg) * 64'sd5000);
      for (int t = 0; t < 60; t++)
        run(longint'(tx) + longint'($urandom_range(0, 36000)) - 64'sd18000,
            longint'($urandom_range(0, 200000)) - 64'sd100000,
            longint'($urandom_range(0, 140000)) - 64'sd70000, t);
    end
    // large coordinates near the top of the range
    tx = W'(64'sd10_000_000_000); ty = W'(64'sd16_000_000_000);
    big_r = W'(64'sd4_000_000_000); small_r = W'(64'sd1_000_000_000);
    for (int t = 0; t < 20; t++)
      run(64'sd10_000_000_000 + longint'($urandom_range(0, 1_000_000_000)) - 64'sd500_000_000,
          -64'sd1_000_000_000, longint'($urandom_range(0, 2_000_000_000)) - 64'sd1_000_000_000, t);
    chk(n_hit > 0 && n_missx > 0 && n_missz > 0, "all three cases seen");
    $display("hits %0d, misses in x %0d, misses in z %0d", n_hit, n_missx, n_missz);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
