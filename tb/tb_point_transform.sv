// tb_point_transform: streams random points through random matrices
// (rotations about random axes built from angles, and matrices with random
// entries) with random back-pressure, and compares every output with the
// product (x, y, z, 1) * TR worked out with wide integers, rounded down.
// Also checks the one-cycle latency and
// that tags stay with their points.
module tb_point_transform;
  localparam int unsigned N = 32;
  localparam int unsigned TAG_W = 8;
  localparam real PI = 3.14159265358979323846;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic signed [N:0]   m [3][3];
  logic signed [N+2:0] t [3];
  logic                in_valid = 1'b0, in_ready;
  logic signed [N-1:0] in_p [3];
  logic [TAG_W-1:0]    in_tag = '0;
  logic                out_valid, out_ready = 1'b1;
  logic signed [N+2:0] out_p [3];
  logic [TAG_W-1:0]    out_tag;

  int checks = 0;
  int failures = 0;
  longint exp_q [$];
  int     tag_q [$];

  point_transform #(.N(N), .TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(5_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint fx(input real v);
    return longint'(v * (2.0 ** (N - 1)));
  endfunction

  task automatic set_rotation(input real ax, input real ay, input real az);
    real r [3][3];
    real cx, sx, cy, sy, cz, sz;
    cx = $cos(ax); sx = $sin(ax); cy = $cos(ay); sy = $sin(ay); cz = $cos(az); sz = $sin(az);
    // row-vector convention: p' = p * R, R = Rx * Ry * Rz
    r[0][0] = cy * cz;                 r[0][1] = cy * sz;                 r[0][2] = -sy;
    r[1][0] = sx * sy * cz - cx * sz;  r[1][1] = sx * sy * sz + cx * cz;  r[1][2] = sx * cy;
    r[2][0] = cx * sy * cz + sx * sz;  r[2][1] = cx * sy * sz - sx * cz;  r[2][2] = cx * cy;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) m[i][j] = (N+1)'(fx(r[i][j]));
  endtask

  // expected output j for point p
  function automatic longint expect_out(input longint p [3], input int j);
    logic signed [127:0] acc;
    acc = 0;
    for (int i = 0; i < 3; i++) acc += 128'(p[i]) * 128'(m[i][j]);
    return longint'(acc >>> (N - 1)) + longint'(t[j]);
  endfunction

  task automatic stream(input int count, input bit pressure);
    longint p [3];
    int sent = 0, got = 0;
    bit taken = 0;
    while (got < count) begin
      @(negedge clk);
      // the point offered in the last cycle has gone in at the rising edge
      if (taken) in_valid = 1'b0;
      // the output side: a transfer happens at the next edge if valid and ready
      out_ready = pressure ? ($urandom_range(0, 2) != 0) : 1'b1;
      #1;
      if (out_valid && out_ready) begin
        for (int j = 0; j < 3; j++) begin
          checks++;
          if (longint'(out_p[j]) != exp_q[0]) begin
            failures++;
            if (failures < 10) $display("FAIL out %0d: %0d expected %0d", j, out_p[j], exp_q[0]);
          end
          void'(exp_q.pop_front());
        end
        checks++;
        if (int'(out_tag) != tag_q[0]) begin
          failures++;
          $display("FAIL tag %0d expected %0d", out_tag, tag_q[0]);
        end
        void'(tag_q.pop_front());
        got++;
      end
      // the input side: offer a new point when none is pending
      if (!in_valid && sent < count && $urandom_range(0, 3) != 0) begin
        for (int i = 0; i < 3; i++) begin
          p[i] = longint'($signed($urandom())) / 2;
          in_p[i] = N'(p[i]);
        end
        for (int j = 0; j < 3; j++) exp_q.push_back(expect_out(p, j));
        tag_q.push_back(sent & 255);
        in_tag = TAG_W'(sent);
        in_valid = 1'b1;
        sent++;
      end
      #1;
      taken = in_valid && in_ready;
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    real rx, ry, rz;
    for (int i = 0; i < 3; i++) begin
      in_p[i] = '0;
      t[i] = '0;
      for (int j = 0; j < 3; j++) m[i][j] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // latency: a point taken at one edge is in the output register after it
    set_rotation(0.0, 0.0, 0.0);
    t[0] = 35'sd5; t[1] = -35'sd7; t[2] = 35'sd11;
    @(negedge clk);
    in_valid = 1'b1; in_p[0] = 32'sd1000; in_p[1] = 32'sd2000; in_p[2] = -32'sd3000;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!(out_valid && out_p[0] == 35'sd1005 && out_p[1] == 35'sd1993 && out_p[2] == -35'sd2989)) begin
      failures++;
      $display("FAIL identity/translation after one cycle");
    end
    @(negedge clk);
    for (int k = 0; k < 10; k++) begin
      rx = $urandom_range(0, 3600) * PI / 1800.0;
      ry = $urandom_range(0, 3600) * PI / 1800.0;
      rz = $urandom_range(0, 3600) * PI / 1800.0;
      set_rotation(rx, ry, rz);
      for (int j = 0; j < 3; j++) t[j] = (N+3)'(longint'($signed($urandom())));
      stream(40, k[0]);
    end
    for (int k = 0; k < 5; k++) begin
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          m[i][j] = (N+1)'(longint'($urandom_range(0, 32'hffff_ffff)) - 64'sd2147483648);
      stream(40, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
