// tb_multi_rotator: self-checking test of the SDA Multi-Rotator at n = 32.
//
// Every result is compared with a bit-exact model written directly from the
// angle addition equations (wide integer products, floor division by 2^(n-1),
// saturation of the stored products), and with the true rotation computed in
// floating point, allowing an error that grows with the rotation number. It
// also checks the rotation number, the last flag, that with out_ready held
// high a new rotation appears every n+1 cycles, and that with random
// back-pressure the unit stalls and holds its result. Workloads: 4 degree
// steps (90 rotations per round) and 0.5 degree steps (720 per round, a whole
// round of one point), plus a 5 degree and a 2.5 degree step.
module tb_multi_rotator;
  localparam int unsigned N     = 32;
  localparam int unsigned ROT_W = 16;
  localparam real PI = 3.14159265358979323846;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                cfg_we = 1'b0;
  logic signed [N:0]   cfg_cos = '0, cfg_sin = '0;
  logic [ROT_W-1:0]    cfg_num_rot = '0;
  logic                in_valid = 1'b0;
  logic                in_ready;
  logic signed [N-1:0] in_x = '0, in_y = '0;
  logic                out_valid;
  logic                out_ready = 1'b1;
  logic signed [N+2:0] out_x, out_y;
  logic [ROT_W-1:0]    out_idx;
  logic                out_last;
  logic                stall;

  int checks = 0;
  int failures = 0;
  int stalls = 0;
  longint cyc = 0;
  real max_rel_err = 0.0;

  multi_rotator #(.N(N), .ROT_W(ROT_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (stall) stalls <= stalls + 1;
  end

  initial begin
    #(20_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat_n(input logic signed [127:0] v);
    longint lim = (64'sd1 <<< (N - 1));
    if (v > 128'(lim - 1)) return lim - 1;
    if (v < -128'(lim))    return -lim;
    return longint'(v);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Run one point through num_rot rotations of step deg degrees.
  task automatic run_point(input real deg, input int nrot, input longint x0, input longint y0,
                           input bit backpressure);
    longint ci, si;
    longint xc, xs, yc, ys;
    logic signed [127:0] pxc, pxs, pyc, pys, ex, ey;
    longint t_prev;
    int got;
    real th, rx, ry, err, mag;

    ci = longint'($cos(deg * PI / 180.0) * (2.0 ** (N - 1)));
    si = longint'($sin(deg * PI / 180.0) * (2.0 ** (N - 1)));
    @(negedge clk);
    cfg_we = 1'b1; cfg_cos = (N+1)'(ci); cfg_sin = (N+1)'(si); cfg_num_rot = ROT_W'(nrot);
    @(negedge clk);
    cfg_we = 1'b0;
    check(in_ready, "idle before point");
    in_valid = 1'b1; in_x = N'(x0); in_y = N'(y0);
    @(negedge clk);
    in_valid = 1'b0;
    check(!in_ready, "busy after point");
    xc = x0; xs = 0; yc = y0; ys = 0;
    got = 0;
    t_prev = -1;
    while (got < nrot) begin
      // decide out_ready at the falling edge; a transfer happens at the
      // next rising edge when out_valid is also high
      @(negedge clk);
      if (backpressure) out_ready = ($urandom_range(0, 49) == 0);
      if (out_valid && out_ready) begin
        got++;
        pxc = ((128'(xc) * 128'(ci)) - (128'(xs) * 128'(si))) >>> (N - 1);
        pys = ((128'(ys) * 128'(ci)) + (128'(yc) * 128'(si))) >>> (N - 1);
        pyc = ((128'(yc) * 128'(ci)) - (128'(ys) * 128'(si))) >>> (N - 1);
        pxs = ((128'(xs) * 128'(ci)) + (128'(xc) * 128'(si))) >>> (N - 1);
        ex = pxc - pys;
        ey = pyc + pxs;
        check(128'(out_x) == ex && 128'(out_y) == ey,
              $sformatf("deg %f rot %0d: got (%0d,%0d) expected (%0d,%0d)", deg, got,
                        out_x, out_y, ex, ey));
        check(int'(out_idx) == got, $sformatf("rotation number %0d vs %0d", out_idx, got));
        check(out_last == (got == nrot), "last flag");
        th = deg * got * PI / 180.0;
        rx = real'(x0) * $cos(th) - real'(y0) * $sin(th);
        ry = real'(y0) * $cos(th) + real'(x0) * $sin(th);
        err = $sqrt((real'(out_x) - rx) ** 2 + (real'(out_y) - ry) ** 2);
        mag = $sqrt(real'(x0) ** 2 + real'(y0) ** 2);
        check(err <= 4.0 * got + 8.0, $sformatf("precision rot %0d err %f", got, err));
        if (mag > 0.0 && err / mag > max_rel_err) max_rel_err = err / mag;
        if (!backpressure && t_prev >= 0)
          check(cyc - t_prev == longint'(N) + 1, $sformatf("interval %0d", cyc - t_prev));
        t_prev = cyc;
        xc = sat_n(pxc); xs = sat_n(pxs); yc = sat_n(pyc); ys = sat_n(pys);
      end
    end
    @(negedge clk);
    out_ready = 1'b1;
    check(in_ready && !out_valid, "idle after last rotation");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // first result N+2 cycles after the point is taken (N MAC + final + load)
    run_point(4.0, 90, 64'sd1_000_000_000, -64'sd300_000_000, 1'b0);
    run_point(0.5, 720, 64'sd123_456_789, 64'sd987_654_321, 1'b0);
    run_point(5.0, 72, -64'sd2_000_000_000, 64'sd5_000, 1'b0);
    run_point(2.5, 144, -64'sd700_000_001, -64'sd1_500_000_000, 1'b1);
    for (int k = 0; k < 4; k++)
      run_point(4.0, 12, longint'($urandom_range(0, 2_000_000_000)) - 64'sd1_000_000_000,
                longint'($urandom_range(0, 2_000_000_000)) - 64'sd1_000_000_000, 1'b1);
    check(stalls > 0, "back-pressure produced stalls");
    $display("stall cycles %0d, max relative error %e", stalls, max_rel_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
