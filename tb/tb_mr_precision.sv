// tb_mr_precision: accuracy experiment of the Multi-Rotator for 16-bit and
// 32-bit data words. A point is rotated through a whole round with steps of
// 0.5, 2.5 and 5 degrees (720, 144 and 72 rotations). Every result is checked
// bit-exactly against the angle-addition model, and the error against the
// true rotation is reported as relative error, absolute error in units of
// the last place and number of erroneous bits. Checks: the 32-bit relative
// error stays below 0.1 % for the whole round, the 16-bit one below the 6 %
// reported for a 16-bit rotator, and the 32-bit unit is the more accurate.
module tb_mr_precision;
  localparam int unsigned ROT_W = 16;
  localparam int NW = 2;
  localparam int unsigned WIDTHS [NW] = '{32, 16};
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  int checks = 0;
  int failures = 0;
  real max_rel [NW];
  int  done_cnt = 0;

  always #5 clk = ~clk;

  initial begin
    #(20_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NW; g++) begin : g_w
    localparam int unsigned N = WIDTHS[g];
    logic                cfg_we = 1'b0;
    logic signed [N:0]   cfg_cos = '0, cfg_sin = '0;
    logic [ROT_W-1:0]    cfg_num_rot = '0;
    logic                in_valid = 1'b0, in_ready;
    logic signed [N-1:0] in_x = '0, in_y = '0;
    logic                out_valid, out_last, stall;
    logic signed [N+2:0] out_x, out_y;
    logic [ROT_W-1:0]    out_idx;

    multi_rotator #(.N(N), .ROT_W(ROT_W)) dut (
      .clk, .rst_n, .cfg_we, .cfg_cos, .cfg_sin, .cfg_num_rot,
      .in_valid, .in_ready, .in_x, .in_y,
      .out_valid, .out_ready(1'b1), .out_x, .out_y, .out_idx, .out_last, .stall);

    function automatic longint sat_n(input logic signed [127:0] v);
      longint lim = (64'sd1 <<< (N - 1));
      if (v > 128'(lim - 1)) return lim - 1;
      if (v < -128'(lim))    return -lim;
      return longint'(v);
    endfunction

    task automatic round(input real deg, input int nrot);
      longint ci, si, x0, y0, xc, xs, yc, ys;
      logic signed [127:0] pxc, pxs, pyc, pys, ex, ey;
      real th, rx, ry, err, mag, rel, bits, rel_max, err_max;
      int got;
      ci = longint'($cos(deg * PI / 180.0) * (2.0 ** (N - 1)));
      si = longint'($sin(deg * PI / 180.0) * (2.0 ** (N - 1)));
      // a point at 3/4 of the coordinate range
      x0 = longint'(0.6 * (2.0 ** (N - 1)));
      y0 = longint'(-0.45 * (2.0 ** (N - 1)));
      @(negedge clk);
      cfg_we = 1'b1; cfg_cos = (N+1)'(ci); cfg_sin = (N+1)'(si); cfg_num_rot = ROT_W'(nrot);
      @(negedge clk);
      cfg_we = 1'b0; in_valid = 1'b1; in_x = N'(x0); in_y = N'(y0);
      @(negedge clk);
      in_valid = 1'b0;
      xc = x0; xs = 0; yc = y0; ys = 0;
      got = 0; rel_max = 0.0; err_max = 0.0;
      mag = $sqrt(real'(x0) ** 2 + real'(y0) ** 2);
      while (got < nrot) begin
        @(negedge clk);
        if (out_valid) begin
          got++;
          pxc = ((128'(xc) * 128'(ci)) - (128'(xs) * 128'(si))) >>> (N - 1);
          pys = ((128'(ys) * 128'(ci)) + (128'(yc) * 128'(si))) >>> (N - 1);
          pyc = ((128'(yc) * 128'(ci)) - (128'(ys) * 128'(si))) >>> (N - 1);
          pxs = ((128'(xs) * 128'(ci)) + (128'(xc) * 128'(si))) >>> (N - 1);
          ex = pxc - pys;
          ey = pyc + pxs;
          checks++;
          if (!(128'(out_x) == ex && 128'(out_y) == ey)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d-bit rot %0d mismatch", N, got);
          end
          xc = sat_n(pxc); xs = sat_n(pxs); yc = sat_n(pyc); ys = sat_n(pys);
          th = deg * got * PI / 180.0;
          rx = real'(x0) * $cos(th) - real'(y0) * $sin(th);
          ry = real'(y0) * $cos(th) + real'(x0) * $sin(th);
          err = $sqrt((real'(out_x) - rx) ** 2 + (real'(out_y) - ry) ** 2);
          rel = err / mag;
          if (rel > rel_max) rel_max = rel;
          if (err > err_max) err_max = err;
        end
      end
      bits = (err_max > 1.0) ? $ln(err_max) / $ln(2.0) : 0.0;
      $display("%0d-bit MR, %4.1f degree step, %0d rotations: max relative error %9.3e %%, max abs error %0.1f LSB (%0.1f erroneous bits)",
               N, deg, nrot, rel_max * 100.0, err_max, bits);
      if (rel_max > max_rel[g]) max_rel[g] = rel_max;
    endtask

    initial begin
      max_rel[g] = 0.0;
      @(posedge rst_n);
      round(0.5, 720);
      round(2.5, 144);
      round(5.0, 72);
      done_cnt++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done_cnt == NW);
    checks++;
    if (!(max_rel[0] < 0.001)) begin
      failures++;
      $display("FAIL 32-bit relative error %e not below 0.1 %%", max_rel[0]);
    end
    checks++;
    if (!(max_rel[1] < 0.06)) begin
      failures++;
      $display("FAIL 16-bit relative error %e not below 6 %%", max_rel[1]);
    end
    checks++;
    if (!(max_rel[0] < max_rel[1])) begin
      failures++;
      $display("FAIL 32-bit not more accurate than 16-bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
