// tb_multi_rotator_variants: the Multi-Rotator variants at n = 32:
//   2-bit parallel distributed arithmetic (DIGITS = 2), n/2 + 1 cycles,
//   one shared Add/Sub block (SHARED_ADDSUB = 1), n + 2 cycles,
//   both together, n/2 + 2 cycles.
// All three get the same points and steps. Each result is compared with a
// bit-exact model of its arithmetic (for DIGITS = 2 the even and odd partial
// sums are each rounded down to the coordinate unit, then combined as
// (even + 2*odd)/2 rounded down) and with the true rotation, and the interval
// between results is checked against the cycle count of the variant.
module tb_multi_rotator_variants;
  localparam int unsigned N     = 32;
  localparam int unsigned ROT_W = 16;
  localparam int NV = 3;
  localparam int          V_DIG [NV] = '{2, 1, 2};
  localparam bit          V_SH  [NV] = '{1'b0, 1'b1, 1'b1};
  localparam real PI = 3.14159265358979323846;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                cfg_we = 1'b0;
  logic signed [N:0]   cfg_cos = '0, cfg_sin = '0;
  logic [ROT_W-1:0]    cfg_num_rot = '0;
  logic                in_valid = 1'b0;
  logic signed [N-1:0] in_x = '0, in_y = '0;

  int checks = 0;
  int failures = 0;
  longint cyc = 0;
  int busy_count = 0;

  // the point and step under test, shared by the checkers
  real    cur_deg;
  int     cur_nrot;
  longint cur_x0, cur_y0, cur_ci, cur_si;
  event   go;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

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

  // a*c + b*s, as the distributed arithmetic of the given digit count forms it
  function automatic logic signed [127:0] mac(input longint a, input longint b,
                                              input longint c, input longint s, input int dig);
    logic [N-1:0] ab, bb;
    logic signed [127:0] e, o, ev, od;
    logic [N-1:0] even_mask;
    if (dig == 1) return ((128'(a) * 128'(c)) + (128'(b) * 128'(s))) >>> (N - 1);
    for (int k = 0; k < int'(N); k++) even_mask[k] = (k % 2 == 0);
    ab = N'(a); bb = N'(b);
    // even bits: positive weights; odd bits: include the sign bit
    e = 128'(ab & even_mask) * 128'(c) + 128'(bb & even_mask) * 128'(s);
    o = 128'($signed(ab & ~even_mask)) * 128'(c) + 128'($signed(bb & ~even_mask)) * 128'(s);
    ev = e >>> (N - 2);
    od = (o >>> 1) >>> (N - 2);
    return (ev + (od <<< 1)) >>> 1;
  endfunction

  for (genvar v = 0; v < NV; v++) begin : g_var
    logic                out_valid;
    logic signed [N+2:0] out_x, out_y;
    logic [ROT_W-1:0]    out_idx;
    logic                out_last, stall, in_ready;

    multi_rotator #(.N(N), .ROT_W(ROT_W), .DIGITS(V_DIG[v]), .SHARED_ADDSUB(V_SH[v])) dut (
      .clk, .rst_n, .cfg_we, .cfg_cos, .cfg_sin, .cfg_num_rot,
      .in_valid, .in_ready, .in_x, .in_y,
      .out_valid, .out_ready(1'b1), .out_x, .out_y, .out_idx, .out_last, .stall);

    initial begin
      longint xc, xs, yc, ys, t_prev, period;
      logic signed [127:0] pxc, pxs, pyc, pys, ex, ey;
      int got, dig;
      real th, rx, ry, err;
      dig = V_DIG[v];
      period = longint'(N) / longint'(dig) + (V_SH[v] ? 2 : 1);
      forever begin
        @(go);
        busy_count++;
        xc = cur_x0; xs = 0; yc = cur_y0; ys = 0;
        got = 0;
        t_prev = -1;
        while (got < cur_nrot) begin
          @(negedge clk);
          if (out_valid) begin
            got++;
            pxc = mac(xc, xs, cur_ci, -cur_si, dig);
            pys = mac(ys, yc, cur_ci, cur_si, dig);
            pyc = mac(yc, ys, cur_ci, -cur_si, dig);
            pxs = mac(xs, xc, cur_ci, cur_si, dig);
            ex = pxc - pys;
            ey = pyc + pxs;
            checks++;
            if (!(128'(out_x) == ex && 128'(out_y) == ey && int'(out_idx) == got &&
                  out_last == (got == cur_nrot))) begin
              failures++;
              if (failures < 20)
                $display("FAIL variant %0d rot %0d: got (%0d,%0d) expected (%0d,%0d)", v, got,
                         out_x, out_y, ex, ey);
            end
            th = cur_deg * got * PI / 180.0;
            rx = real'(cur_x0) * $cos(th) - real'(cur_y0) * $sin(th);
            ry = real'(cur_y0) * $cos(th) + real'(cur_x0) * $sin(th);
            err = $sqrt((real'(out_x) - rx) ** 2 + (real'(out_y) - ry) ** 2);
            checks++;
            if (err > 6.0 * got + 8.0) begin
              failures++;
              $display("FAIL variant %0d precision rot %0d err %f", v, got, err);
            end
            if (t_prev >= 0) begin
              checks++;
              if (cyc - t_prev != period) begin
                failures++;
                $display("FAIL variant %0d interval %0d expected %0d", v, cyc - t_prev, period);
              end
            end
            t_prev = cyc;
            xc = sat_n(pxc); xs = sat_n(pxs); yc = sat_n(pyc); ys = sat_n(pys);
          end
        end
        busy_count--;
      end
    end
  end

  task automatic run_point(input real deg, input int nrot, input longint x0, input longint y0);
    cur_deg = deg; cur_nrot = nrot; cur_x0 = x0; cur_y0 = y0;
    cur_ci = longint'($cos(deg * PI / 180.0) * (2.0 ** (N - 1)));
    cur_si = longint'($sin(deg * PI / 180.0) * (2.0 ** (N - 1)));
    @(negedge clk);
    cfg_we = 1'b1; cfg_cos = (N+1)'(cur_ci); cfg_sin = (N+1)'(cur_si);
    cfg_num_rot = ROT_W'(nrot);
    @(negedge clk);
    cfg_we = 1'b0;
    in_valid = 1'b1; in_x = N'(x0); in_y = N'(y0);
    ->go;
    @(negedge clk);
    in_valid = 1'b0;
    @(negedge clk);
    while (busy_count != 0) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_point(4.0, 90, 64'sd1_000_000_000, -64'sd300_000_000);
    run_point(0.5, 720, 64'sd123_456_789, 64'sd987_654_321);
    run_point(5.0, 72, -64'sd2_000_000_000, 64'sd5_000);
    for (int k = 0; k < 5; k++)
      run_point(2.5, 20, longint'($urandom_range(0, 2_000_000_000)) - 64'sd1_000_000_000,
                longint'($urandom_range(0, 2_000_000_000)) - 64'sd1_000_000_000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
