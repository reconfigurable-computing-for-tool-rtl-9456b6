// multi_rotator: serial distributed arithmetic (SDA) Multi-Rotator.
//
// The virtual digitising algorithm rotates every surface point through a
// whole round in equal steps dtheta (for example 90 rotations of 4 degrees).
// Instead of a CORDIC, which approximates every angle anew, the Multi-Rotator
// keeps the four products of the previous rotation, x*C, x*S, y*C and y*S with
// C = cos(theta_{i-1}), S = sin(theta_{i-1}), and obtains those of rotation i
// with the angle addition rules:
//   x*C_i = x*C_{i-1}*Cd - x*S_{i-1}*Sd      y*C_i = y*C_{i-1}*Cd - y*S_{i-1}*Sd
//   y*S_i = y*S_{i-1}*Cd + y*C_{i-1}*Sd      x*S_i = x*S_{i-1}*Cd + x*C_{i-1}*Sd
// so only products by the two constants Cd = cos(dtheta), Sd = sin(dtheta)
// are needed. The rotated point is x_i = x*C_i - y*S_i, y_i = y*C_i + x*S_i
// (rotation about the z axis; z is not changed and does not enter the unit).
// Rotation 1 starts from theta0 = 0: the cosine S-Regs load x and y, the sine
// S-Regs load zero.
//
// Structure: four n-bit S-Regs with input multiplexers (mr_sreg), two
// dual-port LUTs of 4 x (n+1) bits (coef_lut, one for the "-" MACs that form
// x*C_i and y*C_i, one for the "+" MACs that form y*S_i and x*S_i), four
// (n+2)-bit scaling accumulators (scaling_acc), one adder and one subtracter.
// A LUT read port plus a scaling accumulator is one 2-C MAC.
//
// Timing: a point is accepted when in_valid and in_ready are high (in_ready
// is high only when the unit is idle). Each rotation then takes n MAC cycles
// plus one final cycle in which the adder and subtracter form x_i, y_i into
// the output register and the S-Regs are reloaded with the four products: a
// new rotation every n+1 cycles. out_valid/out_ready is a valid/ready
// handshake; if the previous result has not been taken when the next one is
// due, the unit stalls in the final cycle (stall is high) until it is. The
// rotation number (1..num_rot, for angle i*dtheta) comes with each result,
// out_last marks the last one of the point.
//
// Variants (parameters): DIGITS = 2 gives the 2-bit parallel distributed
// arithmetic (PDA) Multi-Rotator: each S-Reg delivers its even and odd bit
// together, the LUTs are doubled (four), each MAC has two scaling
// accumulators (eight), and a rotation takes n/2 + 1 cycles. The even and
// odd partial sums are combined as (even + 2*odd) / 2, rounded down, which
// this design adds in front of the final adder; results then differ from the
// serial version by at most a unit or two in the last place.
// SHARED_ADDSUB = 1 replaces the adder and the subtracter by one Add/Sub block
// used in two successive cycles, for n + 2 cycles per rotation (n/2 + 2 with
// DIGITS = 2). The defaults are the serial MR with one adder and one
// subtracter.
//
// Configuration (the LUT contents and the number of rotations per point) is
// written with cfg_we while the unit is idle. Cd and Sd are signed fixed
// point with n-1 fraction bits in n+1 bits. Products are truncated (floor)
// in the accumulators, so the error grows with the number of rotations, as
// expected of this recursive scheme. The handshake, the saturation of the
// S-Reg reload and the output width of n+3 bits follow from the
// architecture; the reset and configuration ports are this design's choice.
module multi_rotator
  import vd_pkg::*;
#(
  parameter int unsigned N             = MR_N_DEFAULT,
  parameter int unsigned ROT_W         = ROT_W_DEFAULT,
  parameter int unsigned DIGITS        = 1,
  parameter bit          SHARED_ADDSUB = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration
  input  logic                 cfg_we,
  input  logic signed [N:0]    cfg_cos,
  input  logic signed [N:0]    cfg_sin,
  input  logic [ROT_W-1:0]     cfg_num_rot,
  // point input
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [N-1:0]  in_x,
  input  logic signed [N-1:0]  in_y,
  // rotated point output
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [N+2:0]  out_x,
  output logic signed [N+2:0]  out_y,
  output logic [ROT_W-1:0]     out_idx,
  output logic                 out_last,
  // status
  output logic                 stall
);

  localparam int unsigned STEPS = N / DIGITS;   // MAC cycles per rotation
  localparam int unsigned CW    = (STEPS > 1) ? $clog2(STEPS) : 1;

  // MAC numbering: 0 = x*C_i, 1 = y*S_i, 2 = y*C_i, 3 = x*S_i.
  // MACs 0 and 2 use the "-" LUT, MACs 1 and 3 the "+" LUT.
  localparam int unsigned M_XC = 0;
  localparam int unsigned M_YS = 1;
  localparam int unsigned M_YC = 2;
  localparam int unsigned M_XS = 3;

  mr_state_e          state;
  logic [CW-1:0]      bitcnt;
  logic [ROT_W-1:0]   rotcnt;
  logic [ROT_W-1:0]   num_rot;
  logic               half;      // second cycle of the shared Add/Sub

  logic               accept_in;
  logic               lut_we;
  logic               mac_step;
  logic               mac_first;
  logic               mac_last;
  logic               out_free;
  logic               final_go;
  logic               rot_last;
  sreg_sel_e          sel_c;   // select of the cosine S-Regs (xC, yC)
  sreg_sel_e          sel_s;   // select of the sine S-Regs (xS, yS)
  logic               sreg_en;

  logic [DIGITS-1:0]   b_xc, b_xs, b_yc, b_ys;     // S-Reg low bits
  logic signed [N:0]   word [4][DIGITS];           // LUT words per MAC and digit
  logic signed [N+1:0] part [4][DIGITS];           // scaling accumulators
  logic signed [N+1:0] prod [4];                   // products of rotation i
  logic signed [N+2:0] x_new, y_new;

  assign in_ready  = (state == MR_IDLE);
  assign accept_in = in_valid && in_ready;
  assign lut_we    = cfg_we && in_ready;
  assign mac_step  = (state == MR_MAC);
  assign mac_first = (bitcnt == '0);
  assign mac_last  = (bitcnt == CW'(STEPS - 1));
  assign out_free  = !out_valid || out_ready;
  assign final_go  = (state == MR_FINAL) && (half || !SHARED_ADDSUB) && out_free;
  assign stall     = (state == MR_FINAL) && (half || !SHARED_ADDSUB) && !out_free;
  assign rot_last  = (rotcnt + 1'b1) >= num_rot;

  // S-Reg input multiplexer selects
  always_comb begin
    sreg_en = 1'b0;
    sel_c   = SREG_SHIFT;
    sel_s   = SREG_SHIFT;
    if (accept_in) begin
      sreg_en = 1'b1;
      sel_c   = SREG_COORD;
      sel_s   = SREG_ZERO;
    end else if (mac_step) begin
      sreg_en = 1'b1;
    end else if (final_go) begin
      sreg_en = 1'b1;
      sel_c   = SREG_PROD;
      sel_s   = SREG_PROD;
    end
  end

  mr_sreg #(.N(N), .DIGITS(DIGITS)) u_sreg_xc (.clk, .en(sreg_en), .sel(sel_c), .coord(in_x),
                                               .prod(prod[M_XC]), .lsbs(b_xc));
  mr_sreg #(.N(N), .DIGITS(DIGITS)) u_sreg_xs (.clk, .en(sreg_en), .sel(sel_s), .coord(in_x),
                                               .prod(prod[M_XS]), .lsbs(b_xs));
  mr_sreg #(.N(N), .DIGITS(DIGITS)) u_sreg_yc (.clk, .en(sreg_en), .sel(sel_c), .coord(in_y),
                                               .prod(prod[M_YC]), .lsbs(b_yc));
  mr_sreg #(.N(N), .DIGITS(DIGITS)) u_sreg_ys (.clk, .en(sreg_en), .sel(sel_s), .coord(in_y),
                                               .prod(prod[M_YS]), .lsbs(b_ys));

  for (genvar d = 0; d < int'(DIGITS); d++) begin : g_digit
    // "-" LUT: port 0 for x*C_i (a = xC, b = xS), port 1 for y*C_i (a = yC, b = yS)
    coef_lut #(.N(N), .SUBTRACT(1'b1)) u_lut_sub (
      .clk, .we(lut_we), .c_coef(cfg_cos), .s_coef(cfg_sin),
      .addr0({b_xs[d], b_xc[d]}), .addr1({b_ys[d], b_yc[d]}),
      .data0(word[M_XC][d]), .data1(word[M_YC][d]));

    // "+" LUT: port 0 for y*S_i (a = yS, b = yC), port 1 for x*S_i (a = xS, b = xC)
    coef_lut #(.N(N), .SUBTRACT(1'b0)) u_lut_add (
      .clk, .we(lut_we), .c_coef(cfg_cos), .s_coef(cfg_sin),
      .addr0({b_yc[d], b_ys[d]}), .addr1({b_xc[d], b_xs[d]}),
      .data0(word[M_YS][d]), .data1(word[M_XS][d]));

    for (genvar m = 0; m < 4; m++) begin : g_mac
      // the most significant digit carries the sign bits
      scaling_acc #(.N(N), .SHIFT(DIGITS)) u_acc (
        .clk, .en(mac_step), .first(mac_first), .last(mac_last),
        .sub(mac_last && (d == int'(DIGITS) - 1)),
        .lut_word(word[m][d]), .acc(part[m][d]));
    end
  end

  // Products: with one digit the accumulator itself; with two, the even
  // and odd sums weighted 1 and 2, halved and rounded down.
  always_comb begin
    for (int m = 0; m < 4; m++) begin
      if (DIGITS == 1) begin
        prod[m] = part[m][0];
      end else begin
        prod[m] = (N+2)'(((N+3)'(part[m][0]) + ((N+3)'(part[m][DIGITS-1]) <<< 1)) >>> 1);
      end
    end
  end

  // Final adder and subtracter (or one shared Add/Sub, see below)
  logic signed [N+2:0] addsub_a, addsub_b, addsub_y, x_hold;
  logic                addsub_add;

  always_comb begin
    if (SHARED_ADDSUB && half) begin
      addsub_a   = (N+3)'(prod[M_YC]);
      addsub_b   = (N+3)'(prod[M_XS]);
      addsub_add = 1'b1;
    end else begin
      addsub_a   = (N+3)'(prod[M_XC]);
      addsub_b   = (N+3)'(prod[M_YS]);
      addsub_add = 1'b0;
    end
    addsub_y = addsub_add ? (addsub_a + addsub_b) : (addsub_a - addsub_b);
    if (SHARED_ADDSUB) begin
      x_new = x_hold;
      y_new = addsub_y;
    end else begin
      x_new = addsub_y;
      y_new = (N+3)'(prod[M_YC]) + (N+3)'(prod[M_XS]);
    end
  end

  // Sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= MR_IDLE;
      bitcnt  <= '0;
      rotcnt  <= '0;
      num_rot <= ROT_W'(1);
      half    <= 1'b0;
      x_hold  <= '0;
    end else begin
      if (lut_we) num_rot <= cfg_num_rot;
      unique case (state)
        MR_IDLE: begin
          if (accept_in) begin
            state  <= MR_MAC;
            bitcnt <= '0;
            rotcnt <= '0;
          end
        end
        MR_MAC: begin
          if (mac_last) state <= MR_FINAL;
          else          bitcnt <= bitcnt + 1'b1;
        end
        MR_FINAL: begin
          if (SHARED_ADDSUB && !half) begin
            x_hold <= addsub_y;
            half   <= 1'b1;
          end else if (final_go) begin
            half   <= 1'b0;
            bitcnt <= '0;
            rotcnt <= rotcnt + 1'b1;
            state  <= rot_last ? MR_IDLE : MR_MAC;
          end
        end
        default: state <= MR_IDLE;
      endcase
    end
  end

  // Output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      out_idx   <= '0;
      out_last  <= 1'b0;
    end else if (final_go) begin
      out_valid <= 1'b1;
      out_x     <= x_new;
      out_y     <= y_new;
      out_idx   <= rotcnt + 1'b1;
      out_last  <= rot_last;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  // Parameter and handshake rules
  initial begin
    assert (DIGITS == 1 || DIGITS == 2) else $error("DIGITS must be 1 or 2");
    assert (N % DIGITS == 0) else $error("N must be a multiple of DIGITS");
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_x) && $stable(out_y));
  a_cfg_idle: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_we |-> in_ready);

endmodule
