// torus_distance: distance from a surface point to the torus tool along the
// attack axis (Y).
//
// The lathe tool, a double cutting wheel, is modelled as a torus with major
// radius R and minor radius r whose centre is at (Tx, Ty) and whose axis is
// Z. For a surface point (x, y, z) the distance the tool can still move
// along -Y before touching that point is
//   D = Ty - y - sqrt( (R + sqrt(r^2 - (x - Tx)^2))^2 - z^2 ).
// A point that the tool can never touch, because |x - Tx| > r or because
// |z| exceeds the reach of the torus at that x, has no distance: the result
// then carries miss = 1 (infinite distance).
//
// All values are integers in the same length unit (one LSB of the
// coordinates). The two square roots are evaluated one after the other by a
// single iterative integer square root (isqrt, floor), so results are exact
// to integer truncation. Tx, Ty, R and r are configuration inputs and must
// stay stable while a point is processed; R and r must be non-negative.
//
// Timing: a point is taken when in_valid and in_ready are high; in_ready is
// high only when the unit is idle. Counting the cycle in which the point is
// taken as cycle 0, out_valid is high for one cycle, with the distance and
// the tag that came with the point, in cycle 3 for a miss in x (no square
// root), in cycle W + 5 for a miss in z (one root) and in cycle 2*W + 6 when
// both roots are taken. The downstream unit must accept every
// result. The sequential structure is this design's choice; the equation is
// the tool model of the turning lathe.
module torus_distance
  import vd_pkg::*;
#(
  parameter int unsigned W     = MR_N_DEFAULT + 3,
  parameter int unsigned TAG_W = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // tool configuration
  input  logic signed [W-1:0]  tx,
  input  logic signed [W-1:0]  ty,
  input  logic signed [W-1:0]  big_r,
  input  logic signed [W-1:0]  small_r,
  // point input
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [W-1:0]  in_x,
  input  logic signed [W-1:0]  in_y,
  input  logic signed [W-1:0]  in_z,
  input  logic [TAG_W-1:0]     in_tag,
  // result
  output logic                 out_valid,
  output logic signed [W+1:0]  out_dist,
  output logic                 out_miss,
  output logic [TAG_W-1:0]     out_tag
);

  localparam int unsigned IW = 2 * W;

  td_state_e              state;
  logic signed [W-1:0]    px, py, pz;
  logic [TAG_W-1:0]       ptag;
  logic signed [W:0]      dx;
  logic [IW-1:0]          dx2, r2, z2, s2;
  logic [W:0]             s;          // R + inner root, below 2^W
  logic                   sq_start;
  logic [IW-1:0]          sq_rad;
  logic                   sq_busy, sq_done;
  logic [W-1:0]           sq_root;

  assign in_ready = (state == TD_IDLE);
  assign dx  = (W+1)'(px) - (W+1)'(tx);
  assign dx2 = IW'(dx * dx);
  assign r2  = IW'(small_r * small_r);
  assign z2  = IW'(pz * pz);
  assign s2  = IW'(s * s);

  always_comb begin
    sq_start = 1'b0;
    sq_rad   = '0;
    if (state == TD_PREP1 && dx2 <= r2) begin
      sq_start = 1'b1;
      sq_rad   = r2 - dx2;
    end else if (state == TD_PREP2 && z2 <= s2) begin
      sq_start = 1'b1;
      sq_rad   = s2 - z2;
    end
  end

  isqrt #(.IW(IW)) u_sqrt (
    .clk, .rst_n, .start(sq_start), .radicand(sq_rad),
    .busy(sq_busy), .done(sq_done), .root(sq_root));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= TD_IDLE;
      px        <= '0;
      py        <= '0;
      pz        <= '0;
      ptag      <= '0;
      s         <= '0;
      out_valid <= 1'b0;
      out_dist  <= '0;
      out_miss  <= 1'b0;
      out_tag   <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        TD_IDLE: begin
          if (in_valid) begin
            px    <= in_x;
            py    <= in_y;
            pz    <= in_z;
            ptag  <= in_tag;
            state <= TD_PREP1;
          end
        end
        TD_PREP1: begin
          if (dx2 > r2) begin
            out_miss <= 1'b1;
            state    <= TD_OUT;
          end else begin
            state <= TD_SQRT1;
          end
        end
        TD_SQRT1: begin
          if (sq_done) begin
            s     <= (W+1)'(big_r) + (W+1)'(sq_root);
            state <= TD_PREP2;
          end
        end
        TD_PREP2: begin
          if (z2 > s2) begin
            out_miss <= 1'b1;
            state    <= TD_OUT;
          end else begin
            state <= TD_SQRT2;
          end
        end
        TD_SQRT2: begin
          if (sq_done) begin
            out_miss <= 1'b0;
            out_dist <= (W+2)'(ty) - (W+2)'(py) - (W+2)'({1'b0, sq_root});
            state    <= TD_OUT;
          end
        end
        TD_OUT: begin
          out_valid <= 1'b1;
          out_tag   <= ptag;
          state     <= TD_IDLE;
        end
        default: state <= TD_IDLE;
      endcase
    end
  end

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n)
    sq_start |-> !sq_busy);

endmodule
