// min_select: comparison and conditional assignment of the innermost loop.
//
// For one tool translation position the virtual digitising loop visits every
// surface point at every rotation angle and keeps the smallest distance:
// if Cur_dist < Min_dist then Min_dist = Cur_dist. This unit does that for a
// stream of distances and also keeps the tag (point index and rotation
// number) of the winning sample, which the host needs to place the tool
// centre. A distance flagged miss (the tool cannot touch the point) is
// treated as infinite and never wins. The comparison is strict, so on a tie
// the first sample is kept.
//
// clr starts a new translation position: Min_dist returns to infinity
// (found = 0). A sample (in_valid) updates the state at the next clock edge;
// clr has priority over a sample in the same cycle. updated pulses for one
// cycle after a sample that became the new minimum. Keeping the tag is this
// design's addition to the plain comparison.
module min_select #(
  parameter int unsigned DW    = 37,
  parameter int unsigned TAG_W = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_dist,
  input  logic                 in_miss,
  input  logic [TAG_W-1:0]     in_tag,
  output logic                 found,
  output logic signed [DW-1:0] min_dist,
  output logic [TAG_W-1:0]     min_tag,
  output logic                 updated
);

  logic better;

  assign better = in_valid && !in_miss && (!found || (in_dist < min_dist));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      found    <= 1'b0;
      min_dist <= '0;
      min_tag  <= '0;
      updated  <= 1'b0;
    end else if (clr) begin
      found    <= 1'b0;
      min_dist <= '0;
      min_tag  <= '0;
      updated  <= 1'b0;
    end else begin
      updated <= better;
      if (better) begin
        found    <= 1'b1;
        min_dist <= in_dist;
        min_tag  <= in_tag;
      end
    end
  end

endmodule
