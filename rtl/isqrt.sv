// isqrt: iterative integer square root, one result bit per clock.
//
// Computes root = floor(sqrt(radicand)) for an unsigned IW-bit radicand
// (IW even) with the digit-by-digit (restoring) method: each step brings
// down the next two radicand bits into the partial remainder and tries to
// subtract 4*root + 1; the result bit is 1 when that does not go negative.
// Used twice per point by the torus distance unit (the two square roots of
// the distance equation); the method is this design's choice.
//
// Timing: start is taken at a clock edge when busy is low; IW/2 edges later
// done goes high for one cycle, so done is high in the (IW/2+1)-th cycle
// counted from the cycle in which start is high. root is valid from then
// until the next start.
module isqrt #(
  parameter int unsigned IW = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [IW-1:0]     radicand,
  output logic              busy,
  output logic              done,
  output logic [IW/2-1:0]   root
);

  localparam int unsigned OW = IW / 2;
  localparam int unsigned RW = OW + 2;
  localparam int unsigned CW = $clog2(OW + 1);

  logic [IW-1:0] rad;
  logic [RW-3:0] rem;    // partial remainder between steps, below 2^OW
  logic [CW-1:0] cnt;
  logic [RW-1:0] rem_sh;
  logic [RW-1:0] trial;
  logic          fits;

  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

  assign rem_sh = {rem, rad[IW-1:IW-2]};
  assign trial  = {root, 2'b01};
  assign fits   = rem_sh >= trial;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      rad  <= '0;
      rem  <= '0;
      root <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        rad  <= radicand;
        rem  <= '0;
        root <= '0;
        cnt  <= CW'(OW);
      end else if (busy) begin
        rad  <= {rad[IW-3:0], 2'b00};
        rem  <= (RW-2)'(fits ? (rem_sh - trial) : rem_sh);
        root <= {root[OW-2:0], fits};
        cnt  <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
