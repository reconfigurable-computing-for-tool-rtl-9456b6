// mr_sreg: one S-Reg of the Multi-Rotator with its input multiplexer.
//
// The register holds one of the four products of the previous rotation
// (x*C, x*S, y*C or y*S, all in n-bit two's complement). During the serial
// MAC cycles it shifts towards the LSB by DIGITS places per cycle, and its
// DIGITS low bits are address bits of the coefficient LUTs: one bit for the
// serial (SDA) Multi-Rotator, two for the 2-bit parallel (PDA) one, where the
// register stands for the pair of n/2-bit registers holding the even and the
// odd bits. The multiplexer in front of it selects the point coordinate or
// zero for the first rotation (theta0 = 0: cosine products start as the
// coordinate, sine products as zero), and the new product of the 2-C MAC in
// the last cycle of every rotation. The product comes from an (n+2)-bit
// accumulator and is saturated to n bits here; only a point at the edge of
// the number range can need it (the saturation is this design's choice).
//
// Timing: loads and shifts take effect at the next rising clock edge; with
// en low the register holds. Its contents are seen only through lsbs.
module mr_sreg
  import vd_pkg::*;
#(
  parameter int unsigned N      = MR_N_DEFAULT,
  parameter int unsigned DIGITS = 1
) (
  input  logic                clk,
  input  logic                en,
  input  sreg_sel_e           sel,
  input  logic signed [N-1:0] coord,
  input  logic signed [N+1:0] prod,
  output logic [DIGITS-1:0]   lsbs
);

  localparam logic signed [N+1:0] MAXV = (N+2)'((64'sd1 <<< (N - 1)) - 1);
  localparam logic signed [N+1:0] MINV = -(N+2)'(64'sd1 <<< (N - 1));

  logic [N-1:0]        q;
  logic signed [N-1:0] prod_sat;

  always_comb begin
    if (prod > MAXV)      prod_sat = MAXV[N-1:0];
    else if (prod < MINV) prod_sat = MINV[N-1:0];
    else                  prod_sat = prod[N-1:0];
  end

  always_ff @(posedge clk) begin
    if (en) begin
      unique case (sel)
        SREG_SHIFT: q <= q >> DIGITS;
        SREG_COORD: q <= coord;
        SREG_ZERO:  q <= '0;
        SREG_PROD:  q <= prod_sat;
      endcase
    end
  end

  assign lsbs = q[DIGITS-1:0];

endmodule
