// tb_mr_sreg: checks the S-Reg and its input multiplexer: loading a
// coordinate, zero and a product (including saturation of products outside
// the n-bit range), holding with en low, and shifting out LSB first.
module tb_mr_sreg;
  import vd_pkg::*;
  localparam int unsigned N = 32;

  logic                clk = 1'b0;
  logic                en = 1'b0;
  sreg_sel_e           sel = SREG_SHIFT;
  logic signed [N-1:0] coord = '0;
  logic signed [N+1:0] prod = '0;
  logic [0:0]          lsbs;

  int checks = 0;
  int failures = 0;

  mr_sreg #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Load with the given select, then shift N times and collect the bits.
  task automatic load_and_read(input sreg_sel_e s, input logic [N-1:0] expected, input bit hold);
    logic [N-1:0] got;
    @(negedge clk);
    en = 1'b1; sel = s;
    @(negedge clk);
    sel = SREG_SHIFT;
    if (hold) begin
      en = 1'b0;
      repeat (3) @(negedge clk);
      en = 1'b1;
    end
    for (int k = 0; k < int'(N); k++) begin
      got[k] = lsbs[0];
      @(negedge clk);
    end
    checks++;
    if (got !== expected) begin
      failures++;
      $display("FAIL sel %0d: got %h expected %h", s, got, expected);
    end
    checks++;
    if (lsbs[0] !== 1'b0) begin
      failures++;
      $display("FAIL register not empty after N shifts");
    end
  endtask

  initial begin
    logic [N-1:0] r;
    for (int t = 0; t < 20; t++) begin
      r = N'($urandom());
      coord = r;
      load_and_read(SREG_COORD, r, t[0]);
      prod = (N+2)'($signed(r));
      load_and_read(SREG_PROD, r, 1'b0);
      coord = ~r;
      load_and_read(SREG_ZERO, '0, 1'b0);
    end
    prod = (N+2)'(64'sd1 <<< N);          // above the largest n-bit value
    load_and_read(SREG_PROD, {1'b0, {(N-1){1'b1}}}, 1'b0);
    prod = -(N+2)'(64'sd1 <<< N);         // below the smallest
    load_and_read(SREG_PROD, {1'b1, {(N-1){1'b0}}}, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
