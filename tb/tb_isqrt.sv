// tb_isqrt: checks floor(sqrt(v)) for random 64-bit radicands, perfect
// squares and their neighbours, 0 and the largest value, by testing
// root^2 <= v < (root+1)^2 with wide integers. Also checks that done is high
// in the (IW/2+1)-th cycle after the cycle in which start is high.
module tb_isqrt;
  localparam int unsigned IW = 64;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              start = 1'b0;
  logic [IW-1:0]     radicand = '0;
  logic              busy, done;
  logic [IW/2-1:0]   root;

  int checks = 0;
  int failures = 0;

  isqrt #(.IW(IW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(5_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [IW-1:0] v);
    int lat;
    logic [127:0] r, r1;
    @(negedge clk);
    start = 1'b1; radicand = v;
    @(negedge clk);
    start = 1'b0; radicand = '0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    r  = 128'(root);
    r1 = r + 1;
    checks++;
    if (!(r * r <= 128'(v) && 128'(v) < r1 * r1)) begin
      failures++;
      $display("FAIL sqrt(%0d) gave %0d", v, root);
    end
    checks++;
    if (lat != int'(IW / 2) + 1) begin
      failures++;
      $display("FAIL latency %0d", lat);
    end
  endtask

  initial begin
    logic [31:0] q;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run('0);
    run(64'd1);
    run(64'd2);
    run('1);
    for (int t = 0; t < 100; t++) run({$urandom(), $urandom()});
    for (int t = 0; t < 50; t++) begin
      q = $urandom();
      run(64'(q) * 64'(q));
      run(64'(q) * 64'(q) - 64'd1);
      run(64'(q) * 64'(q) + 64'd1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
