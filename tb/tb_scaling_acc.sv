// tb_scaling_acc: drives the scaling accumulator LSB first with the LUT words
// of random operand pairs and random coefficients, and compares the result
// after n steps with floor((a*C + b*S) / 2^(n-1)) computed with wide
// integers. Includes the extreme operands (most negative values).
module tb_scaling_acc;
  localparam int unsigned N = 32;

  logic                clk = 1'b0;
  logic                en = 1'b0, first = 1'b0, last = 1'b0, sub = 1'b0;
  logic signed [N:0]   lut_word = '0;
  logic signed [N+1:0] acc;

  int checks = 0;
  int failures = 0;

  scaling_acc #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(2_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint a, input longint b, input longint c, input longint s);
    logic [N-1:0] ab, bb;
    logic signed [127:0] exp;
    longint w;
    ab = N'(a); bb = N'(b);
    for (int k = 0; k < int'(N); k++) begin
      @(negedge clk);
      w = (ab[k] ? c : 0) + (bb[k] ? s : 0);
      en = 1'b1; first = (k == 0); last = (k == int'(N) - 1); sub = last;
      lut_word = (N+1)'(w);
    end
    @(negedge clk);
    en = 1'b0; first = 1'b0; last = 1'b0; sub = 1'b0;
    exp = ((128'(a) * 128'(c)) + (128'(b) * 128'(s))) >>> (N - 1);
    checks++;
    if (128'(acc) != exp) begin
      failures++;
      $display("FAIL a=%0d b=%0d c=%0d s=%0d: got %0d expected %0d", a, b, c, s, acc, exp);
    end
  endtask

  function automatic longint rnd_n();
    return longint'($signed($urandom()));
  endfunction

  function automatic longint rnd_coef();
    return longint'($urandom_range(0, 32'h7fff_ffff)) - 64'sd1073741824;
  endfunction

  initial begin
    for (int t = 0; t < 200; t++) run(rnd_n(), rnd_n(), rnd_coef(), rnd_coef());
    run(-64'sd2147483648, -64'sd2147483648, 64'sd1073741824, -64'sd1073741824);
    run(-64'sd2147483648, 64'sd2147483647, -64'sd1073741824, -64'sd1073741824);
    run(64'sd2147483647, 64'sd2147483647, 64'sd1073741823, 64'sd1073741823);
    run(64'sd0, 64'sd0, 64'sd5, 64'sd7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
