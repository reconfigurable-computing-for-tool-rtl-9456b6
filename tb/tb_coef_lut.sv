// tb_coef_lut: writes random coefficient pairs into the "-" and "+" LUT
// variants and reads all four words on both ports.
module tb_coef_lut;
  localparam int unsigned N = 32;

  logic              clk = 1'b0;
  logic              we = 1'b0;
  logic signed [N:0] c_coef = '0, s_coef = '0;
  logic [1:0]        addr0 = '0, addr1 = '0;
  logic signed [N:0] sub0, sub1, add0, add1;

  int checks = 0;
  int failures = 0;

  coef_lut #(.N(N), .SUBTRACT(1'b1)) dut_sub (.clk, .we, .c_coef, .s_coef, .addr0, .addr1,
                                              .data0(sub0), .data1(sub1));
  coef_lut #(.N(N), .SUBTRACT(1'b0)) dut_add (.clk, .we, .c_coef, .s_coef, .addr0, .addr1,
                                              .data0(add0), .data1(add1));

  always #5 clk = ~clk;

  initial begin
    #(1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expect_word(input longint c, input longint s, input bit sub,
                                         input int a);
    longint sv = sub ? -s : s;
    case (a)
      0: return 0;
      1: return c;
      2: return sv;
      default: return c + sv;
    endcase
  endfunction

  task automatic chk(input logic signed [N:0] got, input longint exp, input string what);
    checks++;
    if (longint'(got) != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint c, s;
    for (int t = 0; t < 30; t++) begin
      c = longint'($urandom_range(0, 32'h7fff_ffff)) - 64'sd1073741824;
      s = longint'($urandom_range(0, 32'h7fff_ffff)) - 64'sd1073741824;
      @(negedge clk);
      we = 1'b1; c_coef = (N+1)'(c); s_coef = (N+1)'(s);
      @(negedge clk);
      we = 1'b0; c_coef = '0; s_coef = '0;   // contents must stay
      for (int a = 0; a < 4; a++) begin
        addr0 = 2'(a); addr1 = 2'(3 - a);
        #1;
        chk(sub0, expect_word(c, s, 1'b1, a), "sub port0");
        chk(sub1, expect_word(c, s, 1'b1, 3 - a), "sub port1");
        chk(add0, expect_word(c, s, 1'b0, a), "add port0");
        chk(add1, expect_word(c, s, 1'b0, 3 - a), "add port1");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
