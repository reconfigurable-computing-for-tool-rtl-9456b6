// tb_min_select: feeds streams of signed distances, some flagged miss, and
// compares the kept minimum, its tag, the found flag and the updated pulse
// with a reference; checks that a tie keeps the first sample and that clr
// starts a new search.
module tb_min_select;
  localparam int unsigned DW = 37;
  localparam int unsigned TAG_W = 8;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 clr = 1'b0;
  logic                 in_valid = 1'b0;
  logic signed [DW-1:0] in_dist = '0;
  logic                 in_miss = 1'b0;
  logic [TAG_W-1:0]     in_tag = '0;
  logic                 found;
  logic signed [DW-1:0] min_dist;
  logic [TAG_W-1:0]     min_tag;
  logic                 updated;

  int checks = 0;
  int failures = 0;

  min_select #(.DW(DW), .TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(5_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    bit     rf;
    longint rmin;
    int     rtag;
    bit     rupd;
    longint d;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 20; pass++) begin
      @(negedge clk);
      clr = 1'b1;
      @(negedge clk);
      clr = 1'b0;
      chk(!found, "clr empties");
      rf = 0; rmin = 0; rtag = 0;
      for (int k = 0; k < 60; k++) begin
        in_valid = ($urandom_range(0, 3) != 0);
        in_miss  = ($urandom_range(0, 4) == 0) || (pass == 19);
        d = longint'($urandom_range(0, 200000)) - 64'sd100000;
        if (k > 0 && $urandom_range(0, 9) == 0 && rf) d = rmin;   // tie
        in_dist = DW'(d);
        in_tag  = TAG_W'(k);
        rupd = in_valid && !in_miss && (!rf || d < rmin);
        if (rupd) begin
          rf = 1; rmin = d; rtag = k;
        end
        @(negedge clk);
        chk(updated == rupd, $sformatf("updated pass %0d k %0d", pass, k));
        chk(found == rf, "found");
        if (rf) chk(longint'(min_dist) == rmin && int'(min_tag) == rtag,
                    $sformatf("min %0d/%0d expected %0d/%0d", min_dist, min_tag, rmin, rtag));
      end
      in_valid = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
