// tb_wd_detector: streams 105 pairs of sorted samples and checks the sum of
// absolute differences against a reference, the threshold decision
// (WD > 3 milliohm, i.e. sum > 315) on both sides of the limit, clear and
// saturation.
module tb_wd_detector;
  localparam int N = 105;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0;
  logic [15:0] g = 0, t = 0;
  logic [23:0] sum;
  logic over;

  wd_detector #(.N(N), .W(16), .SUM_W(24), .WD_THRESH_MOHM(3)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic stream(input int shift, input int jitter, output int ref_sum);
    int gv, tv;
    ref_sum = 0;
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int k = 0; k < N; k++) begin
      gv = 200 + k;
      tv = gv + shift + (jitter > 0 ? int'($urandom % (jitter + 1)) : 0);
      if (tv < 0) tv = 0;
      g = 16'(gv); t = 16'(tv); valid = 1;
      ref_sum += (gv > tv) ? gv - tv : tv - gv;
      @(negedge clk);
    end
    valid = 0;
    @(negedge clk);
  endtask

  initial begin
    int r;
    repeat (2) @(posedge clk);
    rst_n = 1;
    stream(0, 0, r);  check(sum == 0 && !over, "identical distributions");
    stream(3, 0, r);  check(sum == 24'(r) && r == 315 && !over, "WD = 3 exactly is not over");
    stream(-3, 1, r); check(sum == 24'(r), "sum with jitter");
    stream(4, 0, r);  check(sum == 24'(r) && over, "WD = 4 is over");
    stream(-20, 3, r); check(sum == 24'(r) && over, "negative shift over");
    for (int i = 0; i < 20; i++) begin
      stream(int'($urandom % 9) - 4, 2, r);
      check(sum == 24'(r) && over == (r > 315), $sformatf("random %0d: %0d/%0d", i, sum, r));
    end
    // saturation
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    g = 16'hFFFF; t = 0; valid = 1;
    repeat (300) @(negedge clk);
    valid = 0;
    check(sum == 24'hFF_FFFF, "saturates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
