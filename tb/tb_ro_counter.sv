// tb_ro_counter: feeds the counter from test clocks of known period and
// checks the count against GATE * T_clk / T_ro (within 2 counts), the
// latency start -> done of GATE + SETTLE + 1 clocks, busy, and that a lower
// oscillator frequency gives a proportionally lower count.
module tb_ro_counter;
  localparam int GATE = 500, SETTLE = 8;
  int checks = 0, failures = 0;
  function automatic real rabs(input real x); return x < 0.0 ? -x : x; endfunction
  logic clk = 0, rst_n = 0, ro_clk = 0, start = 0, busy, done;
  logic [23:0] count;
  real ro_half = 2.0;

  ro_counter #(.CNT_W(24), .GATE_CYCLES(GATE), .SETTLE_CYCLES(SETTLE)) dut (.*);

  always #5 clk = ~clk;
  always #(ro_half) ro_clk = ~ro_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input real half_ns);
    int lat;
    real expect_cnt;
    ro_half = half_ns;
    repeat (3) @(posedge clk);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    check(busy, "busy after start");
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    expect_cnt = real'(GATE) * 10.0 / (2.0 * half_ns);
    check(lat == GATE + SETTLE + 1, $sformatf("latency %0d", lat));
    check(rabs(real'(count) - expect_cnt) <= 2.0,
          $sformatf("count %0d expected %f", count, expect_cnt));
    @(negedge clk);
    check(!busy && !done, "idle after done");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(2.0);     // 250 MHz
    run(2.2);     // 227 MHz
    run(1.7);
    run(3.1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
